// vari_one_shot: behavioural model of a channel's analog variable one-shot.
// Not synthesizable.
//
// A rising edge of trig starts a high pulse on one_shot_out lasting
// (dly + 1) * STEP_NS, one of 16 lengths chosen by the configuration bits
// DLY_VC[3:0]. When it ends, the channel auto-resets unless the event has
// been taken. The design gives sixteen delays but not their values; the
// linear 100 ns step is this model's choice. Retriggering during a pulse is
// ignored.
`timescale 1ns / 1ps
module vari_one_shot #(
  parameter realtime STEP_NS = 100.0
) (
  input  logic       trig,
  input  logic [3:0] dly,
  output logic       one_shot_out
);

  initial one_shot_out = 1'b0;

  always begin
    @(posedge trig);
    one_shot_out = 1'b1;
    repeat (int'(dly) + 1) #(STEP_NS);
    one_shot_out = 1'b0;
  end

endmodule
