// analog_reset_gen: raises a channel's analog reset.
//
// analog_reset_async_set = auto_reset | (force_reset & chan_sel) goes out
// to a narrow pulse generator; its pulse, analog_reset_async_set_narrow,
// sets analog_reset asynchronously. The next qualified event
// (qualified_cfd_narrow, used as the clock) loads the constant 0 and clears
// it. The rising edge of analog_reset is turned into the analog reset pulse
// by a second narrow pulse generator outside this module.
// Structure as in the design's analog-reset schematic, which draws no reset
// input on this flop; none is added.
`timescale 1ns / 1ps
module analog_reset_gen (
  input  logic auto_reset,
  input  logic force_reset,
  input  logic chan_sel,
  input  logic qualified_cfd_narrow,
  input  logic analog_reset_async_set_narrow,
  output logic analog_reset_async_set,
  output logic analog_reset
);

  assign analog_reset_async_set = auto_reset || (force_reset && chan_sel);

  always_ff @(posedge qualified_cfd_narrow or posedge analog_reset_async_set_narrow) begin
    if (analog_reset_async_set_narrow) analog_reset <= 1'b1;
    else                               analog_reset <= 1'b0;
  end

endmodule
