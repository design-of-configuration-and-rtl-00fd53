// auto_reset_gen: digital half of a channel's auto-reset.
//
// A qualified event starts the channel's variable one-shot (an analog
// circuit outside this module) and clears auto_reset. When the one-shot
// ends, its inverted output vari_one_shot_L rises; if the controller has not
// raised take_event to accept the event by then, that edge, gated by
// ~take_event into gen_auto_reset, clocks a 1 into auto_reset. A narrow
// pulse made from auto_reset then clears the channel's hit flag and resets
// its analog part. Because of the gating, gen_auto_reset also rises when
// take_event falls while the one-shot is idle, so accepted channels are
// reset once the controller lets go of take_event.
// Structure as in the design's channel schematic; the added clear by
// reset_L is this design's choice.
`timescale 1ns / 1ps
module auto_reset_gen (
  input  logic reset_L,
  input  logic vari_one_shot,
  input  logic take_event,
  input  logic qualified_cfd_narrow,
  output logic auto_reset
);

  logic vari_one_shot_L;
  logic gen_auto_reset;
  logic clr;

  assign vari_one_shot_L = !vari_one_shot;
  assign gen_auto_reset  = vari_one_shot_L && !take_event;
  assign clr             = qualified_cfd_narrow || !reset_L;

  always_ff @(posedge gen_auto_reset or posedge clr) begin
    if (clr) auto_reset <= 1'b0;
    else     auto_reset <= 1'b1;
  end

endmodule
