// hit_register: the hit flag of one signal channel.
//
// A qualified event sets the flag at once (qualified_cfd_narrow acts as an
// asynchronous set). The controller clears it at the rising edge of stb_L
// when it strobes force_reset with this channel selected (the flop loads a
// constant 0 when enabled). hit_regs_async_reset, high while reset_L is low
// or while the channel's auto-reset pulse is present, clears it at once.
// The set, enable, data and reset connections follow the design's channel
// schematic; giving reset priority over set is this design's choice.
`timescale 1ns / 1ps
module hit_register (
  input  logic stb_L,
  input  logic reset_L,
  input  logic qualified_cfd_narrow,
  input  logic auto_reset_narrow,
  input  logic force_reset,
  input  logic chan_sel,
  output logic hit
);

  logic hit_regs_async_reset;
  logic en;
  logic async_load;

  assign hit_regs_async_reset = !reset_L || auto_reset_narrow;
  assign en                   = force_reset && chan_sel;

  // The asynchronous set and reset are merged into one asynchronous load
  // whose value is 0 while the reset is active: same behaviour, one
  // asynchronous control for synthesis.
  assign async_load = hit_regs_async_reset || qualified_cfd_narrow;

  always_ff @(posedge stb_L or posedge async_load) begin
    if (async_load) hit <= !hit_regs_async_reset;
    else if (en)    hit <= 1'b0;
  end

endmodule
