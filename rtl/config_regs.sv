// config_regs: the chip's 24 configuration bits, held in three byte-wide
// registers config_reg_0..2 and sent to the analog circuits.
//
// Each register loads ad_in at the rising edge of the strobe stb_L when its
// enable from the mode decoder is high, and clears asynchronously while
// reset_L is low (0 is the documented default of every field). The field
// layouts are in hinp_pkg. Taking the data at the rising edge of stb_L, the
// end of the active-low strobe, is this design's choice.
`timescale 1ns / 1ps
module config_regs
  import hinp_pkg::*;
(
  input  logic       stb_L,
  input  logic       reset_L,
  input  logic [2:0] en_cr,
  input  logic [7:0] ad_in,
  output cr0_t       cr0,
  output cr1_t       cr1,
  output cr2_t       cr2
);

  always_ff @(posedge stb_L or negedge reset_L) begin
    if (!reset_L) begin
      cr0 <= '0;
      cr1 <= '0;
      cr2 <= '0;
    end else begin
      if (en_cr[0]) cr0 <= cr0_t'(ad_in);
      if (en_cr[1]) cr1 <= cr1_t'(ad_in);
      if (en_cr[2]) cr2 <= cr2_t'(ad_in);
    end
  end

endmodule
