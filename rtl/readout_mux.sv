// readout_mux: chooses the byte the chip returns on ad_out in a read cycle.
//
// Combinational, selected by mode[2:0]: the three configuration registers,
// the channel address in the upper nibble (modes 3 and 7), the lower and
// upper byte of the hit pattern, and in mode 6 the read-back bus on which
// the selected channel drives its DAC register. Where the design's mode
// table and its multiplexer drawing differ, this follows the drawing for
// mode 6 (read-back bus rather than zero) and the table for modes 3 and 7
// (address in the upper nibble, the same place a write takes it from).
`timescale 1ns / 1ps
module readout_mux
  import hinp_pkg::*;
(
  input  logic [2:0]  mode,
  input  cr0_t        cr0,
  input  cr1_t        cr1,
  input  cr2_t        cr2,
  input  logic [3:0]  addr_out,
  input  logic [15:0] hit_reg,
  input  logic [7:0]  common_bus,
  output logic [7:0]  ad_out
);

  always_comb begin
    unique case (mode_e'(mode))
      MODE_CR0:      ad_out = cr0;
      MODE_CR1:      ad_out = cr1;
      MODE_CR2:      ad_out = cr2;
      MODE_ADDR:     ad_out = {addr_out, 4'b0000};
      MODE_HIT_LO:   ad_out = hit_reg[7:0];
      MODE_HIT_HI:   ad_out = hit_reg[15:8];
      MODE_DAC:      ad_out = common_bus;
      MODE_ADDR_ALT: ad_out = {addr_out, 4'b0000};
    endcase
  end

endmodule
