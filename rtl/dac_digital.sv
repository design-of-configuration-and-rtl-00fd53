// dac_digital: a signal channel's DAC register.
//
// Eight bits: the 5-bit CFD threshold, the threshold polarity and the
// channel's local enable (see dac_reg_t). The register loads data (the chip's
// ad_in) at the rising edge of stb_L when the channel is selected and
// load_dac is high, and clears asynchronously while reset_L is low, which
// also leaves the channel locally disabled. When the channel is selected and
// read_dac is high it drives the register onto the shared read-back bus.
// The design draws that bus as tri-state; here the drive is a value and an
// enable (bus_out, bus_oe) that the channel array ORs together.
`timescale 1ns / 1ps
module dac_digital
  import hinp_pkg::*;
(
  input  logic       stb_L,
  input  logic       reset_L,
  input  logic [7:0] data,
  input  logic       chan_sel,
  input  logic       load_dac,
  input  logic       read_dac,
  output dac_reg_t   dac_reg,
  output logic [7:0] bus_out,
  output logic       bus_oe
);

  always_ff @(posedge stb_L or negedge reset_L) begin
    if (!reset_L)                  dac_reg <= '0;
    else if (chan_sel && load_dac) dac_reg <= dac_reg_t'(data);
  end

  assign bus_oe  = chan_sel && read_dac;
  assign bus_out = bus_oe ? dac_reg : 8'h00;

endmodule
