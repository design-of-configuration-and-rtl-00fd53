// tvc_digital: start/stop control of a channel's time-to-voltage converter.
//
// A qualified event (rising edge of qualified_cfd_narrow) clocks a 1 into
// the flop: dont_charge_cap_L (Q) goes high and charge_cap_L (Q-bar) goes
// low, so the TVC capacitor charges. dig_reset = common_stop | ~reset_L |
// (force_reset & chan_sel) clears the flop asynchronously and stops the
// charging: the common stop ends the time measurement of every channel.
// Structure as in the design's TVC schematic.
`timescale 1ns / 1ps
module tvc_digital (
  input  logic reset_L,
  input  logic qualified_cfd_narrow,
  input  logic common_stop,
  input  logic force_reset,
  input  logic chan_sel,
  output logic dont_charge_cap_L,
  output logic charge_cap_L
);

  logic dig_reset;
  logic q;

  assign dig_reset = common_stop || !reset_L || (force_reset && chan_sel);

  always_ff @(posedge qualified_cfd_narrow or posedge dig_reset) begin
    if (dig_reset) q <= 1'b0;
    else           q <= 1'b1;
  end

  assign dont_charge_cap_L = q;
  assign charge_cap_L      = !q;

endmodule
