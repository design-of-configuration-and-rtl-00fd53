// narrow_pulse_gen: behavioural model of the analog narrow pulse generator
// that follows several of a channel's digital signals. Not synthesizable.
//
// Each rising edge of in_sig produces one high pulse on out_pulse. Its
// width is WIDTH_NS, or, with USE_SELECT set, NARROW_NS or WIDE_NS as the
// wide input picks (the design lets configuration bit DLY_VC4 choose a
// 100 ns or 1 us reset pulse). An edge that arrives during a pulse is
// ignored. The widths are this model's choices apart from the 100 ns /
// 1 us pair.
`timescale 1ns / 1ps
module narrow_pulse_gen #(
  parameter realtime WIDTH_NS   = 10.0,
  parameter bit      USE_SELECT = 1'b0,
  parameter realtime NARROW_NS  = 100.0,
  parameter realtime WIDE_NS    = 1000.0
) (
  input  logic in_sig,
  input  logic wide,
  output logic out_pulse
);

  initial out_pulse = 1'b0;

  always begin
    @(posedge in_sig);
    out_pulse = 1'b1;
    if (!USE_SELECT) #(WIDTH_NS);
    else if (wide)   #(WIDE_NS);
    else             #(NARROW_NS);
    out_pulse = 1'b0;
  end

endmodule
