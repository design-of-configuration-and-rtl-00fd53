// chan_addr_gen: finds the channel to read out next.
//
// A multiplexer picks either the channels' hit bits or the shadow register,
// and a priority encoder returns the index of the lowest-numbered set bit
// (addr) with valid_addr high, or 0 with valid_addr low when no bit is set.
// The shadow register is picked (sel_hit = 0) only in a read cycle of
// mode 3; every other cycle encodes the hit bits. Combinational. Both the
// selection rule and the lowest-index priority follow the design.
`timescale 1ns / 1ps
module chan_addr_gen #(
  parameter int unsigned NUM_CHANNELS = 16
) (
  input  logic [NUM_CHANNELS-1:0]         hit,
  input  logic [NUM_CHANNELS-1:0]         shadow_reg,
  input  logic [2:0]                      mode,
  input  logic                            write,
  output logic                            sel_hit,
  output logic [$clog2(NUM_CHANNELS)-1:0] addr,
  output logic                            valid_addr
);

  logic [NUM_CHANNELS-1:0] encoder_in;

  assign sel_hit    = !(mode == 3'd3 && !write);
  assign encoder_in = sel_hit ? hit : shadow_reg;

  // Lowest set bit wins: scan from the top so the last match is the lowest.
  always_comb begin
    addr       = '0;
    valid_addr = |encoder_in;
    for (int j = NUM_CHANNELS - 1; j >= 0; j--) begin
      if (encoder_in[j]) addr = j[$clog2(NUM_CHANNELS)-1:0];
    end
  end

endmodule
