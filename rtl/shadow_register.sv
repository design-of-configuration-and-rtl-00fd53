// shadow_register: a 16-bit list of channels to read out, written by the
// controller a byte at a time and emptied one channel per forced reset.
//
// A write in mode 4 loads ad_in into bits 7:0, a write in mode 5 into bits
// 15:8 (en_sr0, en_sr1). While the channel-address logic encodes this
// register (sel_hit low) and finds a channel (valid_addr), a strobe with
// force_reset high clears the bit of that channel (sync_reset), so the next
// read of mode 3 returns the next listed channel. All changes happen at the
// rising edge of stb_L; reset_L clears the register asynchronously.
// The byte-write path and the reset are as the design draws them; that
// sync_reset clears a bit (the drawing labels its pin SET but names the
// signal a reset), and when it fires, are this design's reading.
`timescale 1ns / 1ps
module shadow_register #(
  parameter int unsigned NUM_CHANNELS = 16
) (
  input  logic                            stb_L,
  input  logic                            reset_L,
  input  logic [7:0]                      ad_in,
  input  logic [NUM_CHANNELS/8-1:0]       en_sr,
  input  logic                            force_reset,
  input  logic [$clog2(NUM_CHANNELS)-1:0] addr,
  input  logic                            valid_addr,
  input  logic                            sel_hit,
  output logic [NUM_CHANNELS-1:0]         shadow_reg
);

  logic [NUM_CHANNELS-1:0] sync_reset;

  // Synchronous reset generation.
  always_comb begin
    sync_reset = '0;
    if (force_reset && valid_addr && !sel_hit) sync_reset[addr] = 1'b1;
  end

  always_ff @(posedge stb_L or negedge reset_L) begin
    if (!reset_L) begin
      shadow_reg <= '0;
    end else begin
      for (int b = 0; b < NUM_CHANNELS / 8; b++) begin
        if (en_sr[b]) shadow_reg[8*b +: 8] <= ad_in;
        else          shadow_reg[8*b +: 8] <= shadow_reg[8*b +: 8] & ~sync_reset[8*b +: 8];
      end
    end
  end

endmodule
