// tb_shadow_register: byte writes, then a readout walk: while the register
// is encoded (sel_hit low) each force_reset strobe clears the bit of the
// encoded channel; strobes with sel_hit high or without force_reset change
// nothing. The encoder is modelled in the testbench.
`timescale 1ns / 1ps
module tb_shadow_register;
  logic        stb_L = 1'b1, reset_L = 1'b1;
  logic [7:0]  ad_in = '0;
  logic [1:0]  en_sr = '0;
  logic        force_reset = 1'b0, sel_hit = 1'b1;
  logic [3:0]  addr;
  logic        valid_addr;
  logic [15:0] shadow_reg;
  int checks = 0, failures = 0;

  shadow_register dut (.stb_L, .reset_L, .ad_in, .en_sr, .force_reset, .addr,
                       .valid_addr, .sel_hit, .shadow_reg);

  // lowest set bit, as the channel-address logic finds it
  always_comb begin
    addr = '0;
    valid_addr = |shadow_reg;
    for (int j = 15; j >= 0; j--) if (shadow_reg[j]) addr = 4'(j);
  end

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic strobe();
    #5 stb_L = 1'b0;
    #5 stb_L = 1'b1;
    #5;
  endtask

  // reset_L falls at 1 ns so the asynchronous resets see an edge
  initial #1 reset_L = 1'b0;

  initial begin
    #5;
    check(shadow_reg, 16'h0000, "reset");
    reset_L = 1'b1;
    for (int rep = 0; rep < 20; rep++) begin
      logic [15:0] pat, model;
      int walked;
      pat = 16'($urandom);
      en_sr = 2'b01; ad_in = pat[7:0];  strobe();
      en_sr = 2'b10; ad_in = pat[15:8]; strobe();
      en_sr = 2'b00;
      check(shadow_reg, pat, "byte writes");
      // force_reset while the hit register is encoded: no change
      force_reset = 1'b1; sel_hit = 1'b1; strobe();
      check(shadow_reg, pat, "sel_hit high keeps");
      // walk
      model = pat;
      walked = 0;
      sel_hit = 1'b0;
      while (model != 0) begin
        int low;
        low = 0;
        for (int j = 0; j < 16; j++) if (model[j]) begin low = j; break; end
        check(16'(addr), 16'(low), "walk addr");
        force_reset = 1'b0; strobe();
        check(shadow_reg, model, "no force_reset keeps");
        force_reset = 1'b1; strobe();
        model[low] = 1'b0;
        walked++;
        check(shadow_reg, model, "walk clear");
      end
      check(16'(walked), 16'($countones(pat)), "walk length");
      force_reset = 1'b0; sel_hit = 1'b1;
    end
    en_sr = 2'b11; ad_in = 8'h5a; strobe();
    check(shadow_reg, 16'h5a5a, "both bytes");
    reset_L = 1'b0; #1;
    check(shadow_reg, 16'h0000, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
