// tb_config_regs: random writes to the three configuration registers with
// random enables, compared with a reference copy; checks the asynchronous
// reset and a few named fields of the bit tables.
`timescale 1ns / 1ps
module tb_config_regs;
  import hinp_pkg::*;
  logic       stb_L = 1'b1, reset_L = 1'b1;
  logic [2:0] en_cr = '0;
  logic [7:0] ad_in = '0;
  cr0_t cr0; cr1_t cr1; cr2_t cr2;
  logic [7:0] ref_r [3];
  int checks = 0, failures = 0;

  config_regs dut (.stb_L, .reset_L, .en_cr, .ad_in, .cr0, .cr1, .cr2);

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
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
    check(cr0, 8'h00, "cr0 in reset");
    check(cr2, 8'h00, "cr2 in reset");
    reset_L = 1'b1;
    ref_r = '{8'h00, 8'h00, 8'h00};
    for (int n = 0; n < 200; n++) begin
      en_cr = 3'($urandom_range(0, 7));
      ad_in = 8'($urandom);
      strobe();
      for (int r = 0; r < 3; r++) if (en_cr[r]) ref_r[r] = ad_in;
      check(cr0, ref_r[0], "cr0");
      check(cr1, ref_r[1], "cr1");
      check(cr2, ref_r[2], "cr2");
    end
    // field positions
    en_cr = 3'b100; ad_in = 8'b0_1011_000;
    strobe();
    check(8'(cr2.dly_vc), 8'd11, "cr2.dly_vc from bits 6:3");
    en_cr = 3'b001; ad_in = 8'b0100_0000;
    strobe();
    check(8'(cr0.nowlin_mode), 8'd1, "cr0.nowlin_mode at bit 6");
    // enable low: nothing changes
    en_cr = 3'b000; ad_in = 8'hff;
    strobe();
    check(cr0, 8'b0100_0000, "cr0 held");
    reset_L = 1'b0;
    #1;
    check(cr1, 8'h00, "cr1 async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
