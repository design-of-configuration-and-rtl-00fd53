// tb_chan_addr_gen: the two worked examples of the design (odd channels
// hit), then random hit and shadow patterns in every mode against a
// reference that scans upward for the first set bit.
`timescale 1ns / 1ps
module tb_chan_addr_gen;
  logic [15:0] hit, shadow_reg;
  logic [2:0]  mode;
  logic        write, sel_hit, valid_addr;
  logic [3:0]  addr;
  int checks = 0, failures = 0;

  chan_addr_gen dut (.hit, .shadow_reg, .mode, .write, .sel_hit, .addr, .valid_addr);

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    mode = 3'd4; write = 1'b0; shadow_reg = '0;
    hit = 16'b1010_1010_1010_1010; #1;
    check(8'(addr), 8'd1, "example 1 addr");
    check(8'(valid_addr), 8'd1, "example 1 valid");
    hit = 16'b1010_1010_1010_1000; #1;
    check(8'(addr), 8'd3, "example 2 addr");
    hit = '0; #1;
    check(8'(valid_addr), 8'd0, "empty valid");
    check(8'(addr), 8'd0, "empty addr");
    for (int n = 0; n < 500; n++) begin
      logic [15:0] src;
      int exp_a;
      logic exp_sel;
      hit = 16'($urandom); shadow_reg = 16'($urandom);
      if (n % 4 == 0) hit = 16'h0001 << $urandom_range(0, 15);
      if (n % 4 == 1) shadow_reg = 16'h0001 << $urandom_range(0, 15);
      mode = 3'($urandom); write = 1'($urandom);
      exp_sel = !(mode == 3 && !write);
      src = exp_sel ? hit : shadow_reg;
      exp_a = 0;
      for (int j = 0; j < 16; j++) if (src[j]) begin exp_a = j; break; end
      #1;
      check(8'(sel_hit), 8'(exp_sel), "sel_hit");
      check(8'(addr), 8'(exp_a), "addr");
      check(8'(valid_addr), 8'(src != 0), "valid_addr");
    end
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
