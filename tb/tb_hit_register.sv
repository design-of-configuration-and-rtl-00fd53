// tb_hit_register: set by a qualified pulse, held across strobes, cleared
// by force_reset only when the channel is selected, cleared at once by the
// auto-reset pulse and by reset_L, and reset winning over a set.
`timescale 1ns / 1ps
module tb_hit_register;
  logic stb_L = 1'b1, reset_L = 1'b1, qcn = 1'b0, arn = 1'b0;
  logic force_reset = 1'b0, chan_sel = 1'b0, hit;
  int checks = 0, failures = 0;

  hit_register dut (.stb_L, .reset_L, .qualified_cfd_narrow(qcn), .auto_reset_narrow(arn),
                    .force_reset, .chan_sel, .hit);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask
  task automatic strobe();
    #5 stb_L = 1'b0;
    #5 stb_L = 1'b1;
    #5;
  endtask
  task automatic fire();
    #2 qcn = 1'b1;
    #3 qcn = 1'b0;
    #2;
  endtask

  // reset_L falls at 1 ns so the asynchronous resets see an edge
  initial #1 reset_L = 1'b0;

  initial begin
    #5;
    check(hit, 1'b0, "reset");
    reset_L = 1'b1;
    #5;
    fire();
    check(hit, 1'b1, "set by qualified pulse");
    strobe();
    check(hit, 1'b1, "held over plain strobe");
    force_reset = 1'b1; chan_sel = 1'b0; strobe();
    check(hit, 1'b1, "force_reset not selected");
    force_reset = 1'b0; chan_sel = 1'b1; strobe();
    check(hit, 1'b1, "selected without force_reset");
    force_reset = 1'b1; #3;
    check(hit, 1'b1, "force_reset waits for strobe");
    strobe();
    check(hit, 1'b0, "force_reset clears");
    force_reset = 1'b0; chan_sel = 1'b0;
    fire();
    check(hit, 1'b1, "set again");
    #2 arn = 1'b1; #1;
    check(hit, 1'b0, "auto reset pulse clears at once");
    #2 arn = 1'b0;
    fire();
    #1 reset_L = 1'b0; #1;
    check(hit, 1'b0, "reset_L clears");
    fire();
    check(hit, 1'b0, "reset wins over set");
    reset_L = 1'b1;
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
