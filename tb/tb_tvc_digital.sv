// tb_tvc_digital: a qualified pulse starts charging (charge_cap_L low),
// common_stop, a forced reset of the selected channel and reset_L stop it;
// a forced reset of another channel does not.
`timescale 1ns / 1ps
module tb_tvc_digital;
  logic reset_L = 1'b1, qcn = 1'b0, common_stop = 1'b0, force_reset = 1'b0, chan_sel = 1'b0;
  logic dcc_L, cc_L;
  int checks = 0, failures = 0;

  tvc_digital dut (.reset_L, .qualified_cfd_narrow(qcn), .common_stop, .force_reset,
                   .chan_sel, .dont_charge_cap_L(dcc_L), .charge_cap_L(cc_L));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask
  task automatic start();
    #2 qcn = 1'b1; #3 qcn = 1'b0; #2;
    check(cc_L, 1'b0, "charging after event");
    check(dcc_L, 1'b1, "dont_charge released");
  endtask

  // reset_L falls at 1 ns so the asynchronous resets see an edge
  initial #1 reset_L = 1'b0;

  initial begin
    #5;
    check(cc_L, 1'b1, "idle in reset");
    reset_L = 1'b1;
    start();
    #1 common_stop = 1'b1; #1;
    check(cc_L, 1'b1, "common_stop stops");
    check(dcc_L, 1'b0, "dont_charge asserted");
    common_stop = 1'b0;
    start();
    force_reset = 1'b1; #1;
    check(cc_L, 1'b0, "force_reset of other channel ignored");
    chan_sel = 1'b1; #1;
    check(cc_L, 1'b1, "force_reset of this channel stops");
    force_reset = 1'b0; chan_sel = 1'b0;
    start();
    reset_L = 1'b0; #1;
    check(cc_L, 1'b1, "reset_L stops");
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
