// tb_auto_reset_gen: an event whose one-shot ends without take_event
// raises auto_reset exactly at the end of the one-shot; with take_event
// held it does not, and auto_reset rises when take_event is released. The
// next qualified pulse clears it.
`timescale 1ns / 1ps
module tb_auto_reset_gen;
  logic reset_L = 1'b1, vos = 1'b0, take_event = 1'b0, qcn = 1'b0, auto_reset;
  int checks = 0, failures = 0;

  auto_reset_gen dut (.reset_L, .vari_one_shot(vos), .take_event,
                      .qualified_cfd_narrow(qcn), .auto_reset);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b exp %b", what, $time, got, exp);
    end
  endtask
  // event: qualified pulse, then a one-shot of len ns
  task automatic event_pulse(input int len);
    qcn = 1'b1; vos = 1'b1;
    #5 qcn = 1'b0;
    #(len - 5);
  endtask

  // reset_L falls at 1 ns so the asynchronous resets see an edge
  initial #1 reset_L = 1'b0;

  initial begin
    #5 reset_L = 1'b1;
    #5;
    check(auto_reset, 1'b0, "after reset");
    event_pulse(300);
    check(auto_reset, 1'b0, "during one-shot");
    vos = 1'b0; #1;
    check(auto_reset, 1'b1, "one-shot ended untaken");
    #50;
    event_pulse(300);
    check(auto_reset, 1'b0, "cleared by next qualified pulse");
    take_event = 1'b1;
    #10 vos = 1'b0; #1;
    check(auto_reset, 1'b0, "taken event: no auto reset");
    #100;
    check(auto_reset, 1'b0, "still none while take_event");
    take_event = 1'b0; #1;
    check(auto_reset, 1'b1, "release of take_event resets");
    reset_L = 1'b0; #1;
    check(auto_reset, 1'b0, "reset_L clears");
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
