// tb_narrow_pulse_gen: pulse widths of the fixed and the selectable
// generator (100 ns / 1 us), one pulse per rising edge, none on a falling
// edge.
`timescale 1ns / 1ps
module tb_narrow_pulse_gen;
  logic in_a = 1'b0, in_b = 1'b0, wide = 1'b0, out_a, out_b;
  int checks = 0, failures = 0;
  realtime t_rise, t_fall;

  narrow_pulse_gen #(.WIDTH_NS(10.0)) dut_a (.in_sig(in_a), .wide(1'b0), .out_pulse(out_a));
  narrow_pulse_gen #(.USE_SELECT(1'b1)) dut_b (.in_sig(in_b), .wide, .out_pulse(out_b));

  task automatic check_width(input realtime got, input realtime exp, input string what);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("FAIL %s: width %0.3f exp %0.3f", what, got, exp);
    end
  endtask
  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    #20;
    check(out_a, 1'b0, "idle");
    in_a = 1'b1; t_rise = $realtime;
    #0.5 check(out_a, 1'b1, "pulse starts on rising edge");
    @(negedge out_a) t_fall = $realtime;
    check_width(t_fall - t_rise, 10.0, "fixed width");
    #20 in_a = 1'b0;
    #20 check(out_a, 1'b0, "no pulse on falling edge");
    wide = 1'b0; in_b = 1'b1; t_rise = $realtime;
    @(negedge out_b) t_fall = $realtime;
    check_width(t_fall - t_rise, 100.0, "narrow reset width");
    in_b = 1'b0; #10;
    wide = 1'b1; in_b = 1'b1; t_rise = $realtime;
    @(negedge out_b) t_fall = $realtime;
    check_width(t_fall - t_rise, 1000.0, "wide reset width");
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
