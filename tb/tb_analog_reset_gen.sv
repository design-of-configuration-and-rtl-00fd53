// tb_analog_reset_gen: the set request is auto_reset or a forced reset of
// the selected channel; its narrow pulse sets analog_reset, a qualified
// pulse clears it.
`timescale 1ns / 1ps
module tb_analog_reset_gen;
  logic auto_reset = 1'b0, force_reset = 1'b0, chan_sel = 1'b0;
  logic qcn = 1'b0, set_narrow = 1'b0, set_req, analog_reset;
  int checks = 0, failures = 0;

  analog_reset_gen dut (.auto_reset, .force_reset, .chan_sel, .qualified_cfd_narrow(qcn),
                        .analog_reset_async_set_narrow(set_narrow),
                        .analog_reset_async_set(set_req), .analog_reset);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask
  task automatic pulse_set();   #2 set_narrow = 1'b1; #3 set_narrow = 1'b0; #2; endtask
  task automatic pulse_cfd();   #2 qcn = 1'b1; #3 qcn = 1'b0; #2; endtask

  initial begin
    for (int n = 0; n < 8; n++) begin
      {auto_reset, force_reset, chan_sel} = n[2:0];
      #1;
      check(set_req, auto_reset || (force_reset && chan_sel), "set request");
    end
    {auto_reset, force_reset, chan_sel} = '0;
    pulse_set();
    check(analog_reset, 1'b1, "set by narrow pulse");
    pulse_cfd();
    check(analog_reset, 1'b0, "cleared by qualified pulse");
    pulse_cfd();
    check(analog_reset, 1'b0, "stays clear");
    pulse_set();
    check(analog_reset, 1'b1, "set again");
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
