// tb_vari_one_shot: for every delay code the pulse lasts (code+1) steps.
`timescale 1ns / 1ps
module tb_vari_one_shot;
  logic trig = 1'b0, out;
  logic [3:0] dly = '0;
  int checks = 0, failures = 0;
  realtime t0, t1;

  vari_one_shot #(.STEP_NS(100.0)) dut (.trig, .dly, .one_shot_out(out));

  initial begin
    #10;
    for (int d = 0; d < 16; d++) begin
      dly = 4'(d);
      #5 trig = 1'b1; t0 = $realtime;
      #5 trig = 1'b0;
      @(negedge out) t1 = $realtime;
      checks++;
      if (t1 - t0 < (d + 1) * 100.0 - 0.01 || t1 - t0 > (d + 1) * 100.0 + 0.01) begin
        failures++;
        $display("FAIL code %0d: %0.2f ns", d, t1 - t0);
      end
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
