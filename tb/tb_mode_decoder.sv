// tb_mode_decoder: exhaustive check of the mode decoder against the mode
// table: every mode with write low and high, expected enables written out
// independently per row.
`timescale 1ns / 1ps
module tb_mode_decoder;
  logic [2:0] mode;
  logic       write;
  logic [2:0] en_cr;
  logic [1:0] en_sr;
  logic       load_dac, read_dac, dob;
  int checks = 0, failures = 0;

  mode_decoder dut (.mode, .write, .en_cr, .en_sr, .load_dac, .read_dac,
                    .drive_output_buffer(dob));

  // {en_cr0,en_cr1,en_cr2,en_sr0,en_sr1,load_dac,read_dac,dob} per row
  function automatic logic [7:0] expected(input int w, input int m);
    if (w == 0) return (m == 6) ? 8'b0000_0011 : 8'b0000_0001;
    case (m)
      0: return 8'b1000_0000;
      1: return 8'b0100_0000;
      2: return 8'b0010_0000;
      4: return 8'b0001_0000;
      5: return 8'b0000_1000;
      6: return 8'b0000_0100;
      default: return 8'b0000_0000;
    endcase
  endfunction

  initial begin
    for (int w = 0; w < 2; w++) begin
      for (int m = 0; m < 8; m++) begin
        logic [7:0] got;
        write = w[0];
        mode  = m[2:0];
        #1;
        got = {en_cr[0], en_cr[1], en_cr[2], en_sr[0], en_sr[1], load_dac, read_dac, dob};
        checks++;
        if (got !== expected(w, m)) begin
          failures++;
          $display("FAIL write=%0d mode=%0d got %b exp %b", w, m, got, expected(w, m));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
