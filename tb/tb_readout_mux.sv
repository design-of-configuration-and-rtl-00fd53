// tb_readout_mux: random register contents; for each mode the byte on
// ad_out must be the one the mode table names.
`timescale 1ns / 1ps
module tb_readout_mux;
  import hinp_pkg::*;
  logic [2:0]  mode;
  cr0_t cr0; cr1_t cr1; cr2_t cr2;
  logic [3:0]  addr_out;
  logic [15:0] hit_reg;
  logic [7:0]  common_bus, ad_out;
  int checks = 0, failures = 0;

  readout_mux dut (.mode, .cr0, .cr1, .cr2, .addr_out, .hit_reg, .common_bus, .ad_out);

  initial begin
    for (int n = 0; n < 100; n++) begin
      cr0 = cr0_t'(8'($urandom)); cr1 = cr1_t'(8'($urandom)); cr2 = cr2_t'(8'($urandom));
      addr_out = 4'($urandom); hit_reg = 16'($urandom); common_bus = 8'($urandom);
      for (int m = 0; m < 8; m++) begin
        logic [7:0] exp;
        mode = m[2:0];
        case (m)
          0: exp = cr0;
          1: exp = cr1;
          2: exp = cr2;
          3, 7: exp = {addr_out, 4'h0};
          4: exp = hit_reg[7:0];
          5: exp = hit_reg[15:8];
          default: exp = common_bus;
        endcase
        #1;
        checks++;
        if (ad_out !== exp) begin
          failures++;
          $display("FAIL mode %0d: got %h exp %h", m, ad_out, exp);
        end
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
