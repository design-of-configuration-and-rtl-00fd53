// tb_dac_digital: loads only when selected and load_dac, drives the bus
// only when selected and read_dac, fields land where the bit table puts
// them, reset clears.
`timescale 1ns / 1ps
module tb_dac_digital;
  import hinp_pkg::*;
  logic stb_L = 1'b1, reset_L = 1'b1, chan_sel = 1'b0, load_dac = 1'b0, read_dac = 1'b0;
  logic [7:0] data = '0, bus_out;
  logic bus_oe;
  dac_reg_t dac_reg;
  logic [7:0] model;
  int checks = 0, failures = 0;

  dac_digital dut (.stb_L, .reset_L, .data, .chan_sel, .load_dac, .read_dac, .dac_reg,
                   .bus_out, .bus_oe);

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
    check(dac_reg, 8'h00, "reset");
    reset_L = 1'b1;
    model = 8'h00;
    for (int n = 0; n < 200; n++) begin
      {chan_sel, load_dac, read_dac} = 3'($urandom);
      data = 8'($urandom);
      strobe();
      if (chan_sel && load_dac) model = data;
      check(dac_reg, model, "register");
      check(8'(bus_oe), 8'(chan_sel && read_dac), "bus_oe");
      check(bus_out, (chan_sel && read_dac) ? model : 8'h00, "bus_out");
    end
    chan_sel = 1'b1; load_dac = 1'b1; read_dac = 1'b0;
    data = 8'b0110_0101; strobe();
    check(8'(dac_reg.threshold), 8'd5, "threshold bits 4:0");
    check(8'(dac_reg.polarity), 8'd1, "polarity bit 5");
    check(8'(dac_reg.local_ena), 8'd1, "local enable bit 6");
    reset_L = 1'b0; #1;
    check(dac_reg, 8'h00, "async reset");
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
