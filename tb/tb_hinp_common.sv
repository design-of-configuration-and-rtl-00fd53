// tb_hinp_common: the common channel driven through its bus protocol.
// Checks configuration write/read-back, address writes with sel_ext_addr,
// hit read-back, encoder addressing of the lowest hit, the shadow-register
// readout walk with force_reset, DAC load/read strobes and the mode-6 read
// of the read-back bus (modelled here by a tiny per-channel register file).
`timescale 1ns / 1ps
module tb_hinp_common;
  import hinp_pkg::*;
  logic reset_L = 1'b1, stb_L = 1'b1, write = 1'b0, load_ad_reg = 1'b0;
  logic sel_ext_addr = 1'b0, force_reset = 1'b0;
  logic [7:0] ad_in = '0, ad_out, common_bus;
  logic dob, load_dac, read_dac;
  logic [15:0] hit = '0, chan_sel;
  cr0_t cr0; cr1_t cr1; cr2_t cr2;
  logic [7:0] dac_model [16];
  int checks = 0, failures = 0;

  hinp_common dut (.reset_L, .stb_L, .write, .load_ad_reg, .sel_ext_addr, .force_reset,
                   .ad_in, .ad_out, .drive_output_buffer(dob), .hit, .common_bus, .chan_sel,
                   .load_dac, .read_dac, .cr0, .cr1, .cr2);

  // channel side: DAC registers of sixteen channels
  always @(posedge stb_L)
    for (int i = 0; i < 16; i++) if (chan_sel[i] && load_dac) dac_model[i] <= ad_in;
  always_comb begin
    common_bus = '0;
    for (int i = 0; i < 16; i++) if (chan_sel[i] && read_dac) common_bus |= dac_model[i];
  end

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h exp %h", what, $time, got, exp);
    end
  endtask
  task automatic strobe();
    #5 stb_L = 1'b0;
    #5 stb_L = 1'b1;
    #5;
  endtask
  task automatic set_ad(input logic [3:0] a, input logic [2:0] m);
    load_ad_reg = 1'b1; write = 1'b0; ad_in = {a, 1'b0, m};
    strobe();
    load_ad_reg = 1'b0;
  endtask
  task automatic wr(input logic [3:0] a, input logic [2:0] m, input logic [7:0] d);
    set_ad(a, m);
    write = 1'b1; ad_in = d;
    strobe();
    write = 1'b0;
  endtask
  task automatic rd(input logic [3:0] a, input logic [2:0] m, output logic [7:0] d);
    set_ad(a, m);
    write = 1'b0; #2;
    check(16'(dob), 16'd1, "output buffer driven in read");
    d = ad_out;
  endtask

  // reset_L falls at 1 ns so the asynchronous resets see an edge
  initial #1 reset_L = 1'b0;

  initial begin
    logic [7:0] d;
    logic [15:0] pat;
    for (int i = 0; i < 16; i++) dac_model[i] = '0;
    #10 reset_L = 1'b1;
    // configuration registers
    for (int r = 0; r < 3; r++) begin
      logic [7:0] v;
      v = 8'($urandom);
      wr(4'h0, 3'(r), v);
      rd(4'h0, 3'(r), d);
      check(16'(d), 16'(v), "config write/read");
    end
    // external address: write mode 3, read mode 3 and 7, chan_sel follows
    sel_ext_addr = 1'b1;
    wr(4'h0, 3'd3, 8'hB0);
    write = 1'b0; #2;
    check(16'(ad_out), 16'hB0, "addr write/read mode 3");
    check(chan_sel, 16'h0800, "chan_sel external");
    set_ad(4'h0, 3'd7);
    check(16'(ad_out), 16'h00, "addr from load_ad_reg");
    wr(4'h0, 3'd7, 8'h5F);
    write = 1'b0; #2;
    check(16'(ad_out), 16'h50, "addr write/read mode 7");
    // DACs: write channel i's DAC and read it back
    for (int i = 0; i < 16; i++) wr(4'(i), 3'd6, 8'(8'h40 + i * 3));
    for (int i = 15; i >= 0; i--) begin
      rd(4'(i), 3'd6, d);
      check(16'(d), 16'(8'h40 + i * 3), "dac read back");
    end
    // DAC access addresses ad_reg's channel even without sel_ext_addr
    sel_ext_addr = 1'b0;
    hit = 16'h0002;
    wr(4'd9, 3'd6, 8'h77);
    check(16'(dac_model[9]), 16'h77, "dac write by ad_reg address");
    check(16'(dac_model[1]), 16'(8'h40 + 1 * 3), "hit channel's dac untouched");
    rd(4'd9, 3'd6, d);
    check(16'(d), 16'h77, "dac read by ad_reg address");
    sel_ext_addr = 1'b1;
    // hit read-back
    hit = 16'hA5C3;
    rd(4'h0, 3'd4, d); check(16'(d), 16'hC3, "hit lower");
    rd(4'h0, 3'd5, d); check(16'(d), 16'hA5, "hit upper");
    // encoder addressing of the hit register
    sel_ext_addr = 1'b0;
    hit = 16'b1010_1010_1010_1000;
    rd(4'h0, 3'd7, d);
    check(16'(d), 16'h30, "encoded lowest hit, mode 7");
    check(chan_sel, 16'h0008, "chan_sel from encoder");
    hit = '0; #1;
    check(chan_sel, 16'h0000, "no channel without a hit");
    // shadow readout walk
    for (int rep = 0; rep < 5; rep++) begin
      logic [15:0] model;
      pat = 16'($urandom) | 16'h8000;
      wr(4'h0, 3'd4, pat[7:0]);
      wr(4'h0, 3'd5, pat[15:8]);
      set_ad(4'h0, 3'd3);
      model = pat;
      while (model != 0) begin
        int low;
        low = 0;
        for (int j = 0; j < 16; j++) if (model[j]) begin low = j; break; end
        #1;
        check(16'(ad_out), 16'(low << 4), "walk address");
        check(chan_sel, 16'(1 << low), "walk chan_sel");
        force_reset = 1'b1; strobe(); force_reset = 1'b0;
        model[low] = 1'b0;
      end
      check(chan_sel, 16'h0000, "walk done");
    end
    write = 1'b1; #1;
    check(16'(dob), 16'd0, "output buffer off in write");
    reset_L = 1'b0; #1;
    check(16'(cr2), 16'h0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
