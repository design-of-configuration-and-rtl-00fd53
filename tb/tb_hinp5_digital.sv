// tb_hinp5_digital: the synthesizable chip logic with the analog pulse
// loops driven by the testbench. Enables a subset of channels through
// their DAC registers, fires CFDs, checks qualification, hit flags, TVC
// start and common stop, reads every DAC back over the shared bus, and
// walks the hit channels out through the shadow register with forced
// resets, checking that each reset clears exactly that channel.
`timescale 1ns / 1ps
module tb_hinp5_digital;
  import hinp_pkg::*;
  logic reset_L = 1'b1, stb_L = 1'b1, write = 1'b0, load_ad_reg = 1'b0, sel_ext_addr = 1'b0;
  logic force_reset = 1'b0, take_event = 1'b0, acq_all = 1'b0, global_ena = 1'b1, common_stop = 1'b0;
  logic [7:0] ad_in = '0, ad_out;
  logic dob;
  logic [15:0] hit, chan_sel, cfd_out = '0, qcfd, qcn = '0, vos = '0, ar, arn = '0, ars, arsn = '0;
  logic [15:0] anr, dcc_L, cc_L;
  cr0_t cr0; cr1_t cr1; cr2_t cr2;
  dac_reg_t dac_reg [16];
  int checks = 0, failures = 0;

  hinp5_digital dut (
    .reset_L, .stb_L, .write, .load_ad_reg, .sel_ext_addr, .force_reset, .take_event, .acq_all,
    .global_ena, .common_stop, .ad_in, .ad_out, .drive_output_buffer(dob), .hit, .chan_sel,
    .cr0, .cr1, .cr2, .dac_reg, .cfd_out, .qualified_cfd(qcfd), .qualified_cfd_narrow(qcn),
    .vari_one_shot(vos), .auto_reset(ar), .auto_reset_narrow(arn),
    .analog_reset_async_set(ars), .analog_reset_async_set_narrow(arsn), .analog_reset(anr),
    .dont_charge_cap_L(dcc_L), .charge_cap_L(cc_L));

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

  // reset_L falls at 1 ns so the asynchronous resets see an edge
  initial #1 reset_L = 1'b0;

  initial begin
    logic [15:0] ena, fired, model;
    #10 reset_L = 1'b1;
    ena = 16'($urandom) | 16'h0101;
    sel_ext_addr = 1'b1;
    for (int i = 0; i < 16; i++) wr(4'(i), 3'd6, {1'b0, ena[i], 1'b0, 5'(i)});
    for (int i = 0; i < 16; i++) begin
      set_ad(4'(i), 3'd6); #1;
      check(16'(ad_out), 16'({1'b0, ena[i], 1'b0, 5'(i)}), "dac read back over bus");
    end
    sel_ext_addr = 1'b0;
    // event: CFDs on a random set of channels
    fired = 16'($urandom) | 16'h0001;
    cfd_out = fired; #1;
    check(qcfd, fired & ena, "qualification by local enable");
    global_ena = 1'b0; #1;
    check(qcfd, 16'h0, "global disable");
    global_ena = 1'b1; #1;
    qcn = qcfd; #5 qcn = '0; cfd_out = '0; #5;
    check(hit, fired & ena, "hit flags");
    check(cc_L, ~(fired & ena), "TVCs charging on hit channels");
    common_stop = 1'b1; #1 common_stop = 1'b0; #1;
    check(cc_L, 16'hffff, "common stop");
    // readout walk of the hit channels
    wr(4'h0, 3'd4, hit[7:0]);
    wr(4'h0, 3'd5, hit[15:8]);
    set_ad(4'h0, 3'd3);
    model = fired & ena;
    while (model != 0) begin
      int low;
      low = 0;
      for (int j = 0; j < 16; j++) if (model[j]) begin low = j; break; end
      #1;
      check(16'(ad_out), 16'(low << 4), "readout address");
      force_reset = 1'b1; #1;
      check(ars, 16'(1 << low), "analog reset request of selected channel");
      strobe(); force_reset = 1'b0;
      model[low] = 1'b0;
      check(hit, model, "forced reset clears that channel");
    end
    // acq_all qualifies every enabled channel
    acq_all = 1'b1; #1;
    check(qcfd, ena, "acq_all");
    acq_all = 1'b0;
    // auto reset path: one-shot of channel 0 ends without take_event
    qcn = 16'h0001; vos = 16'h0001; #5 qcn = '0; #50;
    check(hit[0], 1'b1, "hit before auto reset");
    vos = '0; #1;
    check(ar, 16'h0001, "auto reset of channel 0");
    arn = ar; #5 arn = '0; #1;
    check(hit, 16'h0, "auto reset pulse clears hit");
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
