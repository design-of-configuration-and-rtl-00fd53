// tb_hinp5_top: end-to-end run of the chip's configuration and readout
// logic with its behavioural analog pulse circuits, at the default size
// (16 channels).
//
// Sequence: reset; write and read back the three configuration registers;
// load every channel's DAC register (some channels locally disabled) and
// read each back; then events:
//   1. untaken event: CFDs fire, no take_event; when the one-shot ends each
//      hit channel auto-resets and its analog reset pulse appears;
//   2. taken event: CFDs fire, take_event is raised, common_stop stops the
//      TVCs; the controller reads the hit pattern, copies it to the shadow
//      register and reads the channels out one by one with forced resets;
//   3. acq_all event with global enable off, then on;
//   4. the wide (1 us) analog reset selected by DLY_VC4;
//   5. the odd-channels example: channels 1, 3, ... 15 hit, read out in
//      that order by the encoder on the hit flags (mode 7).
// Each mechanism is counted; one that never happens is a failure.
`timescale 1ns / 1ps
module tb_hinp5_top;
  import hinp_pkg::*;
  logic reset_L = 1'b1, stb_L = 1'b1, write = 1'b0, load_ad_reg = 1'b0, sel_ext_addr = 1'b0;
  logic force_reset = 1'b0, take_event = 1'b0, acq_all = 1'b0, global_ena = 1'b0, common_stop = 1'b0;
  logic [7:0] ad_in = '0, ad_out;
  logic dob, or_out;
  logic [15:0] hit, chan_sel, cfd_out = '0, anrn, dcc_L, cc_L;
  cr0_t cr0; cr1_t cr1; cr2_t cr2;
  dac_reg_t dac_reg [16];
  int checks = 0, failures = 0;

  // mechanism counters
  int n_cfg = 0, n_dac = 0, n_local_block = 0, n_global_block = 0, n_hit = 0, n_auto = 0;
  int n_taken = 0, n_tvc_stop = 0, n_walk = 0, n_enc_hit = 0, n_ext = 0, n_acq_all = 0;
  int n_anr_pulse = 0, n_wide = 0, n_or = 0, n_odd = 0;
  realtime anr_rise [16];
  realtime anr_width;

  hinp5_top dut (
    .reset_L, .stb_L, .write, .load_ad_reg, .sel_ext_addr, .force_reset, .take_event, .acq_all,
    .global_ena, .common_stop, .ad_in, .ad_out, .drive_output_buffer(dob), .hit, .or_out,
    .chan_sel, .cr0, .cr1, .cr2, .dac_reg, .cfd_out, .analog_reset_narrow(anrn),
    .dont_charge_cap_L(dcc_L), .charge_cap_L(cc_L));

  for (genvar i = 0; i < 16; i++) begin : g_mon
    always @(posedge anrn[i]) anr_rise[i] = $realtime;
    always @(negedge anrn[i]) begin
      n_anr_pulse++;
      anr_width = $realtime - anr_rise[i];
    end
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
    #2 d = ad_out;
  endtask
  task automatic fire(input logic [15:0] f);
    cfd_out = f; #20 cfd_out = '0; #5;
  endtask
  task automatic expect_seen(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else $display("mechanism %-32s happened %0d times", what, n);
  endtask

  // reset_L falls at 1 ns so the asynchronous resets see an edge
  initial #1 reset_L = 1'b0;

  initial begin
    logic [7:0] d;
    logic [15:0] ena, fired, model;
    logic [7:0] cfg [3];
    #20 reset_L = 1'b1;
    global_ena = 1'b1;
    // configuration: DLY_VC = 1 (200 ns one-shot), DLY_VC4 = 0 (100 ns reset)
    cfg = '{8'h96, 8'h3c, 8'b0_0001_101};
    for (int r = 0; r < 3; r++) begin
      wr(4'h0, 3'(r), cfg[r]);
      rd(4'h0, 3'(r), d);
      check(16'(d), 16'(cfg[r]), "config read back");
      n_cfg++;
    end
    check(16'(cr2.dly_vc), 16'd1, "dly_vc field");
    // DAC registers through the external address
    ena = 16'b0111_1111_1111_0111;  // channels 3 and 15 locally disabled
    sel_ext_addr = 1'b1;
    for (int i = 0; i < 16; i++) wr(4'(i), 3'd6, {1'b0, ena[i], i[0], 5'(31 - i)});
    for (int i = 0; i < 16; i++) begin
      rd(4'(i), 3'd6, d);
      check(16'(d), 16'({1'b0, ena[i], i[0], 5'(31 - i)}), "dac read back");
      check(chan_sel, 16'(1 << i), "external channel select");
      n_dac++; n_ext++;
    end
    sel_ext_addr = 1'b0;
    #300;

    // 1. untaken event
    fired = 16'b1000_0100_0010_1001;
    n_anr_pulse = 0;
    fire(fired);
    check(hit, fired & ena, "hits of untaken event");
    n_hit += $countones(fired & ena);
    n_local_block += $countones(fired & ~ena);
    check(16'(or_out), 16'd1, "or_out");
    n_or++;
    #250;
    check(hit, 16'h0, "auto reset after one-shot");
    n_auto += $countones(fired & ena);
    #150;
    check(16'(n_anr_pulse), 16'($countones(fired & ena)), "analog reset pulses");
    check(16'($rtoi(anr_width + 0.5)), 16'd100, "analog reset width 100 ns");
    check(16'(or_out), 16'd0, "or_out clear");
    check(cc_L, ~(fired & ena), "TVCs of the untaken event still charging");
    common_stop = 1'b1; #5 common_stop = 1'b0;

    // 2. taken event with readout
    take_event = 1'b1;
    fired = 16'b0110_0001_1000_0110;
    global_ena = 1'b0;
    fire(fired);
    check(hit, 16'h0, "global disable");
    n_global_block++;
    global_ena = 1'b1;
    fire(fired);
    check(cc_L, ~(fired & ena), "TVCs charging");
    #40 common_stop = 1'b1; #2;
    check(cc_L, 16'hffff, "common stop");
    check(dcc_L, 16'h0000, "dont_charge asserted");
    n_tvc_stop++;
    #5 common_stop = 1'b0;
    #400;
    check(hit, fired & ena, "taken event keeps hits after one-shot");
    n_taken++;
    rd(4'h0, 3'd7, d);
    begin
      int low;
      low = 0;
      for (int j = 0; j < 16; j++) if ((fired & ena) >> j & 1) begin low = j; break; end
      check(16'(d), 16'(low << 4), "encoder on hit register");
      n_enc_hit++;
    end
    rd(4'h0, 3'd4, d); model[7:0] = d;
    rd(4'h0, 3'd5, d); model[15:8] = d;
    check(model, fired & ena, "hit pattern read");
    wr(4'h0, 3'd4, model[7:0]);
    wr(4'h0, 3'd5, model[15:8]);
    set_ad(4'h0, 3'd3);
    n_anr_pulse = 0;
    while (model != 0) begin
      int low;
      low = 0;
      for (int j = 0; j < 16; j++) if (model[j]) begin low = j; break; end
      #1;
      check(16'(ad_out), 16'(low << 4), "readout address");
      check(chan_sel, 16'(1 << low), "readout channel select");
      force_reset = 1'b1; strobe(); force_reset = 1'b0;
      model[low] = 1'b0;
      check(hit, model, "forced reset of read channel");
      n_walk++;
    end
    #200;
    check(16'(n_anr_pulse), 16'($countones(fired & ena)), "analog resets of read channels");
    take_event = 1'b0;
    #300;

    // 3. acq_all
    global_ena = 1'b0; acq_all = 1'b1; #30;
    check(hit, 16'h0, "acq_all with global disable");
    global_ena = 1'b1; #30;
    check(hit, ena, "acq_all hits every enabled channel");
    acq_all = 1'b0;
    n_acq_all++;
    #400;
    check(hit, 16'h0, "acq_all event auto-reset");

    // 4. wide analog reset
    wr(4'h0, 3'd2, 8'b1_0001_101);
    #300;
    fire(16'h0001);
    #1500;
    check(16'($rtoi(anr_width + 0.5)), 16'd1000, "analog reset width 1 us");
    n_wide++;

    // 5. worked example: odd channels hit, read out through the encoder on
    //    the hit flags (mode 7) with forced resets: 1, 3, 5, ... 15
    wr(4'h0, 3'd2, 8'b0_0001_101);
    for (int i = 3; i < 16; i += 12) wr(4'(i), 3'd6, 8'h40);
    #300;
    take_event = 1'b1;
    fire(16'b1010_1010_1010_1010);
    rd(4'h0, 3'd4, d); model[7:0] = d;
    rd(4'h0, 3'd5, d); model[15:8] = d;
    check(model, 16'b1010_1010_1010_1010, "odd channels hit");
    set_ad(4'h0, 3'd7);
    for (int k = 1; k < 16; k += 2) begin
      #1;
      check(16'(ad_out), 16'(k << 4), "odd-channel readout order");
      force_reset = 1'b1; strobe(); force_reset = 1'b0;
      n_odd++;
    end
    check(hit, 16'h0, "all odd channels read");
    take_event = 1'b0;
    #300;

    expect_seen(n_odd, "odd-channel example readout");
    expect_seen(n_cfg, "configuration write/read");
    expect_seen(n_dac, "DAC write/read-back");
    expect_seen(n_ext, "external channel address");
    expect_seen(n_hit, "qualified hit");
    expect_seen(n_local_block, "local disable blocks CFD");
    expect_seen(n_global_block, "global disable blocks CFD");
    expect_seen(n_or, "or_out");
    expect_seen(n_auto, "auto reset of untaken channel");
    expect_seen(n_taken, "take_event holds hits");
    expect_seen(n_tvc_stop, "TVC start and common stop");
    expect_seen(n_enc_hit, "encoder on hit register");
    expect_seen(n_walk, "shadow readout step");
    expect_seen(n_acq_all, "acq_all");
    expect_seen(n_wide, "wide analog reset");
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
