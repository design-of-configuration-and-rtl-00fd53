// tb_channel_digital: one channel closed through behavioural pulse
// generators and a one-shot: DAC load/readback and local enable, event
// qualification (global/local enable, acq_all), hit, TVC start/stop,
// auto reset when the event is not taken and analog reset, forced reset.
`timescale 1ns / 1ps
module tb_channel_digital;
  import hinp_pkg::*;
  logic reset_L = 1'b1, stb_L = 1'b1, chan_sel = 1'b0, load_dac = 1'b0, read_dac = 1'b0;
  logic force_reset = 1'b0, take_event = 1'b0, global_ena = 1'b0, acq_all = 1'b0;
  logic common_stop = 1'b0, cfd_out = 1'b0;
  logic [7:0] data = '0, bus_out;
  logic qcfd, qcn, vos, ar, arn, ars, arsn, anr, anrn, hit, dcc_L, cc_L, bus_oe;
  dac_reg_t dac_reg;
  int checks = 0, failures = 0;
  int n_anr = 0;

  channel_digital dut (
    .reset_L, .stb_L, .data, .chan_sel, .load_dac, .read_dac, .force_reset, .take_event,
    .global_ena, .acq_all, .common_stop, .cfd_out,
    .qualified_cfd(qcfd), .qualified_cfd_narrow(qcn), .vari_one_shot(vos),
    .auto_reset(ar), .auto_reset_narrow(arn),
    .analog_reset_async_set(ars), .analog_reset_async_set_narrow(arsn), .analog_reset(anr),
    .hit, .dont_charge_cap_L(dcc_L), .charge_cap_L(cc_L), .dac_reg, .bus_out, .bus_oe);

  narrow_pulse_gen #(.WIDTH_NS(10.0)) u_p1 (.in_sig(qcfd), .wide(1'b0), .out_pulse(qcn));
  narrow_pulse_gen #(.WIDTH_NS(10.0)) u_p2 (.in_sig(ar), .wide(1'b0), .out_pulse(arn));
  narrow_pulse_gen #(.WIDTH_NS(10.0)) u_p3 (.in_sig(ars), .wide(1'b0), .out_pulse(arsn));
  narrow_pulse_gen #(.USE_SELECT(1'b1)) u_p4 (.in_sig(anr), .wide(1'b0), .out_pulse(anrn));
  vari_one_shot #(.STEP_NS(100.0)) u_os (.trig(qcn), .dly(4'd2), .one_shot_out(vos));

  always @(posedge anrn) n_anr++;

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
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
  task automatic cfd();
    cfd_out = 1'b1; #20 cfd_out = 1'b0; #5;
  endtask

  // reset_L falls at 1 ns so the asynchronous resets see an edge
  initial #1 reset_L = 1'b0;

  initial begin
    #10 reset_L = 1'b1;
    global_ena = 1'b1;
    // locally disabled after reset: a CFD is not qualified
    cfd();
    check(hit, 1'b0, "locally disabled");
    // load DAC: threshold 9, enabled
    chan_sel = 1'b1; load_dac = 1'b1; data = 8'h49; strobe();
    load_dac = 1'b0;
    check(dac_reg, 8'h49, "dac load");
    read_dac = 1'b1; #1;
    check(bus_out, 8'h49, "dac read back");
    check(bus_oe, 1'b1, "bus driven");
    read_dac = 1'b0; chan_sel = 1'b0;
    global_ena = 1'b0; cfd();
    check(hit, 1'b0, "globally disabled");
    global_ena = 1'b1;
    // accepted event: hit, TVC charging until common stop
    take_event = 1'b1;
    cfd();
    check(hit, 1'b1, "hit on qualified cfd");
    check(cc_L, 1'b0, "tvc charging");
    #10 common_stop = 1'b1; #2;
    check(cc_L, 1'b1, "common stop");
    common_stop = 1'b0;
    #400;
    check(hit, 1'b1, "taken event keeps hit after one-shot");
    // forced reset by the controller
    chan_sel = 1'b1; force_reset = 1'b1; strobe();
    check(hit, 1'b0, "forced reset clears hit");
    force_reset = 1'b0; chan_sel = 1'b0;
    #5;
    check(anr, 1'b1, "forced reset sets analog reset");
    take_event = 1'b0;  // release: channel auto-resets once
    #50;
    // untaken event: auto reset after the one-shot (300 ns)
    n_anr = 0;
    cfd();
    check(hit, 1'b1, "hit");
    check(anr, 1'b0, "analog reset cleared by event");
    #200;
    check(hit, 1'b1, "hit during one-shot");
    #120;
    check(hit, 1'b0, "auto reset after one-shot");
    check(ar, 1'b1, "auto_reset flag");
    check(anr, 1'b1, "analog reset raised");
    #150;
    check(8'(n_anr), 8'd1, "one analog reset pulse");
    // acq_all qualifies without CFD
    acq_all = 1'b1; #25;
    check(hit, 1'b1, "acq_all qualifies");
    acq_all = 1'b0;
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
