// hinp5_top: configuration and readout electronics of the HINP5 chip, with
// behavioural models of the analog pulse circuits that its channel logic
// loops through. Not synthesizable as a whole: hinp5_digital is the
// synthesizable part.
//
// What the chip does. Sixteen channels of a silicon strip detector each
// have a CFD (timing discriminator), a TVC (time-to-voltage converter) and
// energy shapers. The digital logic configures them (24 configuration bits
// and a DAC register per channel), flags which channels fired (hit), starts
// and stops the TVCs, resets channels whose event the controller does not
// take, and lets the controller read the fired channels out one by one over
// an 8-bit bus.
//
// Per channel this module adds:
//   - narrow pulse generators after qualified_cfd, auto_reset and
//     analog_reset_async_set (WIDTH_NS wide) and after analog_reset (100 ns
//     or 1 us, picked by config bit DLY_VC4), the last giving
//     analog_reset_narrow to the analog channel;
//   - the variable one-shot, started by qualified_cfd_narrow, whose length
//     DLY_VC[3:0] selects.
// or_out is the OR of the sixteen hit flags (the board routes an OR_OUT
// signal; its logic is this design's reading of the name).
//
// Interface timing: see hinp_common. Every register takes its data at the
// rising edge of stb_L; ad_out follows ad_reg, the registers and the hit
// flags combinationally.
`timescale 1ns / 1ps
module hinp5_top
  import hinp_pkg::*;
#(
  parameter realtime PULSE_NS        = 10.0,
  parameter realtime ONE_SHOT_STEP_NS = 100.0
) (
  input  logic                    reset_L,
  input  logic                    stb_L,
  input  logic                    write,
  input  logic                    load_ad_reg,
  input  logic                    sel_ext_addr,
  input  logic                    force_reset,
  input  logic                    take_event,
  input  logic                    acq_all,
  input  logic                    global_ena,
  input  logic                    common_stop,
  input  logic [7:0]              ad_in,
  output logic [7:0]              ad_out,
  output logic                    drive_output_buffer,
  output logic [NUM_CHANNELS-1:0] hit,
  output logic                    or_out,
  output logic [NUM_CHANNELS-1:0] chan_sel,
  output cr0_t                    cr0,
  output cr1_t                    cr1,
  output cr2_t                    cr2,
  output dac_reg_t                dac_reg [NUM_CHANNELS],
  input  logic [NUM_CHANNELS-1:0] cfd_out,
  output logic [NUM_CHANNELS-1:0] analog_reset_narrow,
  output logic [NUM_CHANNELS-1:0] dont_charge_cap_L,
  output logic [NUM_CHANNELS-1:0] charge_cap_L
);

  logic [NUM_CHANNELS-1:0] qualified_cfd;
  logic [NUM_CHANNELS-1:0] qualified_cfd_narrow;
  logic [NUM_CHANNELS-1:0] vari_one_shot_q;
  logic [NUM_CHANNELS-1:0] auto_reset;
  logic [NUM_CHANNELS-1:0] auto_reset_narrow;
  logic [NUM_CHANNELS-1:0] analog_reset_async_set;
  logic [NUM_CHANNELS-1:0] analog_reset_async_set_narrow;
  logic [NUM_CHANNELS-1:0] analog_reset;

  hinp5_digital u_digital (
    .reset_L                       (reset_L),
    .stb_L                         (stb_L),
    .write                         (write),
    .load_ad_reg                   (load_ad_reg),
    .sel_ext_addr                  (sel_ext_addr),
    .force_reset                   (force_reset),
    .take_event                    (take_event),
    .acq_all                       (acq_all),
    .global_ena                    (global_ena),
    .common_stop                   (common_stop),
    .ad_in                         (ad_in),
    .ad_out                        (ad_out),
    .drive_output_buffer           (drive_output_buffer),
    .hit                           (hit),
    .chan_sel                      (chan_sel),
    .cr0                           (cr0),
    .cr1                           (cr1),
    .cr2                           (cr2),
    .dac_reg                       (dac_reg),
    .cfd_out                       (cfd_out),
    .qualified_cfd                 (qualified_cfd),
    .qualified_cfd_narrow          (qualified_cfd_narrow),
    .vari_one_shot                 (vari_one_shot_q),
    .auto_reset                    (auto_reset),
    .auto_reset_narrow             (auto_reset_narrow),
    .analog_reset_async_set        (analog_reset_async_set),
    .analog_reset_async_set_narrow (analog_reset_async_set_narrow),
    .analog_reset                  (analog_reset),
    .dont_charge_cap_L             (dont_charge_cap_L),
    .charge_cap_L                  (charge_cap_L)
  );

  assign or_out = |hit;

  for (genvar i = 0; i < NUM_CHANNELS; i++) begin : g_analog
    narrow_pulse_gen #(.WIDTH_NS(PULSE_NS)) u_npg_cfd (
      .in_sig (qualified_cfd[i]), .wide (1'b0), .out_pulse (qualified_cfd_narrow[i]));
    narrow_pulse_gen #(.WIDTH_NS(PULSE_NS)) u_npg_auto (
      .in_sig (auto_reset[i]), .wide (1'b0), .out_pulse (auto_reset_narrow[i]));
    narrow_pulse_gen #(.WIDTH_NS(PULSE_NS)) u_npg_set (
      .in_sig (analog_reset_async_set[i]), .wide (1'b0), .out_pulse (analog_reset_async_set_narrow[i]));
    narrow_pulse_gen #(.USE_SELECT(1'b1)) u_npg_analog (
      .in_sig (analog_reset[i]), .wide (cr2.dly_vc4), .out_pulse (analog_reset_narrow[i]));
    vari_one_shot #(.STEP_NS(ONE_SHOT_STEP_NS)) u_one_shot (
      .trig (qualified_cfd_narrow[i]), .dly (cr2.dly_vc), .one_shot_out (vari_one_shot_q[i]));
  end

endmodule
