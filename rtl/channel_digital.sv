// channel_digital: digital logic of one signal channel.
//
// Qualification: a CFD firing counts as an event only if the channel is
// enabled both globally (global_ena) and locally (bit 6 of its DAC
// register); acq_all makes every enabled channel qualify without a CFD.
// qualified_cfd leaves the module to an analog narrow pulse generator, and
// the returned pulse, qualified_cfd_narrow, drives everything else:
//   - hit_register sets the channel's hit flag;
//   - tvc_digital starts the TVC until common_stop;
//   - the analog one-shot outside starts, and auto_reset_gen raises
//     auto_reset when it ends without take_event;
//   - analog_reset_gen clears analog_reset, which is set again by an auto
//     or forced reset.
// auto_reset, analog_reset_async_set and analog_reset each go out to a
// narrow pulse generator; the first two pulses come back in. dac_digital
// holds the threshold, polarity and local enable.
// The sub-blocks and their connections follow the design's channel
// schematic; the gates forming qualified_cfd are read from that drawing.
`timescale 1ns / 1ps
module channel_digital
  import hinp_pkg::*;
(
  input  logic       reset_L,
  input  logic       stb_L,
  input  logic [7:0] data,
  input  logic       chan_sel,
  input  logic       load_dac,
  input  logic       read_dac,
  input  logic       force_reset,
  input  logic       take_event,
  input  logic       global_ena,
  input  logic       acq_all,
  input  logic       common_stop,
  input  logic       cfd_out,
  // loops through the analog pulse circuits
  output logic       qualified_cfd,
  input  logic       qualified_cfd_narrow,
  input  logic       vari_one_shot,
  output logic       auto_reset,
  input  logic       auto_reset_narrow,
  output logic       analog_reset_async_set,
  input  logic       analog_reset_async_set_narrow,
  output logic       analog_reset,
  // results
  output logic       hit,
  output logic       dont_charge_cap_L,
  output logic       charge_cap_L,
  output dac_reg_t   dac_reg,
  output logic [7:0] bus_out,
  output logic       bus_oe
);

  assign qualified_cfd = global_ena && dac_reg.local_ena && (acq_all || cfd_out);

  hit_register u_hit_register (
    .stb_L                (stb_L),
    .reset_L              (reset_L),
    .qualified_cfd_narrow (qualified_cfd_narrow),
    .auto_reset_narrow    (auto_reset_narrow),
    .force_reset          (force_reset),
    .chan_sel             (chan_sel),
    .hit                  (hit)
  );

  auto_reset_gen u_auto_reset_gen (
    .reset_L              (reset_L),
    .vari_one_shot        (vari_one_shot),
    .take_event           (take_event),
    .qualified_cfd_narrow (qualified_cfd_narrow),
    .auto_reset           (auto_reset)
  );

  analog_reset_gen u_analog_reset_gen (
    .auto_reset                    (auto_reset),
    .force_reset                   (force_reset),
    .chan_sel                      (chan_sel),
    .qualified_cfd_narrow          (qualified_cfd_narrow),
    .analog_reset_async_set_narrow (analog_reset_async_set_narrow),
    .analog_reset_async_set        (analog_reset_async_set),
    .analog_reset                  (analog_reset)
  );

  tvc_digital u_tvc_digital (
    .reset_L              (reset_L),
    .qualified_cfd_narrow (qualified_cfd_narrow),
    .common_stop          (common_stop),
    .force_reset          (force_reset),
    .chan_sel             (chan_sel),
    .dont_charge_cap_L    (dont_charge_cap_L),
    .charge_cap_L         (charge_cap_L)
  );

  dac_digital u_dac_digital (
    .stb_L    (stb_L),
    .reset_L  (reset_L),
    .data     (data),
    .chan_sel (chan_sel),
    .load_dac (load_dac),
    .read_dac (read_dac),
    .dac_reg  (dac_reg),
    .bus_out  (bus_out),
    .bus_oe   (bus_oe)
  );

endmodule
