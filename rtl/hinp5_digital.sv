// hinp5_digital: all synthesizable configuration and readout logic of the
// chip: one common channel (hinp_common) serving sixteen signal channels
// (channel_digital).
//
// The common channel decodes the controller's strobes, keeps the
// configuration and the readout list, and selects one channel at a time
// (chan_sel). Every channel receives the same data byte, load/read strobes,
// force_reset and event controls; the selected one acts on them. The
// channels return their hit flags to the common channel and, for a DAC
// read, their DAC register over common_bus. The design draws common_bus as
// a tri-state bus; here it is the OR of the channels' gated drive, which is
// the same value since at most one channel is selected. The loops through
// the analog narrow pulse generators and one-shots are ports of this
// module, one bit per channel.
`timescale 1ns / 1ps
module hinp5_digital
  import hinp_pkg::*;
(
  // controller interface
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
  output logic [NUM_CHANNELS-1:0] chan_sel,
  // configuration to the analog circuits
  output cr0_t                    cr0,
  output cr1_t                    cr1,
  output cr2_t                    cr2,
  output dac_reg_t                dac_reg [NUM_CHANNELS],
  // per-channel analog signals
  input  logic [NUM_CHANNELS-1:0] cfd_out,
  output logic [NUM_CHANNELS-1:0] qualified_cfd,
  input  logic [NUM_CHANNELS-1:0] qualified_cfd_narrow,
  input  logic [NUM_CHANNELS-1:0] vari_one_shot,
  output logic [NUM_CHANNELS-1:0] auto_reset,
  input  logic [NUM_CHANNELS-1:0] auto_reset_narrow,
  output logic [NUM_CHANNELS-1:0] analog_reset_async_set,
  input  logic [NUM_CHANNELS-1:0] analog_reset_async_set_narrow,
  output logic [NUM_CHANNELS-1:0] analog_reset,
  output logic [NUM_CHANNELS-1:0] dont_charge_cap_L,
  output logic [NUM_CHANNELS-1:0] charge_cap_L
);

  logic       load_dac;
  logic       read_dac;
  logic [7:0] common_bus;
  logic [7:0] bus_out [NUM_CHANNELS];
  logic [NUM_CHANNELS-1:0] bus_oe;

  hinp_common u_common (
    .reset_L             (reset_L),
    .stb_L               (stb_L),
    .write               (write),
    .load_ad_reg         (load_ad_reg),
    .sel_ext_addr        (sel_ext_addr),
    .force_reset         (force_reset),
    .ad_in               (ad_in),
    .ad_out              (ad_out),
    .drive_output_buffer (drive_output_buffer),
    .hit                 (hit),
    .common_bus          (common_bus),
    .chan_sel            (chan_sel),
    .load_dac            (load_dac),
    .read_dac            (read_dac),
    .cr0                 (cr0),
    .cr1                 (cr1),
    .cr2                 (cr2)
  );

  for (genvar i = 0; i < NUM_CHANNELS; i++) begin : g_ch
    channel_digital u_channel (
      .reset_L                       (reset_L),
      .stb_L                         (stb_L),
      .data                          (ad_in),
      .chan_sel                      (chan_sel[i]),
      .load_dac                      (load_dac),
      .read_dac                      (read_dac),
      .force_reset                   (force_reset),
      .take_event                    (take_event),
      .global_ena                    (global_ena),
      .acq_all                       (acq_all),
      .common_stop                   (common_stop),
      .cfd_out                       (cfd_out[i]),
      .qualified_cfd                 (qualified_cfd[i]),
      .qualified_cfd_narrow          (qualified_cfd_narrow[i]),
      .vari_one_shot                 (vari_one_shot[i]),
      .auto_reset                    (auto_reset[i]),
      .auto_reset_narrow             (auto_reset_narrow[i]),
      .analog_reset_async_set        (analog_reset_async_set[i]),
      .analog_reset_async_set_narrow (analog_reset_async_set_narrow[i]),
      .analog_reset                  (analog_reset[i]),
      .hit                           (hit[i]),
      .dont_charge_cap_L             (dont_charge_cap_L[i]),
      .charge_cap_L                  (charge_cap_L[i]),
      .dac_reg                       (dac_reg[i]),
      .bus_out                       (bus_out[i]),
      .bus_oe                        (bus_oe[i])
    );
  end

  // Read-back bus: at most one channel drives it.
  always_comb begin
    common_bus = '0;
    for (int i = 0; i < NUM_CHANNELS; i++) common_bus |= bus_out[i];
  end

  always_comb assert ($onehot0(bus_oe));

endmodule
