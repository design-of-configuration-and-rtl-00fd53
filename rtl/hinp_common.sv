// hinp_common: the common channel of the chip, shared by its sixteen signal
// channels. It is the chip's side of the controller interface.
//
// Interface. The controller drives ad_in, write, load_ad_reg, force_reset
// and sel_ext_addr and pulses the active-low strobe stb_L; every register
// here takes its data at the rising edge of stb_L. A strobe with load_ad_reg
// high loads ad_reg = {addr, mode} from ad_in. Later strobes then act on the
// register that mode names: a write (write = 1) loads it from ad_in, a read
// (write = 0) returns it on ad_out, combinationally, with
// drive_output_buffer high to turn the chip's output buffer on.
//
// Channel addressing. The priority encoder (chan_addr_gen) gives the lowest
// hit channel, or the lowest channel left in the shadow register while mode
// 3 is read. With sel_ext_addr high, and always in mode 6 (DAC access),
// the channel is instead the address nibble of ad_reg, written by
// load_ad_reg or by a write in mode 3 or 7.
// The chosen address is returned by reads of mode 3/7 and decoded one-hot
// into chan_sel, which tells a channel that a DAC access or a forced reset
// is meant for it.
//
// Readout of an event. Write the channels to be read (usually the hit
// pattern read in modes 4 and 5) into the shadow register, then repeat:
// read mode 3 to learn the channel address, digitise that channel, and
// strobe with force_reset high. That strobe clears the channel's hit flag
// and its bit in the shadow register and resets its analog part, and the
// encoder moves to the next channel.
//
// Follows the design: registers, mode table, encoder, shadow register,
// hit/shadow selection. This design's own choices: the load_ad_reg input
// and the use of sel_ext_addr (the design names the signal but does not
// describe it), addressing DAC accesses by ad_reg's address nibble, gating chan_sel with valid_addr, and the rising strobe edge.
`timescale 1ns / 1ps
module hinp_common
  import hinp_pkg::*;
(
  input  logic                    reset_L,
  input  logic                    stb_L,
  input  logic                    write,
  input  logic                    load_ad_reg,
  input  logic                    sel_ext_addr,
  input  logic                    force_reset,
  input  logic [7:0]              ad_in,
  output logic [7:0]              ad_out,
  output logic                    drive_output_buffer,
  // to and from the signal channels
  input  logic [NUM_CHANNELS-1:0] hit,
  input  logic [7:0]              common_bus,
  output logic [NUM_CHANNELS-1:0] chan_sel,
  output logic                    load_dac,
  output logic                    read_dac,
  // configuration bits to the analog circuits
  output cr0_t                    cr0,
  output cr1_t                    cr1,
  output cr2_t                    cr2
);

  localparam int unsigned AW = ADDR_W;

  ad_reg_t                 ad_reg;
  logic [2:0]              en_cr;
  logic [1:0]              en_sr;
  logic [NUM_CHANNELS-1:0] shadow_reg;
  logic                    sel_hit;
  logic [AW-1:0]           enc_addr;
  logic                    valid_addr;
  logic [AW-1:0]           addr_out;
  logic                    write_addr;
  logic                    use_ext_addr;

  // ad_reg: loaded whole by load_ad_reg; the address nibble alone by a
  // write in mode 3 or 7 (addr_in).
  assign write_addr = write && (ad_reg.mode == MODE_ADDR || ad_reg.mode == MODE_ADDR_ALT);

  always_ff @(posedge stb_L or negedge reset_L) begin
    if (!reset_L)         ad_reg <= '0;
    else if (load_ad_reg) ad_reg <= ad_reg_t'(ad_in);
    else if (write_addr)  ad_reg.addr <= ad_in[7:4];
  end

  mode_decoder u_mode_decoder (
    .mode                (ad_reg.mode),
    .write               (write),
    .en_cr               (en_cr),
    .en_sr               (en_sr),
    .load_dac            (load_dac),
    .read_dac            (read_dac),
    .drive_output_buffer (drive_output_buffer)
  );

  config_regs u_config_regs (
    .stb_L   (stb_L),
    .reset_L (reset_L),
    .en_cr   (en_cr),
    .ad_in   (ad_in),
    .cr0     (cr0),
    .cr1     (cr1),
    .cr2     (cr2)
  );

  chan_addr_gen #(.NUM_CHANNELS(NUM_CHANNELS)) u_chan_addr_gen (
    .hit        (hit),
    .shadow_reg (shadow_reg),
    .mode       (ad_reg.mode),
    .write      (write),
    .sel_hit    (sel_hit),
    .addr       (enc_addr),
    .valid_addr (valid_addr)
  );

  shadow_register #(.NUM_CHANNELS(NUM_CHANNELS)) u_shadow_register (
    .stb_L       (stb_L),
    .reset_L     (reset_L),
    .ad_in       (ad_in),
    .en_sr       (en_sr),
    .force_reset (force_reset),
    .addr        (enc_addr),
    .valid_addr  (valid_addr),
    .sel_hit     (sel_hit),
    .shadow_reg  (shadow_reg)
  );

  // DAC accesses (mode 6) always address the channel named in ad_reg.
  assign use_ext_addr = sel_ext_addr || ad_reg.mode == MODE_DAC;
  assign addr_out     = use_ext_addr ? ad_reg.addr[AW-1:0] : enc_addr;

  always_comb begin
    chan_sel = '0;
    if (use_ext_addr || valid_addr) chan_sel[addr_out] = 1'b1;
  end

  // At most one channel is selected.
  always_comb assert ($onehot0(chan_sel));

  readout_mux u_readout_mux (
    .mode       (ad_reg.mode),
    .cr0        (cr0),
    .cr1        (cr1),
    .cr2        (cr2),
    .addr_out   (addr_out),
    .hit_reg    (hit),
    .common_bus (common_bus),
    .ad_out     (ad_out)
  );

endmodule
