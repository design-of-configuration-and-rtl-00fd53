// hinp_pkg: types and constants shared by the HINP5 configuration and
// readout logic.
//
// The chip talks to its controller over an 8-bit data bus. A byte held in
// ad_reg, {addr, mode}, says what the next strobe does: mode[2:0] picks one
// of eight registers and the write line says whether it is written from the
// bus or read back onto it. The field layouts of the three configuration
// registers and of the per-channel DAC register follow the bit tables of the
// design; where a table leaves a bit unnamed the name follows the pattern of
// its neighbours.
`timescale 1ns / 1ps
package hinp_pkg;

  // Number of signal channels served by one common channel.
  localparam int unsigned NUM_CHANNELS = 16;
  localparam int unsigned ADDR_W       = $clog2(NUM_CHANNELS);  // channel address width

  // mode[2:0] of ad_reg. Read and write meaning per code (write=0 / write=1):
  //   MODE_CR0..2   : read / write config_reg_0..2
  //   MODE_ADDR     : read {addr_out, 4'b0} with the shadow register encoded /
  //                   write addr_in from ad_in[7:4]
  //   MODE_HIT_LO   : read hit[7:0]  / write shadow_reg[7:0]
  //   MODE_HIT_HI   : read hit[15:8] / write shadow_reg[15:8]
  //   MODE_DAC      : read the selected channel's DAC register / write it
  //   MODE_ADDR_ALT : read {addr_out, 4'b0} with the hit register encoded /
  //                   write addr_in from ad_in[7:4]
  typedef enum logic [2:0] {
    MODE_CR0      = 3'd0,
    MODE_CR1      = 3'd1,
    MODE_CR2      = 3'd2,
    MODE_ADDR     = 3'd3,
    MODE_HIT_LO   = 3'd4,
    MODE_HIT_HI   = 3'd5,
    MODE_DAC      = 3'd6,
    MODE_ADDR_ALT = 3'd7
  } mode_e;

  // ad_reg: channel address in the upper nibble, mode in the lower nibble.
  typedef struct packed {
    logic [3:0] addr;
    logic       mode_msb;   // decoded by nothing
    mode_e      mode;
  } ad_reg_t;

  // config_reg_0 (bit 7 first in a packed struct).
  typedef struct packed {
    logic       buffer_bias_hg;   // 7: 0 = 50 mV, 1 = 25 mV
    logic       nowlin_mode;      // 6: 0 = long (12-192 ns), 1 = short (1-16 ns)
    logic [3:0] nowlin_cap;       // 5:2 one of 16 capacitors, 0.5 pF to 8 pF
    logic       use_odd_pulser;   // 1: pulse the odd channels
    logic       use_even_pulser;  // 0: pulse the even channels
  } cr0_t;

  // config_reg_1.
  typedef struct packed {
    logic [2:0] agnd_tr;              // 7:5 AGND trim, 1.4 V to 1.8 V in 50 mV steps
    logic       buffer_bias_tvc_pol;  // 4
    logic       buffer_bias_tvc;      // 3: 0 = 50 mV, 1 = 25 mV
    logic       buffer_bias_lg_pol;   // 2
    logic       buffer_bias_lg;       // 1: 0 = 50 mV, 1 = 25 mV
    logic       buffer_bias_hg_pol;   // 0
  } cr1_t;

  // config_reg_2.
  typedef struct packed {
    logic       dly_vc4;        // 7: width of the reset pulse, 100 ns or 1 us
    logic [3:0] dly_vc;         // 6:3 one of 16 auto-reset delays
    logic       holes;          // 2: 0 = electron, 1 = hole collection
    logic       ext_charge_amp; // 1: 0 = internal, 1 = external charge amplifier
    logic       tvc_2_usec;     // 0: 1 = 2 us TVC range, 0 = 250 ns
  } cr2_t;

  // Per-channel DAC register.
  typedef struct packed {
    logic       unused;     // 7
    logic       local_ena;  // 6: 0 = channel disabled locally
    logic       polarity;   // 5: 0 = positive, 1 = negative
    logic [4:0] threshold;  // 4:0 CFD threshold
  } dac_reg_t;

endpackage
