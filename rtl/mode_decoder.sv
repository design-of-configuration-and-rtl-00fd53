// mode_decoder: turns the mode nibble of ad_reg and the write line into the
// enables of the common channel's registers and of the channels' DAC
// registers.
//
// Purely combinational. A write in mode 0, 1 or 2 enables config_reg_0..2,
// a write in mode 4 or 5 enables the lower or upper byte of the shadow
// register, a write in mode 6 loads the selected channel's DAC register and
// a read in mode 6 puts that register on the read-back bus. Modes 3 and 7
// enable nothing here: they address the channel-address logic. These
// decodings follow the design's table of operating modes. mode[3] is not
// decoded, and drive_output_buffer (the enable of the chip's data-bus output
// buffer) is simply asserted in every read cycle; both are this design's
// choices.
`timescale 1ns / 1ps
module mode_decoder
  import hinp_pkg::*;
(
  input  logic [2:0] mode,
  input  logic       write,
  output logic [2:0] en_cr,               // en_cr0, en_cr1, en_cr2
  output logic [1:0] en_sr,               // en_sr0 (lower), en_sr1 (upper)
  output logic       load_dac,
  output logic       read_dac,
  output logic       drive_output_buffer
);

  mode_e m;
  assign m = mode_e'(mode);

  always_comb begin
    en_cr    = '0;
    en_sr    = '0;
    load_dac = 1'b0;
    read_dac = 1'b0;
    unique case (m)
      MODE_CR0:    en_cr[0] = write;
      MODE_CR1:    en_cr[1] = write;
      MODE_CR2:    en_cr[2] = write;
      MODE_HIT_LO: en_sr[0] = write;
      MODE_HIT_HI: en_sr[1] = write;
      MODE_DAC: begin
        load_dac = write;
        read_dac = !write;
      end
      default: ;  // MODE_ADDR, MODE_ADDR_ALT
    endcase
    drive_output_buffer = !write;
  end

  // Write enables are mutually exclusive.
  always_comb assert ($onehot0({en_cr, en_sr, load_dac}));

endmodule
