# HINP5 configuration and readout logic

HINP5 is a 16-channel mixed-signal readout chip for silicon strip detectors. It is used
in heavy-ion nuclear physics. Each channel has a charge amplifier, shapers, a constant-fraction
discriminator (CFD) and a time-to-voltage converter (TVC). This repository holds the chip's
digital part in SystemVerilog. That part lets an FPGA on the detector board do four things:

* **configure** the analog circuits: 24 global configuration bits, plus a threshold and enable
  byte for each channel;
* **qualify and latch events**: a CFD firing in an enabled channel sets that channel's hit flag
  and starts its TVC;
* **clean up** without help: a channel whose event the FPGA does not accept within a
  programmable time resets itself;
* **read out** the channels that fired, one by one, over an 8-bit bus. A priority encoder
  gives the next channel's address. A forced reset of that channel moves the encoder on to the
  next one.

The logic has two parts. One **common channel** (`hinp_common`) decodes the bus and holds the
chip-wide state. Sixteen copies of the **channel logic** (`channel_digital`) sit next to each
channel's analog circuits. `hinp5_digital` wires the two parts together and is fully
synthesizable. `hinp5_top` adds behavioural models of the analog pulse circuits that the channel
logic loops through (narrow-pulse generators and a variable one-shot). It is the level at which
the whole chip's digital behaviour can be simulated.

## The controller interface

Every register in the chip takes its data at the **rising edge of `stb_L`**, the end of an
active-low strobe. No other clock exists. The signals that matter at that edge are
`ad_in[7:0]`, `write`, `load_ad_reg` and `force_reset`. Read data appears on `ad_out[7:0]`
combinationally. `drive_output_buffer` is high in every read cycle (`write = 0`) and turns the
chip's pad driver on.

An access takes two strobes:

1. With `load_ad_reg = 1`, a strobe loads `ad_reg = ad_in = {addr[3:0], x, mode[2:0]}`.
2. Later strobes act on the register that `mode` names. With `write = 1` the strobe writes
   `ad_in` into it. With `write = 0`, `ad_out` already shows it.

| mode | read (`write = 0`): `ad_out` =                         | write (`write = 1`) loads                |
|------|--------------------------------------------------------|------------------------------------------|
| 0    | `config_reg_0`                                         | `config_reg_0 <= ad_in`                  |
| 1    | `config_reg_1`                                         | `config_reg_1 <= ad_in`                  |
| 2    | `config_reg_2`                                         | `config_reg_2 <= ad_in`                  |
| 3    | `{addr_out, 4'b0}`, encoder looking at the **shadow** register | `addr <= ad_in[7:4]`             |
| 4    | `hit[7:0]`                                             | `shadow_reg[7:0] <= ad_in`               |
| 5    | `hit[15:8]`                                            | `shadow_reg[15:8] <= ad_in`              |
| 6    | DAC register of channel `addr` (through `common_bus`)  | DAC register of channel `addr` `<= ad_in`|
| 7    | `{addr_out, 4'b0}`, encoder looking at the **hit** flags | `addr <= ad_in[7:4]`                   |

`addr_out` is the channel the chip currently selects. It is also decoded one-hot into
`chan_sel[15:0]`, which tells each channel whether a DAC access or a forced reset is meant for
it:

* If `sel_ext_addr = 1`, or in mode 6, the selected channel is `ad_reg.addr`.
* Otherwise the priority encoder chooses it. The encoder returns the **lowest-numbered** set bit
  of its input. Its input is the shadow register during a read in mode 3, and the hit flags at
  all other times. If that input is empty, no channel is selected.

## Reading out an event

The readout uses the shadow register. This is the least obvious part of the design. The shadow
register is a 16-bit list of channels still to be read. The FPGA fills it, and the chip empties
it one channel at a time:

```
read mode 4, mode 5          -> hit pattern                     (which channels fired)
write mode 4, mode 5         -> shadow_reg = channels to read   (usually the hit pattern)
load ad_reg with mode 3, read
loop:
    ad_out[7:4]              -> lowest channel left in shadow_reg, chan_sel selects it
    (digitise that channel's analog outputs with the board ADC)
    strobe with force_reset=1:
        - the channel's bit in shadow_reg is cleared
        - the channel's hit flag is cleared                (hit_register)
        - its TVC is stopped and reset                      (tvc_digital)
        - an analog reset of the channel is requested       (analog_reset_gen)
until shadow_reg is empty (chan_sel = 0)
```

The shadow bit is cleared (`sync_reset`) only when all of these hold at the strobe:
`force_reset` is high, the encoder is looking at the shadow register (`sel_hit = 0`, a read in
mode 3), and it has found a channel. A forced reset in any other mode clears only the selected
channel's own hit flag, TVC and analog state.

The FPGA already knows how many channels fired, so it knows when to stop. The chip also ends
the list itself: once the list is empty, `chan_sel` is all zero and further forced resets do
nothing.

## Inside a signal channel

All channel state is driven by the channel's own events, not by the strobe. The channel logic
is therefore a small asynchronous circuit. Its timing comes from two kinds of analog circuit
outside the digital block: narrow-pulse generators and a one-shot.

```
cfd_out ──┐
acq_all ──┴─OR─┐
global_ena ────AND── qualified_cfd ──[narrow pulse]── qualified_cfd_narrow ──┬─ SET   hit_register
dac_reg[6] ────┘                                                              ├─ clk   tvc_digital (starts TVC)
(local enable)                                                                ├─ clr   auto_reset_gen
                                                                              ├─ clk   analog_reset_gen (clears)
                                                                              └─ trig  [variable one-shot]
```

* **Hit flag** (`hit_register`). A qualified pulse sets it. A strobe with `force_reset` and
  `chan_sel` clears it. `reset_L` or the auto-reset pulse clears it at once; a reset wins over a
  set.
* **TVC control** (`tvc_digital`). The qualified pulse sets a flop: `charge_cap_L` goes low and
  the TVC capacitor charges. `common_stop`, `reset_L`, or a forced reset of this channel clears
  the flop, and charging stops. Each channel's TVC voltage thus measures the time from its CFD
  to the common stop.
* **Auto reset** (`auto_reset_gen`). The qualified pulse also starts the variable one-shot. Its
  length is `(DLY_VC + 1) x 100 ns` in the model (see the last section). When the one-shot ends, its
  inverted output, gated by `~take_event`, clocks a 1 into `auto_reset`. A narrow pulse of
  `auto_reset` clears the hit flag. So an event the FPGA does not accept in time with
  `take_event` disappears by itself. Because of the `~take_event` gating, releasing
  `take_event` also produces that edge. Channels still holding an accepted event therefore
  reset themselves when the FPGA drops `take_event`.
* **Analog reset** (`analog_reset_gen`). An auto reset, or a forced reset of this channel,
  raises `analog_reset_async_set`. Its narrow pulse sets `analog_reset`, and the rising edge of
  `analog_reset` makes the reset pulse for the channel's analog circuits. That pulse is 100 ns or
  1 us, chosen by `DLY_VC4`. The next qualified pulse clears `analog_reset`, so it can be set
  again.
* **DAC register** (`dac_digital`). It holds the threshold, polarity and local enable. It is
  written in mode 6 when the channel is selected. In a mode-6 read, the selected channel drives
  it onto `common_bus`.

In `hinp5_top` the narrow-pulse generators are 10 ns wide (parameter `PULSE_NS`). The one-shot
step is 100 ns (`ONE_SHOT_STEP_NS`).

## Configuration bits

All registers reset to 0, which is the default setting of every field. The packed structs are
in `rtl/hinp_pkg.sv`.

| register | bits | field | meaning |
|---|---|---|---|
| config_reg_0 | 0 | use_even_pulser | 1: pulse the even channels |
| | 1 | use_odd_pulser | 1: pulse the odd channels |
| | 5:2 | nowlin_cap | one of 16 Nowlin delay capacitors, 0.5 to 8 pF |
| | 6 | nowlin_mode | 0: long (12–192 ns rise), 1: short (1–16 ns) |
| | 7 | buffer_bias_hg | high-gain buffer bias, 0: 50 mV, 1: 25 mV |
| config_reg_1 | 0 | buffer_bias_hg_pol | polarity of that bias |
| | 1, 2 | buffer_bias_lg, _pol | low-gain buffer bias and polarity |
| | 3, 4 | buffer_bias_tvc, _pol | TVC buffer bias and polarity |
| | 7:5 | agnd_tr | AGND trim, 1.4–1.8 V in 50 mV steps |
| config_reg_2 | 0 | tvc_2_usec | 1: 2 us TVC range, 0: 250 ns |
| | 1 | ext_charge_amp | 1: external charge amplifier |
| | 2 | holes | 0: electron, 1: hole collection |
| | 6:3 | dly_vc | auto-reset delay, one of 16 |
| | 7 | dly_vc4 | reset pulse 100 ns (0) or 1 us (1) |
| dac_reg (per channel) | 4:0 | threshold | CFD threshold |
| | 5 | polarity | 0: positive, 1: negative |
| | 6 | local_ena | 0: channel disabled |
| | 7 | unused | |

The names at config_reg_0 bit 0, config_reg_1 bits 1, 3 and 7 follow the pattern of their
neighbours.

## Modules

| file | role |
|---|---|
| `hinp_pkg.sv` | mode enum, ad_reg and configuration structs, `NUM_CHANNELS = 16` |
| `hinp5_top.sv` | chip top: `hinp5_digital` plus per-channel pulse/one-shot models, `or_out = \|hit` |
| `hinp5_digital.sv` | synthesizable top: common channel + 16 channels, read-back bus |
| `hinp_common.sv` | ad_reg, channel selection; instantiates the next five |
| `mode_decoder.sv` | write/mode → register enables, `load_dac`, `read_dac`, `drive_output_buffer` |
| `config_regs.sv` | config_reg_0..2 |
| `readout_mux.sv` | `ad_out` selection |
| `chan_addr_gen.sv` | hit/shadow selection and lowest-first priority encoder |
| `shadow_register.sv` | readout list with per-channel clear |
| `channel_digital.sv` | one channel: qualification; instantiates the next five |
| `hit_register.sv`, `tvc_digital.sv`, `auto_reset_gen.sv`, `analog_reset_gen.sv`, `dac_digital.sv` | channel sub-blocks described above |
| `narrow_pulse_gen.sv`, `vari_one_shot.sv` | behavioural (delay-based) models of analog circuits, not synthesizable |

The analog circuits themselves are not modelled: the charge amplifier, shapers, peak samplers,
pulser, CFD with its Nowlin delay, TVC and threshold DAC. `cfd_out` is an input. The
configuration bits, DAC registers, `charge_cap_L`/`dont_charge_cap_L` and `analog_reset_narrow`
are outputs for them.

## Simulating

Each module has a self-checking testbench, `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and ends. `tb_hinp5_top` runs the whole chip at its default
size. It goes through configuration, DAC load and read-back, an event that is not accepted (auto
reset), an accepted event read out through the shadow register, `acq_all`, the 1 us reset pulse,
and an event on all odd channels read out in the order 1, 3, ..., 15. It counts each of these
and fails if one never happened. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hinp_pkg.sv tb/tb_hinp5_top.sv --top-module tb_hinp5_top
./obj_dir/Vtb_hinp5_top
```

Replace `tb_hinp5_top` with any other testbench name to run that one. The package must come
first. All files use `timescale 1ns/1ps`. The testbenches need `--timing` because they use
delays, and so do the pulse models.

All state except `analog_reset` is cleared asynchronously when `reset_L` falls. Apart from
that, registers are clocked only by `stb_L` or by a channel pulse. A testbench therefore has to
drive `reset_L` from high to low once: starting with it low gives no edge, and the two-state
simulator starts registers at random values.

## How far this follows the original design, and where it departs

These parts are taken directly from the design's tables and schematics:

* the register map and mode table;
* the mode decoder outputs;
* the hit/shadow selection rule and the lowest-first encoder, which reproduces both worked
  examples (`1010_1010_1010_1010 → 0001`, `1010_1010_1010_1000 → 0011`);
* the shadow register's byte writes;
* the DAC register with its load and read enables;
* the structure of the hit register, TVC control, auto reset and analog reset flops: their data,
  clock, set and reset connections.

The gates that combine the enables are read from the schematics.

These are readings or choices of this design:

* **Strobe edge.** Rising edge of `stb_L`. The schematics draw the strobe as the clock but do
  not say which edge.
* **Loading ad_reg.** The original says `ad_reg = {addr, mode}` but not how it is loaded. Here
  the separate `load_ad_reg` input loads it. Writes in modes 3 and 7 replace only its address
  nibble.
* **`sel_ext_addr`.** The board routes this signal but its function is not described. Here it
  selects `ad_reg.addr` in place of the encoder. Mode 6 always uses `ad_reg.addr`, because the
  mode table writes "dac_reg(addr)".
* **Mode 6 read.** The mode table gives 0, the multiplexer drawing gives `common_bus`. This
  design returns `common_bus`, because the DAC read-back path exists only for this read.
* **Modes 3/7 read.** The drawing puts the address in the low nibble, the table in the high
  nibble. This design follows the table, which matches where a write takes the address from.
* **Shadow clear.** The drawing labels the shadow flops' input "SET" but names the signal
  `sync_reset`. This design clears the bit, which is what makes the readout walk work. The exact
  clear condition (force_reset, a valid address, shadow being encoded) is this design's.
* **Tri-state buses.** The internal tri-state `common_bus` is an AND-OR. The bidirectional pad
  bus is split into `ad_in`, `ad_out` and `drive_output_buffer`.
* **`mode[3]`** is not decoded.
* **Extra resets.** `reset_L` also clears `auto_reset`. The drawing shows only the event pulse
  on that flop.
* **Ports left out.** `leave_reset`, `spl_chan` and `read_chan` appear in the channel's port
  list without a described function. They are left out.
* **One-shot lengths.** The 16 lengths are `(DLY_VC + 1) x 100 ns`. Only their number is
  specified.
* **Pulse widths.** The narrow-pulse width is 10 ns. The 100 ns / 1 us choice of `DLY_VC4` is
  applied to the analog reset pulse; the original calls it "the digital reset".
* **`or_out`** is the OR of the hit flags. The board routes an `OR_OUT` signal, but its logic is
  not given.
