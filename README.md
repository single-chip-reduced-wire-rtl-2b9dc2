# Reduced-wire front end for a 64-element intracardiac ultrasound catheter

A catheter for intracardiac echocardiography (ICE) has to run its signals through a shaft only
a few millimetres wide. Connecting each of 64 transducer elements straight to the ultrasound
system would take more than 64 conductors. This design puts the front end under the transducer
on one chip. An on-chip transmit beamformer makes all 64 firing pulses from a profile sent over
**one serial data line**. Eight-to-one **analog time-division multiplexing (TDM)** brings the 64
receive channels down to **8 outputs**. Clock, data, 8 signal outputs and a few supply, bias and
control wires are all the cable carries (22 conductors in the published system).

This repository holds SystemVerilog for that front end. The digital parts are synthesizable RTL:
the beamformer, its shift-register chain and counters, and the TDM slot counter. The analog parts
are real-valued behavioural models, so the whole chip can be simulated end to end: the 60 V
pulsers, the Tx/Rx switches, the variable-gain LNAs and the TDM sample-and-hold blocks. The
architecture follows the chip published by Jung et al. in "Single-Chip Reduced-Wire CMUT-on-CMOS
System for Intracardiac Echocardiography" (IEEE IUS 2018). That description leaves many details
open: the field layout of the profile, how the latch is made and the pulse-generator logic. Those
details are this design's own choices. Each is marked below and in the header comment of the file
concerned.

## Clock and headline numbers

| quantity | value | origin |
|---|---|---|
| system clock | 200 MHz (5 ns) | published |
| channels / elements | 64 | published |
| per-channel profile register | 16 bits | published |
| profile packet | 1040 bits = 5.2 us at one bit per clock | published |
| transmit delay | 11 bits: 0..2047 clocks = 0..10.235 us, 5 ns steps | published |
| pulses per firing | 1..8 (pulsed-wave Doppler) | published |
| pulser level | 60 V unipolar | published |
| LNA gains | 15, 21, 27, 32 dB (2-bit code) | published values, code order own |
| TDM | 8 blocks x 8 channels, 25 MS/s per channel | published |

## The programming chain

This is the part to understand first. All programmable state sits on **one long shift register**
that the data line clocks through one bit per clock:

```
data -> [ch 1: 16 b] -> [ch 2: 16 b] -> ... -> [ch 64: 16 b]
     -> [pulse count: 3 b] -> [mod value: 5 b] -> [Rx gain: 2 b] -> [start word: 6 b] -> comparator -> latch
```

64 x 16 + 3 + 5 + 2 + 6 = 1040 bits. The sender sends the bits that travel farthest first, each
field MSB first:

1. start word, `6'b101001` (`ice_pkg::SYNC_WORD`)
2. Rx gain code, 2 bits
3. mod value, 5 bits: the mod counter counts 0..mod value
4. pulse count, 3 bits: value p means p+1 pulses
5. channel 64's word, then channel 63's, ..., channel 1's word last

Each channel word (`ice_pkg::ch_profile_t`) is `{coarse[5:0], fine[4:0], width[4:0]}`:

- `coarse`: the delay in mod periods
- `fine`: the delay within a period, in clocks
- `width`: the pulse width in clocks, 0 = element off

**Latch.** Reset clears every register before a load. The start word therefore reaches its 6-bit
register exactly when all 1040 bits are in place. A comparator on that register then raises
`latch`. Its first-sent bit is 1, so a partly shifted word, with zeros left over from reset ahead
of it, cannot match early. `latch` is combinational. It goes high in the cycle after the 1040th
clock edge. It stops all shifting, which locks the profile, and starts the counters. It stays
high until the next reset. A packet with the wrong start word never latches.

The published chip has a 6-bit register feeding a 6-bit block labelled "CP" that makes the latch
signal. Reading CP as a comparator of a start word is this design's interpretation. So is the
order of the fields inside the channel word.

## Firing: coarse counter, mod counter and the pulse generators

After `latch`, `tx_counter11` runs two counters that all channels share:

- **mod counter** `mc` (5 bits) counts 0..mod value and wraps. The mod period is M = mod value + 1
  clocks, up to 32.
- **coarse counter** `cc` (6 bits) counts the wraps and saturates at 63.

With mod value 31, `{cc, mc}` is a plain 11-bit clock counter, so any delay from 0 to 2047 clocks
can be set. A smaller mod value makes the pulse repetition period shorter (multi-pulse Doppler
firing) and scales the coarse delay step by the same factor.

Each channel (`tx_channel`) compares the shared counts with its own word:

```
counter time t:  0 (latch cycle), 1, 2, ...
pulse k (k = 0..pc) starts when cc == coarse + k*(wraps) and mc == fine,
   i.e. at t_k = (coarse + k) * M + fine
pulser output: high for t in [t_k + 1, t_k + width]   (one clock of register delay)
```

The first pulse needs `cc == coarse && mc == fine`. Each later one starts when `mc` returns to
`fine`, until pc+1 pulses have gone out. A local 5-bit down-counter times the width. A width of 0
silences the element (pulse-width apodization). Choose `width < M` and `fine < M`. Otherwise
pulses merge, or the channel never fires.

Once `cc` reaches 63, a tail count lets the last channel finish its pulse train. The
**firing window** (`tx_active`) lasts exactly (64 + pc + 1) * M clocks. It opens the Tx/Rx
switches for that time. How the transmit period ends, the programmable modulus and the tail count
are this design's own choices. The published chip only gives the counter widths and what they are
for.

Example: a beam steered to +45 degrees and focused at 20 mm needs delays up to about 600 clocks
(3 us) over the 64-element, 104 um pitch aperture. That is well inside the 2047-clock range.

## Receive: Tx/Rx switch, VG-LNA and 8:1 TDM

Each element's receive path is `afe_channel`. The echo passes the Tx/Rx switch, which outputs 0 V
while `tx_active` is high, and then the VG-LNA. The LNA gain is the 2-bit code from the profile:
15/21/27/32 dB for codes 0..3. The LNA buffer is ideal. The gain is fixed for one loaded profile.
The published system steps it during the echo record for time-gain compensation, but the
mechanism behind that stepping is not specified, so it is not built here.

`tdm_ctrl` is a free-running 3-bit slot counter on the 200 MHz clock. It produces a one-hot
sample/hold select, so each channel is visited every 8 clocks (25 MS/s). `frame` marks slot 0.
All 8 `tdm_block`s use the same slot. Block b carries channels 8b..8b+7, in slot order. The block
samples the selected channel on the clock edge and holds it for one clock. So `tdm_out[b]` in the
cycle after an edge with slot k is channel 8b+k's voltage at that edge. The backend must
demultiplex with the same count. It uses `tdm_frame`, or link training, to find slot 0.

**Link training.** With `link_train` high (two flip-flops later), every TDM block sends
k x 0.1 V in slot k instead of channel data. The ramp lets the receiver find its best sampling
phase and number the slots. The training pattern is this design's own choice. The published chip
only says that a training switch exists for these two purposes.

## Module map

| file | kind | role |
|---|---|---|
| `rtl/ice_pkg.sv` | package | sizes, start word, profile structs, gain table |
| `rtl/ice_asic_top.sv` | top | beamformer + 64 AFE channels + TDM counter + 8 TDM blocks |
| `rtl/tx_beamformer.sv` | RTL | 64-channel chain plus global control |
| `rtl/tx_channel.sv` | RTL | 16-bit profile register and pulse generator |
| `rtl/tx_global_control.sv` | RTL | tail of the chain, start-word comparator, latch |
| `rtl/tx_counter11.sv` | RTL | mod/coarse counter and firing window |
| `rtl/tdm_ctrl.sv` | RTL | slot counter, S/H selects, training enable |
| `rtl/tdm_block.sv` | behavioural | 8-channel sample-and-hold multiplexer |
| `rtl/afe_channel.sv` | behavioural | pulser, Tx/Rx switch, VG-LNA of one element |
| `rtl/hv_pulser.sv`, `rtl/txrx_switch.sv`, `rtl/vg_lna.sv` | behavioural | the analog parts |

Top-level ports of `ice_asic_top`:

- inputs: `clk`, `rst_n` (asynchronous, active low), `data`, `link_train`, `echo_in[64]` (real,
  volts at each element)
- outputs: `pulser_out[64]` (real), `tdm_out[8]` (real), `latch`, `tx_active`, `rx_gain`,
  `tdm_slot`, `tdm_frame`

Not modelled:

- the transducer array
- the LVDS receivers: clock and data are single-ended
- the regulators and bandgap
- the high-frequency output buffers: ideal wires
- the backend: ADCs, FPGA demodulation and packet generation

## Simulating

Every testbench checks itself. Each ends by printing `TB_RESULT checks=N failures=M`. With
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
    rtl/ice_pkg.sv tb/ice_tb_pkg.sv tb/tb_ice_asic_top.sv --top-module tb_ice_asic_top
./obj_dir/Vtb_ice_asic_top
```

Swap in any other testbench name. `tb/ice_tb_pkg.sv` holds the reference model that the tests
share. It builds packets and predicts every pulse edge from the formula above.

- `tb_ice_asic_top`: the whole chip at full size, four firings. Covers:
  - a steered and focused beam
  - the maximum 2047-clock delay
  - an 8-pulse train
  - a 20-clock mod period
  - width-0 and mixed widths
  - all four gain codes
  - Tx/Rx isolation during a 60 V burst
  - TDM slot order and gain
  - link training

  It counts each of these and fails if one never happens.
- `tb_sector_scan`: 123 focused beams across +/-45 degrees. Each one is a full load and fire, with
  every element's edge and width checked. The largest delay is printed (about 600 clocks).
- `tb_tx_beamformer`, `tb_tx_channel`, `tb_tx_global_control`, `tb_tx_counter11`,
  `tb_tdm_ctrl`, `tb_tdm_block`, `tb_afe_channel`, `tb_hv_pulser`, `tb_txrx_switch`,
  `tb_vg_lna`: unit tests. They include the 1040-clock load time, the 25 MS/s slot rate and the
  window length.

All of them finish in seconds.

## Changing it

- The start word, the field widths and the channel count are in `ice_pkg`. `tx_beamformer` takes
  a channel-count parameter `N`. The top uses `ice_pkg::N_CH`, and its TDM grouping assumes a
  multiple of 8.
- The analog models use `real` and are for simulation only. A synthesis flow should take
  `tx_beamformer` and `tdm_ctrl` as its tops.
- `tdm_ctrl` has an assertion that the sample/hold select stays one-hot. It is gated by reset with
  `disable iff`. Lint therefore reports `rst_n` as used both asynchronously and synchronously.
  That is expected.
