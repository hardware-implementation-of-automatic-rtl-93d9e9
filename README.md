# Stereo automatic gain controller for active hearing protectors

An active hearing protector is an ear muff with a microphone outside each
cup and a small speaker inside. It plays the outside world into the ear, so
the wearer can still hear speech and warning signals. It must never play a
sound loud enough to harm hearing. This design is the digital core that sits
between the microphones and the speakers. It lets quiet and moderate sound
through unchanged and turns loud sound down until the level at the ear stays
at a fixed safe limit. Both ears always get the same gain, set by the louder
side, so the wearer can still tell where a sound comes from.

The core processes one sample at a time and returns it before the next one
arrives, so the only delay it adds is a fraction of one sample period. All
arithmetic in a channel runs on one 32x16 multiplier and one 48-bit adder,
shared in time by a state machine, which keeps the silicon small. A sample
takes 58 clock cycles, so 48 kHz audio needs a clock of at least 2.8 MHz and
8 kHz audio needs 464 kHz.

Two top levels are provided:

* `agc_stereo`: the chip core. Two channels and a shared gain table, with a
  bit-serial sample interface: four signal pins per ear, plus clock and
  reset.
* `agc_fpga_top`: a complete FPGA test platform. It is the chip core plus an
  AC'97 codec link controller and a state machine that keeps the codec's
  registers configured. Switches give reset, AGC bypass and headphone
  volume.

A third core, `agc_stereo_parallel`, is the same algorithm built without
sharing. It has separate filter and gain blocks with their own
multipliers, takes 16 cycles per sample and uses word-wide sample ports.

## What happens to one sample

Per channel, in order:

1. **High-pass filter.** A first-order IIR,
   `y = b0·x + b1·x(n-1) − a1·y(n-1)`. It removes low-frequency rumble
   such as wind noise. The coefficients are scaled by 2^15:
   b0 = 32250, b1 = −32250, −a1 = +31736. The sum is shifted right by 15.
2. **Equaliser.** A second-order IIR that limits the band to about 4 kHz.
   Its coefficients are scaled by only 2^8 so that each fits a 16-bit
   operand: b0 = 27742, b1 = −156, b2 = −27561, −a1 = +156, −a2 = +75. The
   sum is shifted right by 8 and stored as the filter's output history.
   This filter has a gain of roughly 100 to 170, so its output is then
   shifted right by 7 more (÷128) and limited to ±32767. That damped,
   limited sample, called `x_eq`, is what the rest of the channel measures
   and what the gain is finally applied to.
3. **Level tracking.** See the next section. The result, `P_weighted`, is a
   32-bit power.
4. **Decibels.** `P_weighted` is rounded to a whole number of dB, 3 to 93,
   or 0 below that, by a chain of comparators.
5. **Gain.** The channel sends its dB level to the shared gain table and
   gets back a 16-bit gain, where 0x8000 is 1.0.
6. **Output.** `x_eq × gain`, shifted right by 15, is sent out serially.

All right shifts are arithmetic, rounding toward minus infinity.

## Level tracking: fast attack, slow release

Loud sounds must be caught within a millisecond, but the gain must not
pump up and down with every cycle of the waveform. The channel therefore
keeps two power estimates:

* `P_w_fast` is a one-pole average of `|x|²`:
  `P_w_fast = (1 − α)·P_w_fast(n−1) + α·|x|²`, with α = 683/32768 ≈ 1/48.
  Its time constant is 48 samples, 1 ms at 48 kHz.
* `P_weighted` is the value used for the gain. When `P_w_fast` is above
  the previous `P_weighted`, it takes that value at once (the attack).
  Otherwise it keeps its previous value. In either case, if `P_w_fast`
  did not rise in this sample, `P_weighted` is also multiplied by
  (1 − β), with β = 2/32768. That is the release: a time constant of 16384
  samples, about 340 ms at 48 kHz, or 4.3 dB of gain recovery per time
  constant.

In practice, a burst of loud noise is attenuated within about a
millisecond. When it stops, the gain creeps back over seconds. A release
from 50 dB of attenuation back to unity takes about 3.5 s at 48 kHz. The
release runs only in samples where the fast estimate is not rising, so
during a steady tone, whose fast estimate ripples up and down, it releases
more slowly than in silence.

α and β are parameters (`ALPHA`, `BETA` on `agc_stereo` and
`agc_channel`, Q15). The values above are chosen for a 48 kHz sample rate.
At other sample rates the time constants scale with the sample period.

## The gain table

The table is a 128-entry ROM of 16-bit gains, indexed by level in dB. It is
computed at elaboration time from a formula in `agc_pkg`, so no data file is
needed. With the threshold T = 46 dB and the knee width W = 10 dB, the gain
in dB for level d is:

| level d                | gain g(d), dB                 |
|------------------------|-------------------------------|
| d ≤ T − W/2 (41)       | 0                             |
| 41 < d < 51            | −(d − 41)² / (2W), soft knee  |
| d ≥ T + W/2 (51)       | T − d                         |

The table stores `round(2^15 · 10^(g/20))`. Above the knee, the output
level is held at T. The 20 in the exponent matters: the level is a power,
but the gain multiplies the sample's amplitude, so the amplitude gain is the
square root of the power ratio.

Why 46 dB rather than 82 dB? The level the core computes is the
uncalibrated power of a 16-bit sample, 0 dB being a power of 1 LSB². With
the codec and microphones the design was developed with, a computed 46 dB
matched 82 dB(A) at the ear, the usual limit for hearing protection. For
other microphones, re-calibrate `THRESH`. The knee shape and its width are
this design's own choice; the only requirement is a smooth curve near the
threshold instead of a sharp corner.

The dB thresholds are `round(10^((d − 0.5)/10))` for d = 3 to 93. A power
above the threshold for d is at least d dB. For example, 1778279410 for
93 dB, 14125 for 42 dB and 2 for 3 dB.

## Two channels, one gain

`gain_lut` sits between the channels. When either channel raises its fetch
strobe, the table stores the larger of the two current dB levels. On the
next clock it reads the ROM at that level and presents the same gain to
both channels. The channel uses the gain two cycles after its fetch.

This is only correct if both channels reach the fetch in the same cycle.
Otherwise the second channel's fetch compares its new level with the other
side's level from the previous sample. Two things make this hold:

* Give both channels their start pulse in the same cycle. The FPGA top and
  the serial bridge do this.
* The channel's schedule has a fixed length. The release step (`P_DCR2`)
  costs one extra state. When it is skipped, a wait state (`P_ALIGN`) takes
  its place, so the fetch is always in the same cycle, whichever branch
  each side takes. Without it the two channels drift apart by a cycle
  whenever one side is releasing and the other is not. The table then
  pairs a fresh level with a stale one.

## The shared-datapath schedule

`agc_channel` is one state machine. The multiplier has registered operands
(`mult_src1` 32-bit, `mult_src2` 16-bit) and a registered 48-bit product.
A product is therefore ready two states after its operands are loaded. The
adder adds the newest product to its own registered sum. It either starts a
new sum or accumulates one product per state. States with a `_D` suffix are
waits for the pipeline.

| cycles | states | work |
|---|---|---|
| 1 | HOLD | wait for `i_start` |
| 16 | L_IN | shift in the sample, MSB first |
| 5 | HP1, HP_D, HP2, HP3, HP4 | three high-pass products, accumulated |
| 8 | EQ1, EQ_D, EQ2…EQ6, F_CALC | five equaliser products; store histories; ÷128 and limit |
| 6 | P_CURR, P_D, P_W1…P_W4 | \|x\|², (1−α)·P_w_fast(n−1), α·\|x\|²; new P_w_fast; start the β product |
| 2 | P_INCR or P_DCR1, then P_DCR2 or P_ALIGN | attack or hold, then release or wait |
| 1 | P_DB | register the dB level |
| 2 | F_GAIN, F_GAIN_D | fetch strobe, table read |
| 2 | GAIN, GAIN_D | x_eq × gain |
| 16 | L_OUT | shift out, MSB first, `o_done` on the LSB |

From the first input bit to the output LSB is 16 + 26 + 16 = 58 cycles. The
β product is started in P_W4, on the value that P_weighted is about to
take, while the multiplier is idle. The decision in P_INCR/P_DCR1 then only
chooses whether to use it. The previous-sample values P_w_fast(n−1) and
P_weighted(n−1) are updated in the first output cycle.

The power path is 32 bits: |x| ≤ 32767 after the limiter, so |x|² fits
below 2^31, and P_w_fast, as a weighted average, stays below that too.

## The unshared first version (`agc_stereo_parallel`)

The algorithm was first built without resource sharing, and that version
is included as an alternative core. Each ear gets three small state
machines in a chain: `hp_filter`, then `eq_filter`, then `agc_gain_stage`.
Each waits in HOLD for a start pulse. Each block's done pulse starts the
next block. Every multiply and add of a step has its own hardware, so a
filter needs only one compute cycle. The gain stage walks through the
algorithm one step per state: power, attack, max, release, dB, fetch, a
stall for the table read, multiply and send. The two gain stages share
`gain_lut` just as the channels of `agc_stereo` do.

| block | states | cycles from start to done |
|---|---|---|
| `hp_filter` | HOLD, CALC, SEND | 3 |
| `eq_filter` | HOLD, CALC, SEND | 3 |
| `agc_gain_stage` | HOLD, P_CURR, P_W1, P_W2, P_W3, P_DB, FETCH, WAIT, GAIN, SEND | 10 |

A sample takes 16 cycles in all. The original counts 15 for this version.
Samples enter and leave as 16-bit words, not serially. The arithmetic
differs from the shared core in one place. The equaliser keeps its
coefficients scaled by 2^15 (b0 = 3551068, b1 = −20015, b2 = −3527803,
a1 = −20015, a2 = −9657), not 2^8, and shifts its sum right by 15. These
23-bit constants are exactly why the shared core rescaled them: they do
not fit a 16-bit multiplier operand. So the two cores agree closely but
not bit for bit. The reference model covers both: `agc_ref_channel`
takes a third constructor argument that selects the 2^15 equaliser.

## Chip pad interface (`agc_stereo`)

Per ear: `i_*_start`, `i_*_serial`, `o_*_serial`, `o_*_done`.

* Pulse `start` high for one clock. The 16 sample bits follow on `serial`
  in the next 16 clocks, MSB first, two's complement.
* The result leaves on `o_*_serial` MSB first, in 16 consecutive clocks.
  `o_*_done` is high with the LSB, 58 clocks after the first input bit.
* The next `start` may come in the cycle after `o_*_done`, which allows up
  to one sample every 59 clocks. An assertion in `agc_channel` flags a
  start while a channel is busy.
* `rst_n` is an asynchronous active-low reset. It clears all filter and
  power history, so the gain after reset is 1.0.

## FPGA platform (`agc_fpga_top`)

Everything runs on the codec's 12.288 MHz AC'97 bit clock. The link
carries one 256-bit frame per 48 kHz sample period. Each frame has a 16-bit
tag slot and twelve 20-bit slots. Slot 1/2 carry a control-register write,
and slot 3/4 carry the left/right samples in both directions. Samples are
16 bits, in the top of the 20-bit slot.

* `ac97_controller` drives SYNC and the outgoing bits on the rising edge of
  the bit clock and samples the incoming bits on the falling edge. The
  falling edge is provided as an inverted copy of the clock, so that every
  flop is rising-edge triggered. The bit counter runs through the frame:
  * bit 253: it asks for the next register command;
  * end of bit 254: it latches that command and the output samples for the
    coming frame;
  * bit 255: SYNC rises, one bit before the tag, and stays high for 16 bit
    clocks;
  * bit 97: it hands the incoming samples over, if the codec's tag says it
    is ready and slots 3 and 4 are valid.
* `agc_serial_bridge` starts both AGC channels together on each new sample
  pair and collects the serial results. A sample read from the codec in one
  frame is sent back in the next. The AGC uses 59 of the 256 bit clocks.
* `codec_config` is a ring of seven register writes, one per frame, that
  repeats forever: headphone volume (0x04), microphone volume (0x0E),
  PCM-out volume (0x18), record gain (0x1C), DAC and ADC rates (0x2C, 0x32,
  48000 Hz) and miscellaneous control (0x76). Because the ring repeats, the
  switch settings are re-sent continuously and take effect without a codec
  reset.
  * Bypass swaps the muting: the microphone goes to the analogue mixer and
    out, and the ADC and DAC paths are muted.
  * The five volume switches set the attenuation of both headphone
    channels.
* The reset switch drives the codec's reset pin directly and the logic
  through a two-flop reset synchronizer.

The AC'97 details of the link are taken from the AC'97 standard, as they
are not specific to this design: bit order, tag bit positions, slot-1 field
layout and SYNC timing. Check them against your codec's datasheet.

## Where this design departs from, or adds to, the original

The algorithm, its coefficients and shifts, the state sequence and names,
the serial pad protocol, the two-part gain table, the register ring and
its values follow the thesis this design is based on. The following are
this design's own:

* **Cycle count.** 58 cycles per sample instead of the 70 of the original
  schedule. The clock rates derived from 70 cycles remain sufficient. The
  exact pipeline and the `P_ALIGN` wait state are this design's choices.
* **α and β.** Only the targets are given in the original (attack under
  1 ms, release around 300 ms). The values are chosen to meet them at
  48 kHz.
* **Gain table contents.** The original prints no values. One of its
  equations reads as a power ratio applied to the amplitude, which would
  push the output below the limit instead of holding it there. Its plots
  show the output held flat at the threshold, and that is what this table
  does. The knee polynomial and width are assumed.
* **Equaliser limiter.** The ±32767 limit after the ÷128 is added so that
  the magnitude always fits the 16-bit operand and the square fits 32 bits.
  The original does not discuss overflow.
* **Reset.** An asynchronous, active-low reset of all state is assumed.
* **FPGA glue.** The serial bridge, the reset synchronizer and the link
  controller's internals are new. The original reused an existing
  controller and described only its function.

Not included: the I/O pad cells and the codec chip itself. These are a
process library and an external part; a behavioural model of the codec's
link side is in `tb/`.

## Size

Generic synthesis gives roughly:

* one channel: 520 flip-flops;
* stereo core: about 1050 flip-flops plus the 128×16 gain ROM;
* full FPGA platform: about 1320 flip-flops.

The multiplier and adder are one each per channel. The comparator chain
has 91 comparators per channel. The original resource-shared design
reports 1275 registers for the stereo core.

The unshared core (`agc_stereo_parallel`) has about 1060 flip-flops plus
the same ROM. It has 13 multipliers per ear: 3 in the high-pass filter,
5 in the equaliser and 5 in the gain stage. The 26 for the pair match
the count reported for the original's first version, which used 953
registers.

## Files

| file | contents |
|---|---|
| `rtl/agc_pkg.sv` | widths, coefficients, α/β defaults, threshold and gain-table functions |
| `rtl/agc_channel.sv` | one channel: serial I/O, filters, level tracking, gain multiply |
| `rtl/db_convert.sv` | power to dB comparator chain (combinational) |
| `rtl/gain_lut.sv` | shared stereo gain table |
| `rtl/agc_stereo.sv` | chip core: two channels and the table |
| `rtl/ac97_controller.sv` | AC'97 link master |
| `rtl/codec_config.sv` | codec register ring |
| `rtl/agc_serial_bridge.sv` | parallel words to and from the core's serial pins |
| `rtl/agc_fpga_top.sv` | FPGA platform top level |
| `rtl/agc_stereo_parallel.sv` | unshared first version of the stereo core |
| `rtl/hp_filter.sv`, `rtl/eq_filter.sv`, `rtl/agc_gain_stage.sv` | its three per-ear blocks |
| `tb/agc_ref_pkg.sv` | bit-exact reference model of a channel and the table formulas |
| `tb/ad1981b_model.sv` | behavioural AC'97 codec (link side only) |
| `tb/tb_*.sv` | self-checking testbenches, listed below |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. It
has a watchdog, and it counts a failure for any mechanism that its
stimulus failed to exercise. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/agc_pkg.sv tb/agc_ref_pkg.sv tb/ad1981b_model.sv \
    tb/tb_agc_fpga_top.sv --top-module tb_agc_fpga_top
obj_dir/Vtb_agc_fpga_top
```

For another testbench, change the last file and the top module. For
example, `tb_agc_stereo` needs only `rtl/agc_pkg.sv`, `tb/agc_ref_pkg.sv`
and `tb/tb_agc_stereo.sv` with `-y rtl`.

What the testbenches cover:

* `tb_db_convert`: every threshold, one above and one below it, random
  powers, and a cross-check against 10·log10.
* `tb_gain_lut`: max selection, the two-cycle read timing, holding between
  strobes, and all 128 entries against the formula.
* `tb_agc_channel`: bit-exact against the reference model over quiet noise,
  a loud tone, a quieter stretch and full-scale square waves, plus the
  58-cycle latency of every sample. It runs with β = 1024 so that the
  release is visible in a short run.
* `tb_agc_stereo`: both channels at the default parameters for 240 000
  samples (5 s of audio), bit-exact with the shared gain. Each ear in turn
  is the louder one, and the run includes the equaliser limit and the full
  release back to unity gain. About 10 s of simulation.
* `tb_agc_sample_rates`: the core at 70 clocks per sample (the budget the
  clock rates above were sized with) and at 59, the fastest it accepts. It
  checks every word bit-exact and every `o_done` at 58 cycles.
* `tb_agc_level_sweep`: the core's level curve. White noise is raised in
  5 dB steps from near silence to full scale. Below the knee the output
  level must equal the input level. Above it, the output must stay just
  under the threshold. Measured: output = input up to 36.6 dB, 41.4 dB at
  41.6 dB in, and 44.1 to 45.2 dB for every input from 46.6 dB to full
  scale (85 dB). About 8 s of simulation.
* `tb_agc_stereo_parallel`: the unshared core with the stimulus of
  `tb_agc_stereo`, checked bit-exact against the reference model with the
  2^15 equaliser. It also checks the 16-cycle latency. About 4 s of simulation.
* `tb_codec_config`: the ring order, every register value for every switch
  setting, one step per request, and restart on reset.
* `tb_ac97_controller`: frame timing, SYNC width, the contents of every
  outgoing slot, incoming samples, and no samples while the codec is not
  ready.
* `tb_agc_fpga_top`: the whole platform against the codec model for 3000
  frames. It checks each frame's register write and AGC output. Bypass and
  volume switches change during the run, and the reset switch is applied
  once.

The reference model in `tb/agc_ref_pkg.sv` computes the channel with plain
integer arithmetic, written independently of the RTL's schedule. It is the
quickest way to try other coefficients or table shapes before changing the
RTL.
