# Digital single-sideband modulator from two direct digital synthesizers

This design generates an amplitude-modulated single-sideband (SSB) or
double-sideband (DSB) signal entirely in logic, by the phase-shift method.
A sine tone at F_mod modulates a carrier at F_car, and the output sample
stream contains only the lower sideband (F_car − F_mod), only the upper
sideband (F_car + F_mod), or both. Both tones come from direct digital
synthesizers (DDS), so either frequency can be changed at run time in
steps of about 3 Hz by writing a 24-bit code. Everything runs on one 50 MHz
clock, one sample per clock. The 8-bit result drives an external DAC and a
reconstruction low-pass filter, which are not part of the RTL.

The reference operating point is a 100 kHz carrier and a 10 kHz tone. The
output then holds a 90 kHz line (LSB), a 110 kHz line (USB), or both.

## The phase-shift method in integer arithmetic

For a tone at Ω and a carrier at ω:

    sin(Ω i)·cos(ω i) + cos(Ω i)·sin(ω i) =  sin((ω + Ω) i)   upper sideband
    sin(Ω i)·cos(ω i) − cos(Ω i)·sin(ω i) = −sin((ω − Ω) i)   lower sideband
    sum of the two                        = 2·sin(Ω i)·cos(ω i)  both (DSB)

So each synthesizer provides a sine and a cosine, that is, the tone and its
copy shifted by 90°. Two multipliers form the crosswise products. An adder
and a subtractor then give the two sidebands, and a third adder gives their
sum. There is no analog phase-shift network, so the unwanted sideband
cancels exactly except for table rounding. In simulation it is about 70 dB
below the wanted one.

All samples are 8-bit. The tables hold offset-binary words 1..255, and
subtracting 128 makes them signed values in −127..127. A product of two such
values, and the sum of two products, fits in 16 signed bits (at most
2·127·127 = 32258). The **scaler** divides that 16-bit value by 255, which
brings it back to about ±127, and adds 128 to return to offset binary for the
DAC. A single sideband comes out at half the amplitude of the DSB signal
(about ±63 around 128), because each product contributes half.

## Blocks

| Module | Role |
|---|---|
| `ssb_dds` | Top level: the two synthesizers plus the modulator |
| `dds_mod` | Modulating-tone DDS: accumulator, sine ROM, cosine ROM (sine ROM at address +2048), −128 |
| `dds_car` | Carrier DDS: accumulator, sine ROM, cosine ROM (cosine table), registered −128 |
| `dds_phase_acc` | 24-bit phase accumulator with asynchronous clear |
| `dds_sine_rom` | 8192 × 8 waveform ROM, stored as half a period |
| `ssb_modulator` | Two signed 8 × 8 multipliers, sideband adders, mode multiplexer, scaler |
| `ssb_scaler` | Signed ÷255, then +128 |
| `ssb_pkg` | Widths, constants and the `type_mod_e` encoding |

### Frequency codes

The accumulator adds the code every clock and wraps modulo 2^24. The output
frequency is therefore `F = code · 50 MHz / 2^24`, with a step of 2.98 Hz.
The code for a frequency is `code = F · 2^24 / 50 MHz`:

| Frequency | Code |
|---|---|
| 100 kHz (carrier) | 33554 |
| 10 kHz (tone) | 3355 |
| 20 kHz (tone) | 6710 |
| 10 MHz (highest frequency in the specification) | 3355443 |

The top 13 bits of the phase address the 8192-word table. The lower 11 bits
are dropped, so the phase is truncated and not interpolated.

### Half-wave waveform ROM

Word k of a full period is `128 + round(127 · sin(2πk/8192))`, rounded half
away from zero. Because `sin(θ + π) = −sin θ`, the second half of the period
equals 256 minus the first half. Only 4096 words are stored. The top address
bit, registered alongside the read, chooses between the stored word and
256 − word. Four uncompressed 8192 × 8 tables would need 262144 bits, which is
more than the 239616 bits of block memory on the Cyclone II EP2C20 that the
design targets. Half-wave storage needs 131072 bits.

The table is computed during elaboration, from a Taylor series on one
quadrant in 64-bit fixed point. No data file is read. `PHASE_OFFSET` rotates
the table: the carrier's cosine ROM uses 2048 (a quarter period). The
tone's cosine ROM instead holds the sine table, and its address has 2048
added, modulo 8192. The ROM read is registered, so data arrives one clock
after the address.

### Modulation type

`type_mod` is sampled by a combinational multiplexer in front of the scaler:

| `type_mod` | Output |
|---|---|
| 0 (`MOD_LSB`) | lower sideband, F_car − F_mod |
| 1 (`MOD_USB`) | upper sideband, F_car + F_mod |
| 2 (`MOD_DSB`) | both sidebands |
| 3 | both sidebands (spare code) |

## Timing

Every stage is a register on `CLK`. Only the phase accumulators are reset.
`RESETDDS` is an asynchronous, active-high clear. The other registers carry
no reset and refill with valid data within seven clocks.

Clock edges after the carrier phase register takes a new value:

| Edge | Carrier path | Modulating path |
|---|---|---|
| 0 | phase register | — |
| 1 | ROM output register | phase register |
| 2 | −128 register | ROM output register (−128 is combinational) |
| 3 | products | products |
| 4 | USB / LSB adders | |
| 5 | DSB adder; ÷255 for LSB/USB | |
| 6 | +128 → `X` for LSB/USB; ÷255 for DSB | |
| 7 | +128 → `X` for DSB | |

Counted from the phase value: `X` depends on the tone phase 5 clocks earlier
and the carrier phase 6 clocks earlier for LSB/USB, and one clock more for
DSB. The tone is one clock ahead of the carrier. A fixed phase offset like
this does not affect the spectrum. After `type_mod` changes, the output can
show up to one clock of mixed data.

## Top-level ports (`ssb_dds`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `CLK` | in | 1 | 50 MHz clock |
| `RESETDDS` | in | 1 | asynchronous clear of both accumulators, active high |
| `CODE_F_X` | in | 24 | tone frequency code |
| `CODE_F_Y` | in | 24 | carrier frequency code |
| `type_mod` | in | 2 | modulation type, see above |
| `X` | out | 8 | modulated sample, offset binary, to the DAC |
| `Y` | out | 8 | raw tone sine sample 0..255, for observation |

## Where this RTL departs from, or adds to, the original design

- **Multiplier pairing.** The modulator schematic multiplies the tone's sine
  by the carrier's cosine, and the tone's cosine by the carrier's sine. This
  RTL does the same. The block diagram and the written equations instead
  pair sine with sine and cosine with cosine. Both pairings produce one
  sideband from the sum and the other from the difference; only which one
  differs. In this RTL the select codes are named after the sideband that
  actually comes out.
- **Select encoding.** The original gives no binary encoding for the
  multiplexer. The 0/1/2 order (LSB, USB, both) is this design's choice.
- **Divider constant.** The divisor 255 comes from an 8-bit constant feeding
  the divider's denominator. Rounding toward zero is this design's choice.
- **Table contents.** The original specifies only "8192 × 8, values 0..255"
  and half compression. The amplitude 127, the rounding and the
  mirror-about-128 folding are this design's choices.
- **Reset polarity** is this design's choice (active high).
- **Outside the RTL:** the 50 MHz oscillator, the DAC, and the low-pass
  filter. `OUT_COS` of the tone synthesizer is computed but not used at the
  top, as in the original.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints one line,
`TB_RESULT checks=N failures=M`, and has a cycle watchdog.

- `tb_dds_phase_acc`: random codes against a wide-integer model. It also
  checks that the clear acts without a clock edge.
- `tb_dds_sine_rom`: all 8192 addresses of a sine ROM and a cosine ROM,
  compared with the real-valued formula over the full period.
- `tb_dds_mod`, `tb_dds_car`: each output checked every clock against a
  model accumulator and the formula, at 10 kHz, 20 kHz, 100 kHz and a random
  code.
- `tb_ssb_scaler`: extremes, multiples of 255 and random values, with the
  two-clock latency.
- `tb_ssb_modulator`: random and full-scale samples in every mode, with the
  4-clock (LSB/USB) and 5-clock (DSB) latencies.
- `tb_ssb_dds`: end to end, at default parameters. It uses the 100 kHz
  carrier with the 10 kHz tone in LSB, USB and DSB, then the 20 kHz tone in
  DSB and USB, with a reset in mid-run. Every output sample is checked
  bit-exactly against a model. Over one tone period it also measures the
  power at F_car ± F_mod and at F_car: the wanted sideband must be at least
  20 dB above the other and above the carrier. It also counts mode switches,
  accumulator wraps, mirrored-half ROM reads and resets, and fails if any of
  them never happened.

Simulating with Verilator 5 (run from the repository root):

    verilator --binary --timing --assert -Irtl rtl/ssb_pkg.sv tb/tb_ssb_dds.sv \
        --top-module tb_ssb_dds -o sim
    obj_dir/sim

Substitute any other testbench name. The full-system run takes about
23,000 clocks and a few seconds.

## Changing the design

The widths are parameters with defaults taken from `ssb_pkg`: `ACC_W` (24),
`ADDR_W` (13) and `SAMPLE_W` (8). A wider `ACC_W` gives finer frequency
steps. A larger `ADDR_W` lowers phase-truncation spurs, at twice the memory
per bit. If `SAMPLE_W` changes, the product width follows as `2·SAMPLE_W`;
the scaler's divisor (`SCALE_DIVISOR`) and offset (`SAMPLE_OFFSET`) should
then be changed to `2^SAMPLE_W − 1` and `2^(SAMPLE_W−1)` in `ssb_pkg`, and
`ROM_AMPLITUDE` to `2^(SAMPLE_W−1) − 1`.
