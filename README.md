# Detector signal emulator

This is synthesizable SystemVerilog for a configurable emulator of radiation-detector signals. It
produces, one 16-bit sample per clock, the signal a detector and its front end would deliver:

- random pulses, whose timing and amplitude follow user-supplied histograms;
- a slowly drifting baseline;
- band-limited and 1/f noise;
- the response of a shaping amplifier;
- optional ADC quantization and nonlinearity.

It is meant for testing acquisition and pulse-processing systems. Everything the emulator does is
set by loaded tables and coefficients, not by recordings of real detectors. A host computer
turns physical quantities (spectra, rates, time constants) into those tables and coefficients. The
RTL holds the real-time arithmetic that runs at the sample rate.

```
 gen 0: event_timer + stat_gen(amp) --\                          +-- noise_gen (3 bands + 1/f)
 gen 1: event_timer + stat_gen(amp) ---> pileup_ctrl -> iir1 LP -+
        shape_gen x2 <-------------/                             +-- baseline_gen (spline)
                                                                 |
                                      adder (saturating) <-------+
                                         |
                                       shaper (2 x sla_iir2 + iir1, each with bypass)
                                         |
                                       nl_output --> dig_out (quantized, through 64K table)
                                                 --> dac_data (offset binary, for a 16-bit DAC)
```

`emulator_top` connects it all. A single clock runs every section at one sample per cycle, so the
sample rate equals the clock rate. The instrument this design follows targets 300 to 350 MHz on a
Virtex-5 class FPGA. Timing closure at those rates has not been checked here.

## Pulses

Each of the two pulse generators has three parts: `event_timer`, `pulse_source` and `shape_gen`.

**Random values from a histogram (`stat_gen`).**
- The user loads a histogram of up to 1024 bins with 32-bit counts. While the bins are written
  (in order, from bin 0) the block keeps their running sum, so the stored table is the cumulative
  distribution.
- A draw takes a 32-bit LFSR word r and forms u = r·total / 2^32. A bit-serial binary search then
  finds the first bin whose cumulative count exceeds u. This is inverse-CDF sampling: bin k
  comes out with probability count_k / total.
- The result is the bin index with 6 extra random bits appended, so values spread inside a bin.
- A draw takes log2(BINS)+3 = 13 cycles.

**Occurrence times (`event_timer`).**
- A second `stat_gen` holds the histogram of the time between events. A value v becomes an
  interval of max(1, (v·2^shift) >> 6) cycles.
- The next interval is drawn while the current one counts down, so intervals longer than one draw
  are exact.
- When an interval is shorter than that, the trigger waits for the draw and `late` reports it.

**Amplitude and threshold (`pulse_source`).**
- On each trigger an amplitude is drawn from the amplitude histogram.
- If the threshold check is on, pulses below the threshold are dropped and reported on
  `suppressed`.

**Shape playback (`shape_gen`).**
- Each generator stores one reference shape of 16384 words, normalised to unit peak.
- A phase accumulator with 24 fraction bits steps through the shape by `shape_step`, which can
  be fractional. Two neighbouring words are read and linearly interpolated, then multiplied by the
  amplitude.
- With a step of 1/1000, a 16 K-word shape plays back as a pulse 1000 times longer. This makes
  millisecond-long tails possible without a large memory.
- A trigger that arrives while a pulse is still playing is dropped and reported on `st_lost`.
  Overlapping pulses come from the second generator.

**Pile-up (`pileup_ctrl`).**
- The two pulse streams are added with saturation, which gives natural pile-up.
- In inhibit mode, a start that comes within `inhibit_win` cycles of the previous accepted start
  (of either generator) is dropped and reported on `st_inhibited`. If both generators start in
  the same cycle, generator 0 wins.
- An optional first-order low-pass follows, to imitate the integration of a preamplifier.

## Baseline: spline up-sampling by forward differences

`baseline_gen` reproduces a slow drift from up to 4096 stored key points, up-sampled by
L = 2^S with S from 1 to 19. At the largest factor, 4096 × 2^19 samples last about 7 s at 300 MHz.
Spline interpolation has two steps:
1. An inverse step turns the key points into B-spline coefficients.
2. A forward step evaluates the curve at every output sample.

Evaluating a cubic at every sample would need multipliers running at the full rate. Both steps
are therefore built from additions, shifts and multiplications by fixed constants.

### Inverse step: from key points to coefficients

A uniform cubic B-spline with coefficients c takes the value (c[i−1] + 4c[i] + c[i+1]) / 6 at
knot i. To pass through key points k, the coefficients must solve that tridiagonal system. Its
inverse filter 6 / (z + 4 + z^-1) splits into two first-order recursions with the pole
z1 = √3 − 2 ≈ −0.268:

    c+[i] = k[i] + z1·c+[i−1]          forward pass,  i = 0 .. last
    c[i]  = z1·(c[i+1] − 6·c+[i])      backward pass, i = last .. 0

The start values are c+[0] = k[0]/(1 − z1) and c[last] = (1 − z1)·c+[last]. They are the exact
values for a profile that stays constant beyond its ends.

**Why the start values hardly matter.** At every inner knot (1 to last−1) the resulting curve
hits the key point whatever start values are used. They only shape the curve near the two ends.

**In hardware.** The two passes run over the key-point memory when the block is enabled, one
word per cycle. Results go into a separate coefficient memory: 27-bit words with 8 fraction bits,
enough for the up-to-3× gain of the inverse filter. The passes take 2·(last + 2) cycles, and
`prep` is high meanwhile. A loop restart reuses the coefficients. Rounding errors in the passes do
not accumulate, because |z1| < 0.27 damps each one within a few steps. The testbench runs the
inverse over all 4096 key points and finds every knot within 1 LSB.

**Turning it off.** With `interp = 0` the key points themselves are used as coefficients. The
curve is then a smoothed version that passes near the key points rather than through them.

### Forward step: the segment polynomial

Four consecutive coefficients c0..c3 define one segment of L samples. Written for the integer
sample index j = 0..L−1 and scaled by 6·L^3, the segment is an integer cubic:

    P(j) = A j^3 + B L j^2 + C L^2 j + D L^3
    A = -c0 + 3c1 - 3c2 + c3,   B = 3c0 - 6c1 + 3c2,   C = 3(c2 - c0),   D = c0 + 4c1 + c2

**The recursion.** A cubic's third difference is constant, so the block updates, every cycle:

    P += d1;   d1 += d2;   d2 += d3

The start values are P(0) = D·L^3, d1 = A + B·L + C·L^2, d2 = 6A + 2B·L and d3 = 6A. Because L is
a power of two, these are shifts and additions of the coefficient combinations.

**Exactness.** All four accumulators are 92 bits wide: 27 + 3·19 + 8. This is enough for the
recursion to stay exact integer arithmetic over a whole segment at the largest factor. With a
narrower width, rounding error would grow cubically along a 2^19-sample segment.

**Output scaling.** The output is P / (6·L^3): an arithmetic shift by 3S plus the 8 fraction
bits, then a multiplication by round(2^20/6). Segment m starts exactly on knot m+1.

**Segment changes.** The next coefficient is read during the current segment. Segments therefore
follow each other without gaps, and the curve is C2-continuous (it, its slope and its curvature
have no jumps) across segment joins.

**Looping.** At the last key point the block either holds its output or restarts from key point
0. A restart refills its four-point window first, holding the output for 7 cycles.

## Noise

`noise_gen` adds up to four enabled sources.

**Three filtered bands.** Each band is an LFSR feeding a small FIFO, followed by a filter:
- a first-order low-pass;
- a band-pass, built as a low-pass cell followed by a high-pass cell;
- a first-order high-pass.

The LFSRs are 32-bit Galois registers with polynomial x^32+x^22+x^2+x+1. Each advances 32 steps
per sample, a whole word, so consecutive words share no shifted bits. All filter cells are `iir1`: a
first-order Direct Form II section with 48-bit coefficients (40 fraction bits) and a 48-bit state
(8 fraction bits).

**1/f noise (`flicker_gen`).** A separate white source drives ten first-order low-passes in
parallel, and their outputs are summed. The host places the poles evenly on a log-frequency axis
and sets the gain of each cell. The sum then follows a 1/f slope between the lowest and highest
pole. A pole of a few Hz at a 10 MHz sample rate needs 1−p ≈ 2·10^-6, well inside the coefficient
resolution of 2^-40.

**Coefficients.** For a bilinear Butterworth first-order cell with cut-off Fc at sample rate Fs,
let c = cot(π·Fc/Fs).
- Low-pass: b0 = b1 = 1/(1+c), a1 = (1−c)/(1+c).
- High-pass: b0 = c/(1+c), b1 = −c/(1+c), same a1.

In this RTL's sign convention the recursion is w = x − a1·w[n−1] and y = b0·w + b1·w[n−1]. Band
levels are set by scaling b0 and b1.

## Shaper: scattered look-ahead second-order cells

The shaper is a cascade of two second-order cells (`sla_iir2`) and one first-order cell (`iir1`).
Any stage can be bypassed. Together they give up to five poles and three zeros, which is enough
for CR-(RC)^n and similar semi-Gaussian shapers.

**Why a plain cell is too slow.** The difficulty is running a second-order recursion at
300 MHz. In y[n] = a1·y[n−1] + a2·y[n−2] + …, a 48-bit multiply and add must finish in one cycle.

**The look-ahead transform.** With M = 3, numerator and denominator of

    H(z) = (1 − b1 z^-1) / (1 − a1 z^-1 − a2 z^-2)

are both multiplied by

    1 + a1 z^-1 + (a1^2 + a2) z^-2 − a1·a2 z^-3 + a2^2 z^-4

That factor adds, for each original pole, two poles at the same radius and spaced 120° from it.
It also adds zeros at the same places, so the response is unchanged and the cell stays stable.
The denominator is left with only z^-3 and z^-6:

    H(z) = (B0 + B1 z^-1 + … + B5 z^-5) / (1 − A0 z^-3 − A1 z^-6)
    A0 = a1^3 + 3·a1·a2,   A1 = a2^3
    B0 = 1,  B1 = a1 − b1,  B2 = a1^2 − a1·b1 + a2,  B3 = −a1·a2 − a1^2·b1 − b1·a2,
    B4 = a2^2 + a1·a2·b1,  B5 = −a2^2·b1

**The pipeline.** The recursion y[n] = w[n] + A0·y[n−3] + A1·y[n−6] only reads outputs that are
at least three samples old. Each feedback product is therefore computed and registered a cycle
ahead, and the loop holds only one adder.

**Widths.**
- The non-recursive part has 24-bit B coefficients (20 fraction bits) and a 32-bit adder. Its
  result w is rounded to 12 fraction bits and saturated.
- The recursive part has 48-bit A coefficients (42 fraction bits) and 48-bit products and sums.
  Its state keeps 24 fraction bits, and the feedback products are rounded.

**Why the state needs fraction bits.** A 200 ms time constant at 312 MHz puts the pole
1.6·10^-8 from z = 1. Each step of the recursion then moves a full-scale output by about
10^-3 LSB. With only a few fraction bits, such a pole either stalls (rounding) or decays several
times too fast (truncation). With 24 bits it decays correctly. `tb_shaper_range` checks CR
differentiators from 20 ns to 200 ms against the analog step response.

**Gain limits and host rules.**
- The numerator coefficients have a step of 2^-20. For a zero at DC, round the B's so that they
  sum exactly to zero.
- A unit-DC-gain integrator needs the gain (1−p)^2 in the B's. It is therefore accurate to about
  0.1 % only down to 1−p ≈ 10^-3, a few microseconds.
- For longer integrations, accept a lower gain or spread it over the stages.

**One zero per cell.** Each second-order cell has a single zero (numerator 1 − b1·z^-1). A
second-order Butterworth low-pass, with its double zero at z = −1, can be set only through its
poles.

**Latency.** Each second-order cell takes 2 cycles and the first-order cell 1.

## Output stage

`nl_output` has two paths.

**Analog path.** The analog word is the shaped sample in offset binary, as a 16-bit current DAC
expects. It does not pass through the quantizer or the table.

**Digital path.**
- The quantizer clears 0 to 15 low bits, which emulates a coarser ADC.
- The quantized code then addresses a 65536-word table, which maps each ideal code to the code a
  real ADC would give. This represents differential and integral nonlinearity.

**Latency.** 2 cycles.

## Configuration and tables

**Settings.** All static settings are in the packed struct `emu_pkg::emu_cfg_t`: enables, shift
factors, thresholds, the shape step and length, the inhibit window, and every filter
coefficient. Hold it stable while the emulator runs.

**Tables.** Tables are written through one port: `mem_we`, `mem_sel` (`emu_pkg::mem_sel_e`),
`mem_addr` and `mem_wdata`.

| `mem_sel` | table | words | data |
|---|---|---|---|
| 0, 1 | reference shape, generator 0/1 | 16384 | signed 16-bit, peak 32767 |
| 2, 3 | amplitude histogram, generator 0/1 | 1024 | 32-bit count |
| 4, 5 | inter-arrival histogram, generator 0/1 | 1024 | 32-bit count |
| 6 | baseline key points | 4096 | signed 16-bit |
| 7 | nonlinearity table | 65536 | signed 16-bit |

Histograms must be written from bin 0 upwards, because the cumulative sum is formed while they
are loaded. Memories are not cleared by reset.

**Status outputs.** Each status output is one bit per generator, pulsing for one cycle:
- `st_start`: an accepted pulse start;
- `st_inhibited`: an event dropped by the pile-up window;
- `st_suppressed`: an event below the threshold;
- `st_lost`: a start dropped because the shape generator was busy;
- `st_late`: a trigger that waited for its interval draw.

`st_base_prep` is a single bit, high while the baseline computes its spline coefficients.

## How this design departs from the instrument it follows

- **Histogram sampling.** The instrument derives random values from histograms with an
  algorithm it does not spell out. Here this is plain inverse-CDF sampling with a binary search.
- **Spline.** The instrument names a special spline basis whose inverse and forward steps need
  only shifts and additions, but does not describe it. This design uses standard uniform cubic
  B-splines:
  - a recursive prefilter for the inverse step, whose constant multipliers reduce to
    shift-and-add networks;
  - forward differences for the evaluation.

  The accumulators are 92-bit, where the instrument quotes 64-bit arithmetic, so that the
  recursion stays exact at factor 2^19.
- **Clocking.** One clock for everything. The instrument's sections quote different rates
  (baseline 160 to 300 MHz, pulses 350 MHz).
- **Not included.**
  - the host software that computes tables and coefficients;
  - the DAC itself;
  - a generator of environmental disturbances, which the instrument mentions without a model.
- **Design choices of this RTL**, not taken from the instrument:
  - the configuration struct, the table port and the status outputs;
  - the behaviour of a busy shape generator;
  - the inhibit rule;
  - FIFO depth (16) and all fraction-bit splits.

## Files

- `rtl/emu_pkg.sv`: shared widths, coefficient structs, the configuration struct, the
  table-select enum, the saturation function.
- `rtl/<block>.sv`: one module each. `emulator_top` is the top.
- `tb/tb_<block>.sv`: self-checking testbenches. Each compares the block against an independent
  model: exact integer models, floating-point filter models with a small tolerance, or
  statistical checks for the random sources. Each ends with a line
  `TB_RESULT checks=N failures=M` and has a watchdog.

`tb/tb_emulator_top.sv` runs the top with every parameter at its default: full 16 K shapes,
4096-entry key-point memory, 64 K table. It has three phases:
1. Pulses with pile-up, the baseline in loop mode, the quantizer and the table are on; noise,
   pulse low-pass and shaper are off. A bit-true model rebuilds every output sample from the
   accepted start events, and each one is compared exactly.
2. Every section is on, including pile-up inhibition, the threshold, all noise sources, the pulse
   low-pass and the shaper. The baseline restarts with its inverse step. This phase checks that:
   - the output stays valid and moving;
   - the output matches, within 8 LSB, a floating-point model of the shaper cascade and the
     table, fed with the adder's output;
   - inhibition and suppression take place;
   - the baseline passes through every key point.
3. Very short intervals force late triggers and busy generators.

It counts how often each mechanism happened and fails if one never did.

Three testbenches run the sizes the instrument is specified for:
- `tb/tb_shape_long.sv` plays a full 16 K-word shape with 1:1000 interpolation. That is 16.4
  million samples, or 52 ms at 315 MHz, and every sample is checked. It takes about 10 s on a
  current PC.
- `tb/tb_shaper_range.sv` runs the look-ahead cell across the 20 ns to 200 ms time-constant
  range.
- `tb/tb_flicker_range.sv` sets the 1/f poles from 3 Hz to 100 kHz at 20 MHz. The lowest pole
  is then 9.4e-7 from z = 1. The testbench runs three million samples against a model. It also
  checks that the Allan variance stays flat from 256 to 16384 samples, which is the signature of
  1/f noise.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_emulator_top rtl/emu_pkg.sv tb/tb_emulator_top.sv -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_emulator_top` with its name. `-y rtl` lets Verilator find
each module in the file of the same name. The testbenches generate all their data: shapes,
histograms, coefficients and reference models are computed in SystemVerilog, and no data files
are read.
