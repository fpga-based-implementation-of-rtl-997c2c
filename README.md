# Wavelet-based ECG pre-processor

This core cleans up a digitised electrocardiogram (ECG) and marks its
heartbeats. It does two jobs:

1. It removes **baseline wander** (BLW), the slow drift of the ECG caused by
   breathing and patient movement.
2. It detects **QRS complexes**, the sharp spike of each heartbeat, and raises
   a logic flag for each one.

Both jobs use one discrete wavelet transform (DWT). The transform is computed
as a Mallat filter bank: a cascade of low-pass and high-pass FIR filters, each
followed by down-sampling by 2. With the ECG sampled at 200 Hz, each level
splits the band of the level above in two:

| level | approximation a*j* | detail d*j* |
|------:|--------------------|-------------|
| 1 | 0 – 50 Hz | 50 – 100 Hz |
| 2 | 0 – 25 Hz | 25 – 50 Hz |
| 3 | 0 – 12.5 Hz | **12.5 – 25 Hz → QRS detection** |
| 4 | 0 – 6.25 Hz | 6.25 – 12.5 Hz |
| 5 | 0 – 3.125 Hz | 3.125 – 6.25 Hz |
| 6 | 0 – 1.5625 Hz | 1.5625 – 3.125 Hz |
| 7 | **0 – 0.78 Hz → baseline wander** | 0.78 – 1.56 Hz |

Baseline wander lies almost entirely below 0.8 Hz, so the level-7
approximation **a7** is the baseline. Most QRS energy lies in 12.5–25 Hz, so
the level-3 detail **d3** is used to find the beats. The filters come from
the Daubechies wavelet of order 4 (db4, 8 taps), whose shape resembles an
ECG beat.

## Signal flow

```
             +-------------------------------+
 ecg_in ---->| dwt_decomposition             |--a7 (1 per 128 samples)--+
 (200 Hz) |  |  7 x dwt_analysis_level       |                          |
          |  |  (Lo_D/Hi_D, decimate by 2)   |--d3 (1 per 8 samples)-+  |
          |  +-------------------------------+                       |  |
          |                                                          v  v
          |  +---------------------------------------------------+  qrs_decision --> qrs_flag, beat
          |  | blw_canceller                                     |
          |  |  7 x dwt_synthesis_level (up-sample by 2, Lo_R) <-+-- a7
          +->|  ecg_delay_line (889 samples) ----> (-) ------------+--> ecg_clean
             |                                     blw ------------+--> blw, ecg_delayed
             +---------------------------------------------------+
```

The key resource saving is in the BLW path. A textbook wavelet denoiser would
rebuild the whole signal from every band except a7. This core instead rebuilds
**only a7**, through seven up-sample-and-filter levels, and subtracts that
baseline estimate from a delayed copy of the original ECG. The result is the
same, but the core needs one reconstruction filter per level instead of two,
and it never rebuilds the detail bands at all. The decomposition is computed
once and shared by both jobs.

## Number format

* Input: `IN_W` = 16-bit signed samples. MIT-BIH records are 11-bit.
* Internal words: `DATA_W` = 24-bit signed. Each analysis level has a DC gain
  of √2, so a7 can grow by about 3.5 bits over 7 levels. Every filter output
  saturates, so overflow cannot wrap.
* Coefficients: signed Q1.15, `round(c · 2^15)`, from the standard db4 scaling
  filter. Only the synthesis low-pass `Lo_R` is tabulated, in `dwt_pkg`. The
  other three filters follow from it by the quadrature-mirror relations
  `Lo_D[k] = Lo_R[L-1-k]` and `Hi_D[k] = (-1)^(k+1) Lo_R[k]`. These give the
  same filters as the usual wavelet toolboxes.
* Each filter adds its products at full precision, shifts right by 15
  (rounding toward minus infinity) and then saturates.

## Decomposition (`dwt_analysis_level`, `dwt_decomposition`)

Each level keeps a delay line of its last 7 inputs. The current input and that
delay line form the 8 taps. `Lo_D` and `Hi_D` are both evaluated in parallel
within one cycle, but only on every second input (the 1st, 3rd, 5th, … after
reset). The level therefore computes

    a[m] = Σk Lo_D[k]·x[2m−k],   d[m] = Σk Hi_D[k]·x[2m−k]

with the signal taken as zero before the first sample. The levels are chained
by valid strobes, and each level adds one clock cycle. a7[m] appears 7 cycles
after the strobe of ECG sample 128·m. d3[m] appears 3 cycles after sample 8·m.

## Rebuilding a7 at the full rate (`dwt_synthesis_level`, `blw_canceller`)

This is the least obvious part of the design.

**Polyphase filtering.** Up-sampling by 2 inserts a zero after each sample, so
half of the `Lo_R` products are always zero. When input r[m] arrives, the level
computes both of its output samples at once from a 4-word history. The even
sample uses the even taps and the odd sample uses the odd taps:

    y[2m]   = Σi Lo_R[2i]·r[m−i]
    y[2m+1] = Σi Lo_R[2i+1]·r[m−i]

**Pacing.** The even sample leaves at once. The odd sample is held for
`HOLD_TICKS` ECG-sample ticks, where `HOLD_TICKS` is 2^(j−1) for the level that
turns a_j into a_(j−1). Level 7 receives a7[m] in the sample period of
x[128m]. It sends the even sample down at once and the odd sample 64 samples
later. Level 6 halves that spacing, and so on down the chain. As a result,
level 1 delivers exactly one sample per ECG sample, `blw[n]`, in the same
sample period as `x[n]`. The cascade never needs a FIFO. Each level holds at
most one sample, and an assertion catches a new input that arrives while a
sample is still held.

**Alignment.** For an orthogonal wavelet with L taps, J levels of analysis plus
synthesis delay the signal by (2^J − 1)(L − 1) samples. For db4 and 7 levels
that is 127 · 7 = **889 samples, 4.445 s** at 200 Hz. `ecg_delay_line` delays
the raw ECG by exactly this amount, so that

    ecg_delayed[n] = x[n − 889]
    blw[n]         = a7 rebuilt at 200 Hz (the baseline of x[n − 889])
    ecg_clean[n]   = ecg_delayed[n] − blw[n]

The delay line is a circular buffer in an 889 × 16-bit memory. It performs one
read and one write per sample. Its output is 0 until the buffer has been
filled once, so the memory needs no clearing at reset.

With a constant input, the baseline estimate settles to within a few LSB of
the input. The residual comes from the Q1.15 coefficients. With a 3000-LSB,
0.25 Hz wander, the wander left in `ecg_clean` is about 0.05 % of its power
with db4 and about 1.2 % with db2. Wander close to the 0.78 Hz band edge is
removed less completely: with a further 0.55 Hz component, about 2 % of the
wander power remains.

## QRS decision (`qrs_decision`)

The decision stage turns d3 into a beat flag using an adaptive threshold and a
few heuristic rules. Only that general method comes from the original design.
The specific rules below are this implementation's own, in the style of
classic running-estimate detectors. All counts are in d3 samples (25 Hz).

1. Feature: `e = |d3|`.
2. Candidate: a local maximum of `e`.
3. Learning: the first `LEARN` = 50 samples (2 s) report nothing. During
   learning, SPK (the signal-peak level) takes the largest candidate seen.
4. Threshold: `THR = NPK + (SPK − NPK)/4`, where NPK is the noise-peak level.
5. A candidate above THR, at least `REFRACT` = 5 samples (200 ms) after the
   previous beat, is a beat. For a beat, `SPK += (peak − SPK)/8`. Any other
   candidate is noise, and `NPK += (peak − NPK)/8`. Over-threshold candidates
   during learning also start the refractory period.

A beat is reported on the d3 strobe after its peak. `beat` pulses for one
cycle and `qrs_flag` stays high for one d3 period (8 samples, 40 ms). Relative
to the R peak at the input, the flag comes about 24 samples (120 ms) later.
This delay is the level-3 filter delay plus one d3 sample to confirm the
maximum. The flag is *not* delayed to match the 889-sample BLW output. The
detector has no search-back for missed beats and no T-wave slope test.

## Top-level interface (`ecg_dwt_preproc`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | core clock; synchronous active-high reset |
| `ecg_valid` | in | 1 | one-cycle strobe per ECG sample (the sample-rate clock enable) |
| `ecg_in` | in | `IN_W` | signed ECG sample |
| `out_valid` | out | 1 | one strobe per sample, ≤ 2·LEVELS+2 cycles after `ecg_valid` |
| `ecg_delayed` | out | `IN_W` | input delayed by 889 samples |
| `blw` | out | `DATA_W` | baseline-wander estimate for that sample |
| `ecg_clean` | out | `DATA_W` | `ecg_delayed − blw` |
| `d3_valid`, `d3_data` | out | 1, `DATA_W` | level-3 detail stream (25 Hz) |
| `qrs_flag` | out | 1 | high for 8 samples after each detected QRS |
| `beat` | out | 1 | one-cycle pulse per detected QRS |
| `qrs_threshold` | out | `DATA_W` | current adaptive threshold |

All outputs hold between strobes. `ecg_valid` strobes must be at least
`MIN_GAP` = 2·LEVELS+3 = 17 cycles apart, which an assertion checks. At
200 Hz, any clock above 3.4 kHz is enough. The core is otherwise independent
of the sample rate, but the band table above assumes 200 Hz.

Parameters: `WAVELET` (`DB4` by default, or `DB2` for 4-tap filters and a
381-sample delay, a smaller variant for small devices), `IN_W` = 16,
`DATA_W` = 24 (at most about 40), `LEVELS` = 7, `DETAIL_LEVEL` = 3,
`REFRACT` = 5, `LEARN` = 50. The delay-line depth follows from `WAVELET` and
`LEVELS`.

At the defaults, generic synthesis gives about 890 word-level cells and
790 flip-flops. The filters use 112 constant multipliers in the analysis
levels (7 levels × 2 filters × 8 taps) and 56 in the synthesis levels. The
delay line is one 14 kbit memory.

## Relation to the original design

The following come from the original design: the shared 7-level db4 Mallat
decomposition at 200 Hz; a7 for the baseline and d3 for QRS detection;
rebuilding only a7 and subtracting it from the delayed ECG; a decision stage
with an adaptive threshold and heuristic rules that yields a logic QRS flag;
and db2 as the smaller variant.

The following are choices made for this RTL: all word widths, rounding and
saturation; the strobe interfaces; the parallel direct-form filters; the
polyphase reconstruction and the way it paces its output; the 889-sample delay
value (derived from the filter length); the delay-line memory; reset
behaviour; and every detail of the QRS rules.

The original was built and tested on FPGA with a vendor tool flow and a
hardware co-simulation link. Neither is part of this RTL.

## Verification

Every testbench checks itself. It prints `TB_RESULT checks=N failures=M`.
Those that use the filter-bank reference model (`tb/tb_dwt_ref.sv`) compare
against it bit for bit. The model applies textbook convolution, decimation and
zero insertion, in the same number format, to queues of integers.

| testbench | what it checks |
|-----------|----------------|
| `tb_dwt_analysis_level` | db4 and db2 levels against the reference on random data with saturating samples; decimation phase and one-cycle latency |
| `tb_dwt_synthesis_level` | db4 and db2 reconstruction levels; even/odd sample timing with `HOLD_TICKS` = 4 |
| `tb_ecg_delay_line` | 889-sample delay, zero fill, restart after reset |
| `tb_dwt_decomposition` | every a7 and d3 against the reference pyramid; counts and 7/3-cycle latencies |
| `tb_blw_canceller` | `blw`, `ecg_delayed` and `ecg_clean` bit-exact for every sample; a constant input is removed |
| `tb_qrs_decision` | synthetic d3 with beats, T waves, noise, a spike inside the refractory period and an ectopic beat |
| `tb_ecg_dwt_preproc` | whole core at default parameters on 30 s of synthetic ECG with strong baseline wander: bit-exact `blw`/`d3`, wander suppression, one beat per QRS, and a count of every mechanism (learning, beats, refractory rejections, noise updates, odd-sample hand-on) |
| `tb_ecg_dwt_preproc_db2` | whole core with `WAVELET = DB2` (381-sample delay) |
| `tb_ecg_record_like` | whole core at defaults on a 60 s record-like signal: Gaussian P-QRS-T beats, random heart rate 60–100 per minute, wander at 0.2 Hz and 0.55 Hz; bit-exact outputs, wander suppression, and sensitivity and positive predictivity of beat detection (both 100 % on this signal, 75 beats) |

Each testbench runs in well under a second. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ecg_dwt_preproc \
    -y rtl -y tb +libext+.sv rtl/dwt_pkg.sv tb/tb_dwt_ref.sv tb/tb_ecg_dwt_preproc.sv
./obj_dir/Vtb_ecg_dwt_preproc
```

Limits of the verification: the test signals are synthetic (triangular QRS,
T bumps, a sine wander, uniform noise). No recorded ECG was run through the
core, so detection accuracy on real arrhythmia data is unmeasured. The QRS
rules are plausible rather than tuned.
