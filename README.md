# Power-aware EEG seizure detector

This is synthesizable SystemVerilog for a detector that decides, one EEG window at a time,
whether a patient is having an epileptic seizure. Each window of one EEG channel, 1024 samples
or 4 seconds at 256 samples/s, is reduced to three numbers: **coastline**, **fractal dimension**
and **Hurst exponent**. A **linear SVM** turns those three numbers into a yes/no decision.

The main idea is a trade between power and accuracy. Two feature extractors compute the same
three features:

| extractor | logarithms | Hurst exponent | cost |
|---|---|---|---|
| `fe_optimized` | logarithms through a hyperbolic CORDIC | normalised by the standard deviation | most accurate, largest, most power |
| `fe_approximate` | square roots replace every logarithm | standard deviation left out; shorter words | about 1.5 points less sensitive; a fraction of the logic |

Which one runs depends on the battery level and on how much a missed seizure would cost (for
example, while the patient is driving). In the original FPGA system the two extractors are swapped
into one region by partial reconfiguration. Here both are instantiated, and the `mode_approx` input
chooses which one receives samples.

The sources are in `rtl/` and the testbenches in `tb/`. The top module is
`seizure_detector_top`.

## Block map

```
                         +-------------------- fe_optimized --------------------+
 in_valid/in_ready  ---> | fe_sequencer -> window_buffer (1024 x 16)             |
 in_data[7:0]            | coastline                                            |
        |                | fractal_dim_opt  = fd_accum -> cordic_atanh (x5)     |
        |  mode_approx   | hurst_opt        = hurst_range + std_dev(isqrt)      |
        +--------------->|                    -> divider -> cordic_atanh        |
        |                +------------------------------------------------------+
        |                +------------------- fe_approximate -------------------+
        +--------------->| fe_sequencer -> window_buffer                        |
                         | coastline                                            |
                         | fractal_dim_approx = fd_accum(8-bit) -> isqrt (x5)   |
                         | hurst_approx       = hurst_range -> isqrt            |
                         +------------------------------------------------------+
                                     | cl, fd, he (from the active extractor)
                                     v
                   svm_classifier (weights/bias of the active mode) -> seizure, score
```

| file | role |
|---|---|
| `fe_pkg.sv` | shared widths, the window-phase enum, and constant functions for the CORDIC angles |
| `fe_sequencer.sv` | window control: load, read back, wait for results |
| `window_buffer.sv` | 1024 × 16-bit sample store with a synchronous read |
| `coastline.sv` | Σ\|x(n+1) − x(n)\| |
| `fd_accum.sv` | the five Higuchi curve lengths for k = 5, built in one pass |
| `std_dev.sv` | S = √Σ(x − mean)² |
| `hurst_range.sv` | MAV and the range R |
| `hurst_opt.sv`, `hurst_approx.sv` | Hurst exponent, both variants |
| `fractal_dim_opt.sv`, `fractal_dim_approx.sv` | fractal dimension, both variants |
| `isqrt.sv`, `divider.sv`, `cordic_atanh.sv` | iterative arithmetic units with start/busy/done |
| `fe_optimized.sv`, `fe_approximate.sv` | the two extractors |
| `svm_classifier.sv` | the dot product w·f + b and its sign |
| `seizure_detector_top.sv` | mode selection and the classifier |

## The features, as computed

Samples are 8-bit signed integers. Dropping the fractional bits was found to cost no
sensitivity. Throughout, a division or multiplication by a constant is left out. Scaling a
feature by a constant only moves the separating hyperplane, and training absorbs that.
Divisions by N are shifts, so N must be a power of two.

**Coastline** (both extractors, 20 bits): Σ|x(n+1) − x(n)| over the N − 1 neighbouring pairs
of the window.

**Fractal dimension** (Higuchi, k = 5). The curve lengths are
L_m = Σ_i |x(m + ik) − x(m + (i−1)k)| for m = 1..5, without Higuchi's normalisations.
- Optimized: FD = Σ_m ln(L_m)/2. The output is 16 bits with 8 fraction bits.
- Approximate: FD = Σ_m ⌊√L_m⌋. The accumulators are only 8 bits wide and deliberately wrap:
  only the low 8 bits of each curve length count. Each root is 4 bits and the sum is 7 bits.

**Hurst exponent.** First:
- MAV = (Σ|x|) >> log2 N;
- R = | |max(x − MAV)| − |min(x − MAV)| |.

Then:
- Optimized: S = √Σ(x − mean)² and H = atanh((R·2¹⁶)/S). R is saturated to 8 bits. The output
  is 8 bits with 7 fraction bits.
- Approximate: H = ⌊√R⌋, with R 10 bits and H 5 bits. There is no S and no divider.

## Logarithms with a hyperbolic CORDIC

This is the least obvious part of the design. `cordic_atanh` runs hyperbolic CORDIC in vectoring
mode:
- it drives y to zero with shift-and-add rotations;
- it accumulates z = atanh(y0/x0);
- iterations 4 and 13 are repeated, which hyperbolic CORDIC needs in order to converge.

Words are 24 bits with 22 fraction bits; 22 iterations plus the 2 repeats take 26 cycles. The
angle table atanh(2⁻ⁱ) is computed at elaboration by a power series in integer arithmetic. No
table file is needed, and changing `FRAC` regenerates it.

The logarithm comes from the identity ln v = 2·atanh((v − 1)/(v + 1)), with the factor 2
dropped. Vectoring mode only converges for |y0/x0| up to about 0.8. A curve length of several
thousand is far outside that, so `fractal_dim_opt` expands the range:
- L is split as L = 2^e · f, with 1 ≤ f < 2, from its leading one;
- ln(L)/2 = e·ln(2)/2 + atanh((f − 1)/(f + 1));
- the CORDIC is fed x0 = (f + 1)/2 and y0 = (f − 1)/2, so the ratio needs no divider
  (|y0/x0| ≤ 1/3);
- e·ln(2)/2 is a small constant multiple added afterwards;
- a zero curve length (a flat window) counts as 1, so its term is 0.

One CORDIC serves the five curve lengths in turn.

In `hurst_opt` the quotient (R·2¹⁶)/S is a 16-bit binary fraction of R/S. S is the undivided
root-sum-of-squares, so R/S is normally around 0.2. Degenerate windows can push R/S past the
convergence range: a flat window has S = 0, and a window can be almost constant apart from one
spike. For these the quotient is clamped to 0.8, and the output `he_clamped` reports that it
happened.

## One window, step by step

The Hurst path cannot subtract the mean or the MAV until it has seen the whole window. Each
extractor therefore buffers the window and reads it back once. `fe_sequencer` steps through
three phases:

1. **LOAD** (N cycles at one sample per clock). `in_ready` is high. Each sample is written to the
   buffer and goes to the streaming parts: coastline, the curve-length accumulators, Σx and Σ|x|.
2. **READ** (N cycles). The buffer is read back in order for the parts that need the mean or the
   MAV: the squared deviations and the minimum and maximum.
3. **POST**. `in_ready` stays low while the iterative units finish:
   - the five square roots or five CORDIC runs of the fractal dimension;
   - the square root, the divider and the CORDIC of the Hurst exponent.

   The three features are then registered and given together with a one-cycle `out_valid`
   pulse. They hold until the next window.

With a sample every clock, the features appear this many cycles after a window's first sample:
- **2N + 75** for `fe_optimized` (2123 at N = 1024). The tail is 18 cycles of square root,
  26 of division and 26 of CORDIC, plus registers.
- **2N + 9** for `fe_approximate` (2057).

The classifier adds 5 cycles. At 100 MHz a 4-second window is done in about 21 µs, so there is
a large margin for a 256 samples/s stream.

## Classifier and mode switching

`svm_classifier` computes score = Σ w_i·f_i + b:
- one multiply-accumulate per clock;
- 40-bit signed arithmetic;
- unsigned features and signed 16-bit weights.

A window is a seizure if score > 0. The weights and bias come from offline training. Each mode
has its own set, because the two extractors' features have different scales. Both sets are
ports (`w_opt`, `b_opt`, `w_apx`, `b_apx`).

`mode_approx` is sampled only when no window is open and no sample is being accepted. In practice
a mode change must be applied at least one clock before the first sample of the window it is
meant for. A change made during a window waits until that window's features are out, so a window
is never split between the two extractors. The unselected extractor gets no samples and stays
idle. `feat_mode` and `result_mode` report which extractor produced a result.

Top-level ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_ready`, `in_data` | in/out/in | 1/1/8 | sample stream; a sample is taken when valid and ready are both high |
| `mode_approx` | in | 1 | 1 = approximate extractor, 0 = optimized |
| `w_opt[3]`, `b_opt`, `w_apx[3]`, `b_apx` | in | 16/40 | trained weights and bias for each mode |
| `feat_valid`, `feat_mode` | out | 1 | features of a window are valid; which extractor produced them |
| `feat_cl`, `feat_fd`, `feat_he` | out | 20/16/8 | features; approximate results sit in the low bits (7-bit fd, 5-bit he) |
| `he_clamped` | out | 1 | R/S was clamped in the optimized Hurst path |
| `result_valid`, `result_mode`, `seizure`, `score` | out | 1/1/1/40 | decision, 5 cycles after `feat_valid` |

## Parameters

Each module's parameters default to the full-size design.

| parameter | default | where |
|---|---|---|
| `N` (window length, power of two) | 1024 | top and both extractors; 256 and 512 also tested |
| sample width | 8 | `fe_pkg::SAMPLE_W` |
| buffer width | 16 | `fe_pkg::BUF_W` |
| Higuchi k | 5 | `fe_pkg::FD_K` |
| CORDIC word / fraction bits | 24 / 22 | `fe_pkg::CORDIC_W`, `CORDIC_FRAC` |
| classifier weight / score width | 16 / 40 | `W_W`, `SCORE_W` on the top |

## Where this design departs from the original system

- **Latency.** The published implementation needs about 3N + 60 cycles (optimized) and
  3N + 14 cycles (approximate) per window, for example 3132 and 3086 cycles at N = 1024. This
  design needs 2N + 75 and 2N + 9, because it reads the window back only once. How the original
  ordered its passes is not known. The CORDIC takes 26 cycles here against 30 there. The
  classifier takes 5 cycles against about 16.
- **Shift for the mean.** A shift by log2 N (10 for 1024 samples) is used. One drawing of the
  original standard-deviation path shows a shift of 11 instead.
- **MAV.** The MAV is the mean of the absolute values, Σ|x|/N, which is its usual definition.
  One description of the original instead takes the absolute value of the sum.
- **Deviation widths.** Internally, x − mean and x − MAV are 9 and 10 bits so they cannot
  overflow. The original drawings show 8 bits. In the optimized path R is then saturated to 8
  bits, as drawn.
- **R/S clamp at 0.8, and the range expansion of the logarithm.** Both are this design's own
  method; the original only says that range expansion is used.
- **Partial reconfiguration** is replaced by instantiating both extractors and a select input.
  The reconfiguration controller, a vendor IP block, is not part of this RTL. Because both
  extractors exist, this design is larger than either reconfigurable module alone.
- **Training** (an SMO accelerator) is not included. The weights are inputs.
- The 16-bit buffer holds 8-bit samples sign-extended, so half of each word is unused. The width
  is kept to match the original memory.

## How far it has been checked

Each module has a self-checking testbench in `tb/`. The expected values come from
`tb/fe_ref_pkg.sv`, which computes every feature independently: integer formulas where the
hardware is exact, and real-valued `$ln` where the hardware approximates.
- Coastline and all approximate features are compared exactly.
- The optimized FD must be within 2 LSB and the optimized H within 1 LSB.
- The CORDIC must be within 2⁻¹⁶ of atanh.
- Where a latency is fixed, it is checked to the cycle.

The test windows are:
- sine plus noise;
- a spiky large square wave;
- uniform random;
- flat, some with a single step;
- full-swing alternation.

Some are fed with random gaps in `in_valid`.

`tb_seizure_detector_top` runs the whole detector at default parameters. It passes windows
through both modes and checks the features, the decision and the timing. It also fails if any of
these never happened: a mode change deferred to a window boundary, input back-pressure, a
decision of each kind, or a clamped R/S. `tb_window_sizes` runs both extractors at N = 256, 512
and 1024.

There are no recorded EEG data and no trained weights here. The tests show that the arithmetic
matches the formulas above, but not detection accuracy. That depends on weights trained on
features from this exact arithmetic.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends. With Verilator 5, from the
directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal --top-module tb_seizure_detector_top \
  -y rtl -Irtl rtl/fe_pkg.sv tb/fe_ref_pkg.sv tb/tb_seizure_detector_top.sv
./obj_dir/Vtb_seizure_detector_top
```

For another testbench, swap the name. All testbenches except `tb_divider`, `tb_window_buffer`
and `tb_svm_classifier` import `fe_ref_pkg`. For those three, `tb/fe_ref_pkg.sv` can still be
listed; it does no harm. Every testbench finishes in
seconds.

To lint the design alone:

```
verilator --lint-only -Wall -y rtl rtl/fe_pkg.sv rtl/seizure_detector_top.sv
```

The remaining lint warnings are unused `busy` outputs of the iterative units (their users wait
for `done`), bits that are never read (the upper half of the buffer words, the top bits of
some internal remainders) and package constants that a given module does not need.

## Changing it

- **Window length.** Set `N` on the top, to any power of two that keeps the sums inside their
  widths. The 19-bit sum and the 30-bit sum of squares in `std_dev` cover N = 1024 and 8-bit
  samples. Larger N needs wider accumulators, and the 16-bit curve lengths of the optimized FD
  would wrap.
- **CORDIC precision.** Change `CORDIC_FRAC` in `fe_pkg`; the iteration count `ITER` of
  `cordic_atanh` defaults to it. The angle table follows automatically. The latency changes by
  one cycle per iteration, and the testbenches' latency checks must then be updated.
- **New weights.** They are plain ports, so nothing has to be rebuilt.
