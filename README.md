# Self-calibrating pipelined ADC: self-measurement at start-up, sliding histograms in the background

A pipelined ADC built from 1.5-bit stages is only as linear as its stages' residue
amplifiers. Each stage should multiply its input by exactly 2 and subtract exactly
D·Vref. In silicon, three things spoil this:

* capacitor mismatch `eps`, which makes the gains `2+eps` and `1+eps`,
* finite amplifier gain, `gamma1 < 1`,
* a cubic term `gamma3` in the amplifier.

A stage then produces

    V_r   = (2 + eps)·V_in − (1 + eps)·D·Vref
    V_res = gamma1·V_r + gamma3·V_r^3

Inverting this to third order gives the stage input from the digitized residue
`D_res` and the stage decision `D ∈ {−1, 0, +1}`:

    D_in = (D_res + a3·D_res^3 + a1·D) / g
    g = gamma1·(2 + eps),  a1 = gamma1·(1 + eps),  a3 = −gamma3 / gamma1^3

This RTL computes `D_in` for every stage, from the last stage to the first. It
finds the three coefficients of every stage itself, in two phases:

1. **Start-up (foreground) self-measurement.** A few coarse DC levels from a
   resistor ladder go through the stage's own signal paths. The stages behind it
   digitize the result, and two LMS loops fit `a1`, `a3` and then `g`. The levels
   need not be accurate. They only need to stay constant while they are measured.
2. **Background tracking with sliding histograms.** In normal operation, the
   largest residue just below each comparator threshold moves with `g` and `a1`.
   Two very short histograms per stage follow these maxima. Their ratio to the
   values recorded right after start-up gives new `g` and `a1` as temperature and
   supply drift.

The default configuration is a 12-bit converter: two 1.5-bit stages and an ideal
10-bit backend.

## Hierarchy

```
pipelined_adc_top            converter: analog models + calibration processor
├── cal_ladder               (behavioural) ladder + switch array, 5 levels
├── mdac_stage ×NUM_STAGES   (behavioural) 1.5-bit stage with muxes 1-3
├── backend_adc              (behavioural) ideal BE_BITS-bit converter
└── calib_core               synthesizable calibration processor
    ├── calib_ctrl           phase sequencer
    ├── random_selector      3-bit random level index (LFSR)
    ├── stage_corrector ×N   D_in = (D_res + a3 D_res^3 + a1 D)/g
    ├── lms_alpha            LMS step for a1, a3
    ├── lms_gain             LMS step for g
    └── coef_tracker ×N      background tracking of g, a1
        ├── sliding_histogram ×2   (decision D = 0 and D = −1)
        └── seq_divider            64-cycle restoring divider
```

`calib_pkg` holds the shared fixed-point type, the phase enumeration and the
coefficient struct. Everything under `calib_core` is synthesizable: about 1.1k
word-level cells and 2.1k flip-flops at the default sizes. The three analog
blocks use `real` signals and exist for simulation only.

## Start-up calibration: why three phases, and why `g` must be measured

The stage under calibration has three analog multiplexers, driven by
`stage_phase`:

| phase    | input path (Mux 1) | sub-DAC path (Mux 2) | to backend (Mux 3) | what is learnt |
|----------|--------------------|----------------------|--------------------|----------------|
| `PH_BE`  | zero               | D·Vref               | **V_cal**          | `D_cal`: the backend's own reading of the level |
| `PH_C1`  | zero               | **V_cal**            | V_res              | `a1`, `a3` |
| `PH_C2`  | **V_cal**          | **V_cal**            | V_res              | `g` |
| `PH_NORMAL` | V_in            | D·Vref               | V_res              | — |

In `PH_C1` the residue obeys `D_res + a3·D_res^3 + a1·D_cal ≈ 0`. LMS then
minimises

    e1 = D_res + a3·D_res^3 + a1·D_cal
    a1 ← a1 − mu1·e1·D_cal,   a3 ← a3 − mu3·e1·D_res^3

In `PH_C2` the input and sub-DAC terms almost cancel, leaving
`(g − a1)·D_cal − D_res − a3·D_res^3 ≈ 0`, and

    e2 = (g − a1)·D_cal − D_res − a3·D_res^3
    g ← g − mu_g·e2·D_cal

The classic self-measurement scheme assumes `g = 2` and learns only `a1` and
`a3`. That works for a single stage with an ideal backend. It fails for a chain:
an unmeasured gain error in a later stage scales the backend through which every
earlier stage is measured. The earlier stages' `a1` values then become
inconsistent with their inputs, and the output is distorted. Measuring `g` too
removes this, so the stages can be calibrated one after the other. Calibration
starts at the last stage, whose backend is the ideal converter. Each earlier
stage then uses the already-calibrated stages behind it as its backend.

**Sequencing (calib_ctrl).** A `start` pulse resets every coefficient to
`g=2, a1=1, a3=0`. For each stage, last first, the controller then runs
`FG_ITERS` iterations of `PH_BE → PH_C1 → PH_C2`, one conversion cycle each.
The random selector draws a new level before every `PH_BE`. That level is held
for the whole iteration, because `D_cal` must belong to the two residues
measured after it. After the first stage, the controller pulses `fg_done` and
enters normal operation with tracking. Foreground calibration lasts
`3·FG_ITERS·NUM_STAGES` cycles, which is 24 576 cycles by default.

**Calibration levels.** `random_selector` takes the low byte of a 16-bit
maximal-length LFSR modulo 5 as a 3-bit index. `cal_ladder` maps the index to
1, 4, 8, 12 or 15 sixteenths of Vref. Each tap has a fixed error below 2^-7 Vref,
which the calibration does not care about.

**Step sizes.** These are powers of two, so each update is a shift:
mu1 = 2^-4, mu3 = 1, mu_g = 2^-4 (`MU*_SHIFT` parameters). The two regressors
`D_cal` and `D_res^3` are strongly correlated over only five levels, so the
`a3` direction converges slowly. With smaller steps, `a3` was still 20 % off
after 40 000 iterations. With these values all three coefficients settle in
about 3 000 iterations.

## Background tracking: the sliding histogram

In normal operation, amplifier nonlinearity and comparator offsets are assumed
not to drift. The stage then follows `D_in = (D_res + a1·D)/g`. Just below the
+Vref/4 threshold (D = 0) the residue peaks at `D_res,max1 = g·D_in1`. Just
below −Vref/4 (D = −1) it peaks at `D_res,max2 = g·D_in2 + a1`. The threshold
inputs `D_in1` and `D_in2` do not change. So, from reference maxima recorded
right after start-up and new maxima measured later:

    R      = D_res,max1,new / D_res,max1,ref
    g_new  = g_ref · R
    a1_new = D_res,max2,new − R · (D_res,max2,ref − a1_ref)

**Finding the maximum cheaply.** Both maxima lie in the upper half of the stage's
backend code range, which has 2^(N−1) codes. A full histogram would need that
many counters. Instead, `sliding_histogram` keeps a window of 2n counters,
`counts[0..2n−1]`. The lower half is H1 and the upper half is H2. The window
starts at code L = 2^(N−1) and only ever moves up. For each code k:

* **case 1**, `k` is in the window: its counter is incremented;
* **case 2**, `k` is in the n codes just above the window: the window moves up
  by n. The upper half keeps its counts and becomes the lower half. The new upper
  half starts at zero, and `k` is counted;
* **case 3**, `k` is further above: the window is re-centred to `[k−n+1, k+n]`,
  all counters are cleared, and `k` is counted;
* codes below the window are ignored.

After a round, the window sits on the top of the residue distribution. Near the
threshold, noise makes a few codes appear only rarely. Such a bin is much lower
than its neighbours, so it is discarded. The reported maximum is the highest bin
holding at least half the count of the tallest bin (`NOISE_SHIFT = 1`). The
default is n = 4, giving 8 counters per histogram and 16 per stage, against
1024 for a full histogram on the first stage. Pick n above about three times the
noise standard deviation in LSBs.

**Rounds (coef_tracker).** One tracker per stage watches that stage's backend
code. For the last stage this is the backend converter's code. For an earlier
stage it is the corrected output of the stages behind it, quantized to
`BE_BITS + (later stages)` bits, so 11 bits for the first stage. One histogram
takes the samples with D = 0 and the other those with D = −1. A round lasts
`HIST_SAMPLES` conversions, 2·10^6 by default. The first round after
calibration only stores the references, together with the `g` and `a1` in use
at that moment. Every later round divides (64 cycles) and pulses `upd`, and
`calib_core` loads the new `g` and `a1`. The references are never replaced, so
estimation errors do not accumulate from round to round.

## Numbers and timing

* All digital values are signed Q11.20 (`fx_t`, 32 bits) in units of Vref.
  Products are truncated toward −∞.
* A backend code maps to the centre of its bin, `(code + ½)/2^(B−1) − 1`.
  Using the lower edge biased every LMS estimate by half an LSB.
* `stage_corrector` is combinational. It uses one 64-by-32-bit division per
  stage, and `calib_core` registers the outputs. `dout` and `dout_code` (12-bit
  two's complement, rounded and saturated) follow the returned sample by one
  cycle. In the top level that is two cycles after `vin` is sampled.
  `dout_valid` marks samples taken in normal operation.
* The analog side returns the decisions and the backend code `ADC_LATENCY`
  cycles after `stage_phase` is applied (1 in the top level). The core delays
  its phase tags to match.
* The stages are evaluated in the same cycle, and their decisions are sampled
  with the backend code. This stands in for the decision-alignment delay line of
  a real pipeline.

## Behavioural analog models

`mdac_stage` implements the residue equation above, a sub-ADC with comparator
offsets `OFFSET_P`/`OFFSET_N`, and the three multiplexers. Its `eps`, `gamma1`
and `gamma3` are variables, so a testbench can change them at run time to model
drift (`dut.g_stage[0].u_stage.gamma1 = 0.95;`). The top-level defaults are
eps = −0.2 %, gamma1 = 0.99 and gamma3 = −0.5 %, with fixed comparator offsets
within ±Vref/8. `backend_adc` truncates ideally. Circuit noise is not part of
the models. The testbenches add it to `vin` and, through the ladder's `noise`
variable (0 unless driven), to the calibration levels.

## How well it works

Results from `tb_pipelined_adc_top`, at default sizes. The input is a full-scale
sine plus Gaussian-like noise of 1.4·10^-4 Vref, which alone limits 12 bits to
about 11.5 effective bits. The calibration levels carry independent noise of
5·10^-4 Vref. ENOB is taken from the residual of a line fit, so
gain and offset errors do not count.

| condition | ENOB |
|-----------|------|
| uncalibrated (ideal coefficients) | 7.6 |
| after start-up calibration | 11.3 |
| first stage drifts to eps = −0.4 %, gamma1 = 0.95 | 6.6 |
| after one tracking round (2·10^6 samples) | 10.7 |

After calibration, g and a1 of both stages are within 0.003 of their analytic
values, and a3 is within 0.0012. The noise on the levels matters. The ideal
10-bit backend digitizes the five fixed levels with up to half an LSB of error.
Without noise, nothing dithers that error away, and the last stage's g and a3
end 0.007 and 0.005 off, for an ENOB of 11.0. With the noise, the LMS loops
average the error out. Noise much above 10^-3 Vref makes a3 jitter, because the
step sizes are fixed. The gain is about 3.8 bits, against the more than 4 bits
reported for this technique. Part of the gap is the input noise: it alone caps
ENOB near 11.5 here, which allows at most about 3.9 bits of gain from 7.6.

`tb_spectrum` measures the same conditions with a 4096-point FFT of a
coherent full-scale sine (383 cycles per record, no window). A second
converter on the same input runs the conventional self-measurement, in which
g is taken as 2 in every stage (`MEASURE_G = 0`):

| condition | SNDR | SFDR | SNDR, g = 2 | SFDR, g = 2 |
|-----------|------|------|-------------|-------------|
| uncalibrated | 47.4 dB | 48.2 dB | 47.4 dB | 48.2 dB |
| after start-up calibration | 68.7 dB | 82.8 dB | 53.8 dB | 56.5 dB |
| after the drift above | 41.5 dB | 44.0 dB | | |
| after one tracking round | 66.8 dB | 71.4 dB | | |

With g fixed, the second stage's gain error lands in the first stage's a1
and a3, and the result improves by only about 6 dB. Measuring g removes the
harmonics almost entirely. Tracking brings SNDR back to within 2 dB, but SFDR
stays about 11 dB short. The reason is that a drop of gamma1 from 0.99 to 0.95
also moves a3 = −gamma3/gamma1^3 from 0.0052 to 0.0058, and tracking corrects
only g and a1. This is another limit of the method; a new start-up
calibration fixes it.

`tb_histogram_inputs` shows that the maxima do not depend on the input
statistics. With a sine, a slow ramp and uniform random input, the first stage's
sliding histograms end on the same two maxima (codes 1589 and 1487 with these
offsets). In each case a thin bin above the maximum is discarded as noise.

## Departures and choices to be aware of

* Not specified by the technique, and chosen here: the number format, the step
  sizes, `FG_ITERS = 4096`, the LFSR-based selector, the noisy-bin rule (half the
  peak), fixed references, a round length in total conversions, tracking on
  every stage (the technique's demonstration tracks only the first), and
  counting the code that triggers a slide.
* Comparator-offset drift and drift of the cubic term are not tracked. This is a
  limit of the method, not of this implementation.
* There is no explicit averaging of repeated measurements. The small LMS steps
  do that averaging.
* The foreground phase runs only on `start`. Nothing re-runs it automatically.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. For example, for the
end-to-end test:

```
verilator --binary --timing --assert -Irtl rtl/calib_pkg.sv -y rtl -y tb \
    tb/tb_pipelined_adc_top.sv --top-module tb_pipelined_adc_top
./obj_dir/Vtb_pipelined_adc_top
```

This takes about 6 s: 24 576 calibration cycles plus three 2·10^6-sample
tracking rounds. The checks in it:

* the phase and iteration counts, and that all five levels are used,
* the coefficients against `gamma1(2+eps)`, `gamma1(1+eps)` and
  `−gamma3/gamma1^3`,
* ENOB above 10.5 and a gain of at least 3 bits after calibration, and a
  recovery of at least 1 bit after tracking,
* that every mechanism occurs at least once: slide cases 1, 2 and 3, a
  discarded noisy bin and a tracking update.

`tb_spectrum` is built the same way and runs about 8 s. It checks the FFT on an
ideal 12-bit tone first, then checks the SNDR and SFDR changes in the table
above, with a few dB of margin.

The unit testbenches `tb_<module>.sv` compare each block with independent
real-valued references. `tb_sliding_histogram` replays the three-sample example
(1000 → 1010 → 1110 with one-bin histograms), checks the sliding rules against
a behavioural model, and checks noisy-bin removal on a population of 377, 345,
250, 370 and 113 samples on codes 1317 to 1321. The expected maximum there is
1320.

To change the converter, set `NUM_STAGES`, `BE_BITS`, `HIST_BINS`,
`HIST_SAMPLES` and `FG_ITERS` on `pipelined_adc_top` (`MEASURE_G = 0` gives the
conventional calibration for comparison), or use `calib_core` with
your own analog front end. The front end must honour `stage_phase` and
`cal_sel`, and return `d[]` and `be_code` after `ADC_LATENCY` cycles.
