# Similarity-index early seizure detector

This is a small, multiplier-free streaming circuit. It watches one channel of
8-bit neural recording (intracranial or scalp EEG) and raises a trigger when
the signal's *similarity index* changes abruptly. A closed-loop implant can use
that trigger to start electrical stimulation, ideally before a seizure shows
clinically. The similarity index, also called the Hurst or Hölder exponent H,
measures long-range correlation in a time series. A change in H marks a change
in how the brain signal depends on its own past, and such a change comes with
the electrical onset of a seizure.

The design estimates H once per window of samples. It compares each estimate
with the long-term mean of past estimates, and fires when the deviation
exceeds two thresholds: a fixed one and one that scales with how noisy the
estimate has been.

## How H is estimated without multipliers or dividers

For a fractional-Brownian-like signal, the size of a second difference grows
with its lag as lag^H. The detector takes second differences at lags 1 and 2
over a window of N samples and sums their magnitudes:

    V_N = sum_{i=1}^{N-2} |X(i+2) - 2 X(i+1) + X(i)|
    W_N = sum_{i=1}^{N-4} |X(i+4) - 2 X(i+2) + X(i)|

Doubling the lag scales each term by 2^H, so

    H_e = log2(W_N / V_N) = log2(W_N) - log2(V_N).

Three simplifications keep the hardware tiny:

* **Absolute values instead of squares.** The textbook estimator uses squared
  differences and carries a factor 1/2. With magnitudes the ratio is 2^H
  directly, so no halving is applied. Only deviations of H_e against
  thresholds matter later, so this is only a matter of scale.
* **Shifts instead of multiplies.** The factor 2 in the filters is a shift, and
  all tunable parameters are powers of two.
* **A logarithm from a 64-bit table.** `sid_log2` finds the leading one at
  bit p, which gives the integer part, and looks up the four bits below it in
  a 16 x 4-bit table holding `round(16*log2(1+m/16))`. The result is log2 with
  4 fractional bits. The ratio becomes a subtraction of two logs.
  `sid_hurst_est` converts W_N and then V_N through the same table in two
  cycles.

Some edge cases are worth knowing:

* A window with a constant signal has V_N = W_N = 0. log2(0) is defined as 0,
  so such a window gives H_e = 0.
* H_e is a signed Q3.4 word (range [-8, 8), step 1/16), saturated.
* Uncorrelated noise gives H_e near 0. A slow, large oscillation gives a
  value near 2: with a 16-sample period the lag-2 differences are about four
  times the lag-1 ones.

## From estimate to trigger

1. **Averaging** (`sid_smoother`). Single-window estimates are noisy. They pass
   through `y += (x - y) / 2^avg_shift`. Setting `avg_shift = 0` turns
   averaging off.
2. **Long-term mean and spread** (`sid_stats`, built from two `sid_block_avg`).
   * The mean is the average of a block of M window estimates, with
     M = 128 or 256 set by `m_sel`. One accumulator adds the estimates; at the
     end of the block a shift divides by M and the result is stored. No buffer
     of past estimates exists, so the mean refreshes once per block rather
     than sliding.
   * The spread stands in for the variance. It is the block average of
     |H_e - mean| (absolute value, not square), with deviations taken against
     the previous block's stored mean.
3. **Decision** (`sid_trigger`). For window j:

       trigger = |H_e(j) - mean| > ftp  AND  |H_e(j) - mean| > 2^vpp_log2 * spread

   `ftp` is the fixed threshold (unsigned Q4.4). `2^vpp_log2` is the
   variance-pegged factor, applied as a shift. A noisy record raises the
   second threshold and so suppresses false alarms. Both are tuned per patient
   and recording setup, for example from ROC curves on labelled data. The
   trigger level holds until the next window's decision.

**Warm-up.**
* The mean is valid after one block and the spread after two.
* Until both are valid, the trigger is forced low and `stats_valid` is low.
* At N = 256, M = 256 and 20 kS/s, the mean takes 3.3 s and the decision
  starts after 6.6 s.
* This is a one-time latency after reset.

## Pipeline, interface and timing

| stage | module | latency |
|---|---|---|
| window sums V_N, W_N | `sid_diff_accum` | `win_valid` 1 cycle after the window's last sample |
| H_e = log2 W - log2 V | `sid_hurst_est` (+ `sid_log2`) | 2 cycles |
| averaging | `sid_smoother` | 1 cycle |
| mean / spread | `sid_stats` (+ `sid_block_avg` x2) | updated with the decision |
| threshold decision | `sid_trigger` | 1 cycle |

Top level: `sid_detector_top`. The shared word formats and helpers are in
`sid_pkg`.

**Inputs**

| port | meaning |
|---|---|
| `sample` | 8-bit unsigned ADC code |
| `sample_valid` | sample strobe. Samples may come every cycle or with gaps, so any clock at or above the sample rate works. |
| `rst_n` | synchronous, active low |
| `m_sel` | 0: M = 128, 1: M = 256 |
| `ftp` | Q4.4 fixed threshold |
| `vpp_log2` | exponent of the variance-pegged factor, 0..7 |
| `avg_shift` | averaging weight exponent, 0..3 |

The configuration inputs are meant to be static while the detector runs.
Change them only with no window in flight.

**Outputs**

| port | meaning |
|---|---|
| `trig_valid` | pulses 5 cycles after the window's last sample is presented |
| `trigger` | the decision for that window |
| `he`, `he_valid` | averaged estimate and its strobe |
| `mean`, `var_abs`, `stats_valid` | long-term mean, spread and their valid flag |
| `mean_upd`, `var_upd` | one-cycle pulses at each block refresh |

**Parameters**

| parameter | default | meaning |
|---|---|---|
| `WIN_LOG2` | 8 | window N = 256 samples |
| `M_LOG2_SHORT` | 7 | M = 128 |
| `M_LOG2_LONG` | 8 | M = 256 |

The window sums are `9 + WIN_LOG2` bits wide.

**Size.** At the defaults, coarse synthesis gives about 240 flip-flop bits,
the 64-bit log table and a handful of adders and comparators. There are no
multipliers and no RAM.

## What is fixed by the architecture and what is chosen here

These points follow the published architecture:
* the estimator from second differences at lags 1 and 2, with absolute values
* the log lookup table of 64 bits
* the 8-bit sample and estimate word
* the mean over 128 or 256 windows from one adder and a stored register
* the two-threshold trigger with power-of-two parameters

These are choices made in this RTL, where the architecture is silent:
* **Window length.** N = 256 is picked so the warm-up stays within seconds
  at 20 kS/s.
* **Log table layout.** The leading-one/mantissa split and base 2.
* **Estimate scale.** The dropped factor 1/2 (see above).
* **Number formats.** Q3.4 and Q4.4.
* **Averager.** The first-order form.
* **Spread.** The spread lags the mean by one block, which doubles the
  warm-up to two blocks.
* **Mean refresh.** The block (not sliding) mean.
* **Warm-up.** The trigger is suppressed during warm-up.
* **Handshake and reset.** A valid strobe and a synchronous reset.

Not included:
* The analog front end: electrodes, amplifier, ADC.
* The biphasic stimulator and its controller. `trigger` is the port where the
  controller would connect.
* More than one channel. The detector serves one channel. Covering a
  64-plus-channel array needs one instance per channel, or a
  time-multiplexed version with per-channel state.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module against a reference written from the algorithm (`tb/sid_ref_pkg.sv`,
where the log table is computed with real arithmetic) and checks latencies:

| testbench | what it covers |
|---|---|
| `tb_sid_log2` | all 2^17 inputs |
| `tb_sid_diff_accum` | random, full-scale alternating and sinusoidal windows with random input gaps |
| `tb_sid_hurst_est` | random sums including zero and saturating ratios |
| `tb_sid_smoother` | all four weights |
| `tb_sid_stats` | blocks of 8/16, with the block length switched at and inside a block |
| `tb_sid_trigger` | random operands; counts decisions made by each threshold and by warm-up suppression |

The end-to-end runs share `tb/sid_top_harness.sv`. It feeds a synthetic
recording to the detector and checks every window's estimate, mean, spread,
valid flag, trigger and latency against the reference. The recording mixes
three kinds of window:
* background noise (H_e near 0)
* seizure-like windows: a large 16-sample-period oscillation
* silent windows

It runs in two phases:
1. M short, no averaging
2. M long, averaging on

The harness fails the run if any of these never happens:
* warm-up suppression
* mean and spread refreshes
* a trigger in each seizure episode
* both block lengths
* averaging on and off
* a silent window
* sample gaps

Two testbenches use the harness:
* `tb_sid_detector_top` runs at N = 32, M = 8/16.
* `tb_sid_detector_full` runs at the default sizes: 868 windows of 256
  samples, which covers two 128-window blocks of warm-up and two 256-window
  blocks.

A third testbench uses it too:
* `tb_sid_detector_recording` runs at the default sizes for the length of a
  long clinical record: 30 hours of one channel at 256 Hz. That is 27.6
  million samples, or about 110,000 one-second windows, with six seizure
  episodes. It checks sustained operation over a long record against the
  reference. A 10-hour record with seven seizures differs only in length. It
  runs in about 15 s.

In all three, every seizure episode triggers and no background window does.
The full-size run takes well under a second.

To simulate, for example, the full-size run:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/sid_pkg.sv tb/sid_ref_pkg.sv tb/tb_sid_detector_full.sv \
        --top-module tb_sid_detector_full -o sim
    ./obj_dir/sim

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

**Limits of the evidence.** The detector has been checked against a
bit-accurate model of this design on synthetic signals. It has not been run on
real EEG, so the thresholds in the testbenches (`ftp` = 1.0,
`vpp_log2` = 1) are illustrative, not clinical settings.
