# Wavelet denoiser for neural signals, with adaptive threshold estimation

Extracellular neural recordings carry spikes buried in broadband background
noise whose spectrum overlaps the spikes. Wavelet denoising removes that noise
in three steps. The signal is split into frequency bands. In every band the
small coefficients, which are mostly noise, are set to zero. The bands are
then added back together. The hard part in hardware is not the filter bank but
choosing the threshold of every band while data streams in. The classic choice
is the median absolute deviation (MAD), and it needs a sort over a window of
hundreds of samples. The alternative is the sample standard deviation, which
needs one squaring accumulator.

This RTL implements the complete denoiser with three interchangeable threshold
estimators:

| estimator | idea | cost |
|---|---|---|
| `EST_SIGMA` (default) | σ from sums of squares over a sliding window | one multiplier, a 4-word RAM, a serial square root |
| `EST_MAD_FOLDED` | MAD by an iterative odd-even sorter over the window | M registers, M-1 comparators, M-word RAM |
| `EST_MAD_UNFOLDED` | MAD by a fully unrolled sorting network | about M²/2 comparators, long combinational path |

The architecture follows the one published in *VLSI Wavelet Denoising of
Neural Signals – Critical Appraisal of Different Algorithmic Solutions for
Threshold Estimation* (N. Carta, D. Pani, L. Raffo). That design was built as a
Simulink/System Generator model. This is an independent SystemVerilog
implementation of it, and every choice the original leaves open is listed
below.

## Signal chain

```
 in_sample ─► H1 ─► H2 ─► H3 ─► H4 ─► (discarded)
              │G1    │G2    │G3    │G4
              ▼      ▼      ▼      ▼
            delay  delay  delay    │        delay = 2·(LEVELS−j) samples
            6 smp  4 smp  2 smp    │
              ├──────┼──────┼──────┼──► threshold estimator j ─► θj
              ▼      ▼      ▼      ▼
            hard   hard   hard   hard       t = (|d| < θ) ? 0 : d
              │      │      │      │
 out ◄── R1 ◄─┴─ R2 ◄┴─ R3 ◄┴─ R4 ◄┘◄── 0   Rj = (H'j·r + G'j·t) / 2
```

* **Stationary ("à trous") Haar transform.** The signal is not decimated
  between levels. Level *j* uses the Haar pair with its two taps spread
  D = 2^(j−1) samples apart. Every band therefore runs at the input rate and
  the transform is shift-invariant.
  * analysis: `a = (x + x[n−D]) / 2` and `d = (x − x[n−D]) / 2` (`haar_analysis`)
  * synthesis: `y = ((a + a[n−D]) + (d[n−D] − d)) / 2` (`haar_synthesis`)

  With these filters an unmodified signal is rebuilt exactly, delayed by D
  samples, up to one LSB of rounding.
* **Four levels, last approximation dropped.** The recomposition at level 4
  receives zero instead of the level-4 approximation. The whole chain is then
  a high-pass filter. At a 12 kHz sample rate it removes content below roughly
  375 Hz, which lies outside the neural band.
* **One estimator and one hard thresholder per level.** The levels have
  different noise levels, so each gets its own θ.

## Pipeline alignment

All registers of the datapath advance only on `in_valid`, so every delay is
counted in samples, not in clock cycles. Each analysis stage, each thresholder
and each synthesis stage has one output register. The detail of level *j*
reaches its recomposition stage after *j* + 1 registers. The recomposed
approximation of the level below it has gone through more stages: 4 + 1 + 1
registers for level 4, plus one for every level in between. The delay of
`2·(LEVELS − j)` samples in front of estimator and thresholder *j* makes the two
arrive together. The output is the ideal (unpipelined) filter output delayed
by `2·LEVELS` = 8 extra samples. An impulse at the input first shows at the
output 8 sampling edges later. These delay lengths come from this
implementation's own pipeline; the original's delays (12 and 14 samples on
levels 2 and 1) reflect the latencies of its own blocks.

## Threshold estimation

All three estimators implement the "universal" threshold `θ = σ̂ · sqrt(2 ln M)`.
The window has M = 4N samples and slides by N samples, so consecutive windows
overlap by three quarters. θ is updated once every N samples. After reset it is
0, and it builds up over the first 4N samples (the initial transient).

### σ estimator (`sigma_threshold_estimator`)

Detail signals have zero mean, so no mean needs to be subtracted.

1. Every sample is squared and added to an accumulator.
2. After N samples the sum `s` is written into one word of a 4-word single-port
   RAM used as a circular buffer, and the accumulator restarts.
3. A small controller reads the four words back into four registers and adds
   them.
4. It multiplies the total by `K = 2 ln M / (4N−1)`, a constant held on 16
   fractional bits.
5. A serial digit-by-digit square root (`isqrt`) gives `θ = sqrt(K · Σs)`,
   shifted right by 8 to remove the fraction.

This is `σ = sqrt(Σs / (4N−1))` and `θ = σ·sqrt(2 ln M)` folded into one square
root. An update takes 10 + R clock cycles after the last sample of a block,
where R is the width of the root: 38 cycles at the defaults.

### Folded MAD estimator (`folded_mad_estimator`)

The MAD estimate used here is the median of |d|, divided by 0.6745 to give σ.

1. The magnitudes of the last M samples live in an M-word single-port RAM.
2. At every block end, a finite-state machine copies the RAM into M registers
   (M + 1 cycles, shifted in one word per cycle).
3. It then sorts them by **odd-even transposition**. Two banks of
   compare-and-swap cells work on the pairs (0,1),(2,3),… and (1,2),(3,4),…,
   and the banks take turns, one phase per clock cycle. A cell swaps its pair
   when the first value is smaller, and raises `swp` when it does.
4. Sorting stops after two consecutive phases in which no `swp` was raised.
   One quiet phase is not enough, because the other bank may still have work.
   In the worst case it stops after M phases.
5. The median is the mean of the two central registers. It is multiplied by
   `sqrt(2 ln M)/0.6745`, held on 14 fractional bits.

The RAM port is busy while the sorter loads. A sample that arrives during load
or sort waits in a one-entry holding register and is written once the sorter
is idle. A block therefore costs up to `2M + 3` cycles, and samples must be
spaced so that at most one arrives in that time. An assertion flags a second
one.

### Unfolded MAD estimator (`unfolded_mad_estimator`)

A shift register holds the last M magnitudes. A fully unrolled odd-even
network of M stages (`sort_cell` instances) sorts them combinationally. The
median and scaling are the same as in the folded estimator. A down-sampling
hold register (`downsample_hold`) passes the result on once per N samples.
With the same M it produces exactly the same thresholds as the folded
estimator, and the top-level testbench checks this update by update. Its area
grows as M²/2 and its critical path as M, so it only suits small windows. Its
default is N = 8, M = 32.

## Number formats

| signal | format |
|---|---|
| samples, approximations, details, output | signed 16 bit (`W`) |
| θ | unsigned 16 bit, saturated |
| squares / partial sums / total (σ, N = 64) | 31 / 37 / 39 bit unsigned |
| K (σ) | 16 fractional bits: `round(2 ln 4N / (4N−1) · 2^16)` |
| C (MAD) | 20-bit word, 14 fractional bits: `round(sqrt(2 ln M)/0.6745 · 2^14)` |

Both constants are computed when the design is elaborated, from `$ln` and
`$sqrt`, in `wd_pkg`. The halvings in the filters are arithmetic shifts
(floor). Recomposition saturates to 16 bits.

## Top-level interface (`wavelet_denoiser`)

| parameter | default | meaning |
|---|---|---|
| `W` | 16 | sample width |
| `LEVELS` | 4 | decomposition levels |
| `N` | 64 | update period; window M = 4N = 256 |
| `ESTIMATOR` | `EST_SIGMA` | `EST_SIGMA`, `EST_MAD_FOLDED` or `EST_MAD_UNFOLDED` (from `wd_pkg`) |

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset |
| `in_valid`, `in_sample[W]` | in | one pulse per input sample |
| `out_valid`, `out_sample[W]` | out | `out_sample` changes at each sampling edge; `out_valid` pulses the cycle after |
| `theta[LEVELS][W]` | out | current threshold of each level (index 0 = level 1) |
| `theta_upd[LEVELS]` | out | that level's threshold changed this cycle |
| `cleared[LEVELS]` | out | that level's last detail sample was set to zero |

Throughput limits, with samples marked by `in_valid`:

* σ: N samples must take more than 10 + R clock cycles (38 at the defaults).
* Folded MAD: at most one sample may arrive during a load-and-sort of about
  2M cycles.
* Unfolded MAD: one sample per clock.

At 12 kHz all three are far inside the limits for any clock of a few MHz or
more.

## Where this implementation makes its own choices

* **Widths, reset, handshake.** None are specified in the original. 16-bit
  samples, a synchronous active-low reset that clears everything (the RAMs
  included), and a sample-enable (`in_valid`) style throughout.
* **Square root in hardware.** The original leaves σ's square root outside the
  logic. Here it is a serial integer square root, and the two scaling steps are
  merged into one constant.
* **Sort stop rule.** The original stops when the `swp` flags of "the last
  iteration" are all zero. Here an iteration is both banks, so two quiet
  phases in a row are required. The M-phase bound matches the original's M/2
  iterations.
* **Unfolded network depth.** It has M stages. The original quotes M−1 steps,
  but odd-even transposition needs M stages for every input order.
* **Unfolded window.** M = 4N, with the threshold down-sampled every N samples.
  The original reports that its two MAD versions give identical results, which
  requires the same window and update rate.
* **Level-4 recomposition.** It keeps the 0.5 gain like every other level,
  treating level 4 as the average of its detail branch and the removed
  approximation.
* **Scaling constant for M = 64.** The original's value is 4.27460. This code
  computes 4.27588 from the formula, a difference of 0.03 %.
* **Estimator choice.** `ESTIMATOR` is a build-time parameter. The original
  builds each variant as a separate system.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>`, and a watchdog stops it if it hangs.

| testbench | what it checks |
|---|---|
| `tb_delay_line`, `tb_haar_analysis`, `tb_haar_synthesis`, `tb_hard_thresholder`, `tb_downsample_hold` | bit-exact against formulas worked out from the input history under random sample enables. Includes saturation, the most negative input and \|d\| = θ. An analysis+synthesis pair must rebuild its input to within 1 LSB. |
| `tb_isqrt` | the square-root helper: every 8-bit input, and random values, perfect squares and their neighbours at 32 and 56 bits. `done` must rise exactly IN_W/2 edges after `start`. |
| `tb_sigma_threshold_estimator` | every θ against an integer reference of the formula; update latency exactly 36 cycles (N = 8) |
| `tb_folded_mad_estimator` | every θ against a sorted-window reference (N = 4); latency M + 3 + phases; phases ≤ M; held samples; early and full-length sorts |
| `tb_unfolded_mad_estimator` | every θ against a sorted-window reference (N = 2, M = 8) and its timing |
| `tb_wavelet_denoiser` | the three estimator variants side by side (N = 8). Checks every output sample against a behavioural model of the datapath (`wd_ref_model`) and the σ thresholds against their formula. Checks that the folded and unfolded MAD thresholds are equal. Requires threshold updates on every level, cleared and kept samples, and output saturation to occur. |
| `tb_wavelet_denoiser_full` | the top with every parameter at its default (σ, N = 64): 3000 samples, every output and every threshold of all four levels |
| `tb_table1_configs` | σ and folded MAD at N = 32, 64, 128 (windows up to 512) and unfolded MAD at N = 8, each update against its reference |
| `tb_denoise_workloads` | the whole denoiser with σ and with folded MAD at N = 64 and N = 128, on a signal whose noise is low for 1024 samples and high for the next 1024. Checks every output sample and every threshold update, and prints the thresholds at the end of each half. |

The input signals are synthetic: drift, noise and biphasic spikes generated in
the testbenches. No recorded neural data is included.

In `tb_denoise_workloads` the spike train is dense (one spike every 211
samples). With low noise, the spike energy sets the σ thresholds: they are 6 to
16 times the MAD thresholds (level 1 at N = 64: 1211 against 187). With high
noise the two estimators agree more closely (2007 against 1555). This is the
effect a median-based estimate is meant to avoid. Going from N = 64 to N = 128
changes the thresholds by a few percent.

Run a testbench with plain Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/wd_pkg.sv tb/tb_wavelet_denoiser_full.sv --top-module tb_wavelet_denoiser_full
./obj_dir/Vtb_wavelet_denoiser_full
```

All testbenches also pass with random initial register values
(`+verilator+rand+reset+2`).

## Files

* `rtl/wd_pkg.sv`: estimator enum, fixed-point constants, alignment-delay rule
* `rtl/wavelet_denoiser.sv`: top level
* `rtl/haar_analysis.sv`, `rtl/haar_synthesis.sv`, `rtl/delay_line.sv`: filter bank
* `rtl/sigma_threshold_estimator.sv`, `rtl/isqrt.sv`, `rtl/sp_ram.sv`: σ estimator
* `rtl/folded_mad_estimator.sv`, `rtl/unfolded_mad_estimator.sv`, `rtl/sort_cell.sv`, `rtl/downsample_hold.sv`: MAD estimators
* `rtl/hard_thresholder.sv`: thresholding
* `tb/`: the testbenches above and the reference model `wd_ref_model.sv`

## Limits

* The RTL has been simulated, not synthesised for timing. The unfolded
  estimator at large windows is impractical by construction.
* No soft thresholding. The original uses hard thresholding only.
* The original's resource figures came from a different implementation
  flow. This RTL does not try to reproduce its LUT and register counts.
