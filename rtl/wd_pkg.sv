// Shared types and elaboration-time constants of the wavelet denoiser.
//
// The threshold of every decomposition level follows the "Universal" rule:
//   MAD-based:   theta = median(|d|) / 0.6745 * sqrt(2 ln M)
//   sigma-based: theta = sqrt( sum_{k=1..4} s_k / (4N-1) ) * sqrt(2 ln M),  M = 4N
// The real-valued factors are turned into fixed-point integers here, when the
// design is elaborated, so no floating point reaches the hardware.
package wd_pkg;

  // Which threshold estimator a denoiser instance carries on every level.
  typedef enum logic [1:0] {
    EST_SIGMA        = 2'd0,  // sample standard deviation on a sliding window
    EST_MAD_FOLDED   = 2'd1,  // MAD with an iterative (folded) odd-even sorter
    EST_MAD_UNFOLDED = 2'd2   // MAD with a combinational (unfolded) sorting network
  } est_kind_e;

  // Fractional bits of the MAD scaling constant (1/0.6745 * sqrt(2 ln M)).
  localparam int unsigned MAD_C_FRAC = 14;
  // Fractional bits of the sigma scaling constant (2 ln M / (4N-1)).
  localparam int unsigned SIGMA_K_FRAC = 16;

  // round( sqrt(2 ln M) / 0.6745 * 2^MAD_C_FRAC )
  function automatic int unsigned mad_const(int unsigned m);
    real k;
    k = $sqrt(2.0 * $ln(real'(m))) / 0.6745;
    return int'(k * (2.0 ** MAD_C_FRAC) + 0.5);
  endfunction

  // round( 2 ln(4N) / (4N-1) * 2^SIGMA_K_FRAC ): theta^2 = K * sum of the 4 partial sums
  function automatic int unsigned sigma_const(int unsigned n);
    real k;
    k = 2.0 * $ln(real'(4 * n)) / real'(4 * n - 1);
    return int'(k * (2.0 ** SIGMA_K_FRAC) + 0.5);
  endfunction

  // Delay (in samples) put on the detail of level j so that it meets the
  // recomposed approximation of level j with the same pipeline latency.
  // Every filter stage and every thresholder adds one register.
  function automatic int unsigned align_delay(int unsigned levels, int unsigned j);
    return 2 * (levels - j);
  endfunction

endpackage
