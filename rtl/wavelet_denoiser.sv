// Wavelet denoiser for neural signals: stationary Haar transform, adaptive
// per-level thresholds, hard thresholding and recomposition.
//
// Structure (LEVELS = 4 by default):
//   x -> H1 -> H2 -> H3 -> H4 (last approximation discarded)
//        G1    G2    G3    G4   detail of each level
//        |     |     |     |
//      delay (2*(LEVELS-j) samples) -> threshold estimator -> theta_j
//      delay output -> hard thresholder(theta_j)
//   recomposition: r_L = 0; r_{j-1} = (H'_j r_j + G'_j t_j)/2; y = r_0
// The filters are the undecimated ("a trous") Haar pair with taps spaced
// 2^(j-1) samples apart, so every level runs at the input sample rate. Each
// level has its own estimator and thus its own threshold. Dropping the last
// approximation makes the whole chain a high-pass filter (for 12 kHz input
// and 4 levels it rejects content below about 375 Hz).
//
// ESTIMATOR picks the estimator built on every level: EST_SIGMA (the sample
// standard deviation over a 4N-sample window sliding by N, the default),
// EST_MAD_FOLDED (MAD over the same window with an iterative sorter), or
// EST_MAD_UNFOLDED (MAD over the same window with a combinational sorting
// network, whose size grows as (4N)^2; the two MAD kinds give identical
// thresholds).
//
// Interface: one input sample per `in_valid` pulse (signed, W bits); all
// filter registers advance only on `in_valid`. `out_sample` is updated at the
// clock edge of every `in_valid` and `out_valid` pulses in the cycle after it.
// The output lags the ideal (unpipelined) filter chain by 2*LEVELS samples
// of pipeline latency: an input impulse first shows at the output 8 sampling
// edges later with the defaults. `theta` gives the current threshold of
// each level (index 0 is level 1).
//
// Timing: for EST_SIGMA, N samples must span more than the estimator's update
// time (about 13 + W cycles); for EST_MAD_FOLDED, consecutive samples must be
// about 2M+4 cycles apart (M = 4N). At a 12 kHz sample rate both hold by a
// wide margin for any clock above a few MHz.
//
// Follows the design: four Haar levels, the removed last approximation, the
// detail delays in front of the estimators, one estimator and one hard
// thresholder per level, recomposition by averaging filter pairs. This
// implementation's own: the widths, the delay lengths (derived from its own
// one-register-per-stage pipeline), and the parameter that selects the
// estimator.
module wavelet_denoiser
  import wd_pkg::*;
#(
  parameter int unsigned W         = 16,
  parameter int unsigned LEVELS    = 4,
  parameter int unsigned N         = 64,
  parameter est_kind_e   ESTIMATOR = EST_SIGMA
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_sample,
  output logic                out_valid,
  output logic signed [W-1:0] out_sample,
  output logic [W-1:0]        theta      [LEVELS],
  output logic [LEVELS-1:0]   theta_upd,     // theta of that level changed this cycle
  output logic [LEVELS-1:0]   cleared        // last detail sample of that level was zeroed
);
  logic signed [W-1:0] a   [LEVELS+1];   // a[0] = input, a[j] = approximation j
  logic signed [W-1:0] d   [LEVELS+1];   // d[j] = detail j
  logic signed [W-1:0] dd  [LEVELS+1];   // delayed detail
  logic signed [W-1:0] td  [LEVELS+1];   // thresholded detail
  logic signed [W-1:0] r   [LEVELS+1];   // r[j] = recomposed approximation j

  assign a[0]      = in_sample;
  assign d[0]      = '0;
  assign dd[0]     = '0;
  assign td[0]     = '0;
  assign r[LEVELS] = '0;                 // last approximation removed

  for (genvar j = 1; j <= LEVELS; j++) begin : g_level
    haar_analysis #(.W(W), .LEVEL(j)) u_dec (
      .clk(clk), .rst_n(rst_n), .en(in_valid),
      .x(a[j-1]), .a(a[j]), .d(d[j])
    );

    delay_line #(.W(W), .DEPTH(align_delay(LEVELS, j))) u_dly (
      .clk(clk), .rst_n(rst_n), .en(in_valid), .din(d[j]), .dout(dd[j])
    );

    if (ESTIMATOR == EST_MAD_FOLDED) begin : g_fmad
      folded_mad_estimator #(.W(W), .N(N)) u_est (
        .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(dd[j]),
        .theta(theta[j-1]), .theta_valid(theta_upd[j-1]),
        .sort_phases(), .sample_held()
      );
    end else if (ESTIMATOR == EST_MAD_UNFOLDED) begin : g_umad
      unfolded_mad_estimator #(.W(W), .N(N)) u_est (
        .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(dd[j]),
        .theta(theta[j-1]), .theta_valid(theta_upd[j-1])
      );
    end else begin : g_sigma
      sigma_threshold_estimator #(.W(W), .N(N)) u_est (
        .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(dd[j]),
        .theta(theta[j-1]), .theta_valid(theta_upd[j-1])
      );
    end

    hard_thresholder #(.W(W)) u_thr (
      .clk(clk), .rst_n(rst_n), .en(in_valid),
      .d(dd[j]), .theta(theta[j-1]), .y(td[j]), .cleared(cleared[j-1])
    );

    haar_synthesis #(.W(W), .LEVEL(j)) u_rec (
      .clk(clk), .rst_n(rst_n), .en(in_valid),
      .a(r[j]), .d(td[j]), .y(r[j-1])
    );
  end

  assign out_sample = r[0];

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule
