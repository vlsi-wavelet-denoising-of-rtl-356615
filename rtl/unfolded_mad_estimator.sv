// Threshold estimator based on the MAD, with an unfolded (combinational) sorter.
//
// A shift register holds the magnitudes of the last M detail samples and moves
// by one at every input sample. A fully unrolled odd-even transposition
// network of compare-and-swap cells (M stages, alternating between the pairs
// (0,1),(2,3),... and (1,2),(3,4),...) sorts the window combinationally, in
// descending order since each cell swaps when its first input is smaller. The
// median is the mean of the two central outputs and
//   theta = median * sqrt(2 ln M) / 0.6745
// with the constant on MAD_C_FRAC fractional bits (wd_pkg::mad_const).
//
// The network output changes with every sample; a down-sampling hold
// register (downsample_hold) passes it on once every N samples, so that with
// M = 4N the window slides by N samples with three quarters overlap, exactly
// as in the other two estimators, and gives the same thresholds as the folded
// MAD estimator.
//
// Interface: `in_valid` marks a new detail sample `in_data` (signed, W bits).
// `theta` (unsigned, W bits, saturated) is 0 after reset and is updated once
// every N samples: `theta_valid` rises with the clock edge after the one that
// takes the N-th sample of a block, together with the new `theta`. The window
// registers reset to zero.
//
// The critical path runs through M comparators and the area grows as M^2/2
// cells, which is why this form only suits small windows. What follows the
// design: delay registers that present the window, the network of sorting
// cells with the swap-if-A<B rule, the mean of the two central elements and
// the constant multiplier, the down-sampling of the threshold. This
// implementation's own: the widths, and M stages rather than the M-1 steps quoted for the
// network (odd-even transposition needs M stages in general).
module unfolded_mad_estimator
  import wd_pkg::*;
#(
  parameter int unsigned W = 16,
  parameter int unsigned N = 8,
  parameter int unsigned M = 4 * N
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic        [W-1:0] theta,
  output logic                theta_valid
);
  // scaling constant, MAD_C_FRAC fractional bits; above 4 for M >= 64
  localparam int unsigned CB = 20;
  localparam logic [CB-1:0] C = CB'(mad_const(M));

  initial assert (M % 2 == 0 && M >= 2) else $error("unfolded_mad_estimator: M must be even");

  logic [W-1:0]   win [M];            // window of magnitudes, win[0] newest
  logic [W-1:0]   hi_mid, lo_mid;     // the two central outputs of the network
  logic [W-1:0]   mag;
  logic [W:0]     mid_sum;
  logic [W-1:0]   med;
  logic [W+CB-1:0] scaled;
  logic [W-1:0]   theta_now;          // threshold of the current window

  assign mag = in_data[W-1] ? W'(-in_data) : W'(in_data);

  // One generate block per stage, each with its own arrays, so that no
  // array spans several stages.
  for (genvar s = 0; s < M; s++) begin : g_stage
    logic [W-1:0] vi [M];   // values entering stage s
    logic [W-1:0] vo [M];   // values leaving stage s
    for (genvar k = 0; k < M; k++) begin : g_in
      if (s == 0) begin : g_first
        assign vi[k] = win[k];
      end else begin : g_next
        assign vi[k] = g_stage[s-1].vo[k];
      end
    end
    for (genvar k = 0; k < M; k++) begin : g_pos
      if ((k % 2) == (s % 2) && k + 1 < M) begin : g_cell
        logic unused_swp;
        sort_cell #(.W(W)) u_cell (
          .a(vi[k]), .b(vi[k+1]), .hi(vo[k]), .lo(vo[k+1]), .swp(unused_swp)
        );
      end else if (!((k % 2) != (s % 2) && k > 0)) begin : g_pass
        // not the lower element of a pair of this stage: passes through
        assign vo[k] = vi[k];
      end
    end
  end

  assign lo_mid = g_stage[M-1].vo[M/2];
  assign hi_mid = g_stage[M-1].vo[M/2-1];

  always_comb begin
    mid_sum = (W+1)'(hi_mid) + (W+1)'(lo_mid);
    med     = mid_sum[W:1];
    scaled  = ((W+CB)'(med) * (W+CB)'(C)) >> MAD_C_FRAC;
    theta_now = (scaled > (W+CB)'({W{1'b1}})) ? {W{1'b1}} : scaled[W-1:0];
  end

  downsample_hold #(.W(W), .N(N)) u_down (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .d(theta_now),
    .q(theta), .q_valid(theta_valid)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < M; i++) win[i] <= '0;
    end else if (in_valid) begin
      win[0] <= mag;
      for (int i = 1; i < M; i++) win[i] <= win[i-1];
    end
  end
endmodule
