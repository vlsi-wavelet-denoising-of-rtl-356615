// Hard thresholding of one detail signal.
//
// A detail sample whose magnitude is below the threshold theta is cleared to
// zero; a sample at or above it passes unchanged:
//   y = (|d| < theta) ? 0 : d
// The magnitude is taken on W+1 bits so that the most negative input is
// handled exactly. The output is registered and advances when `en` is high:
// one sample of latency. `theta` may change at any time; the value present at
// the sampling edge is used. Hard (not soft) thresholding follows the design;
// the treatment of |d| == theta and the output register are this
// implementation's choices.
module hard_thresholder #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] d,
  input  logic        [W-1:0] theta,
  output logic signed [W-1:0] y,
  output logic                cleared   // the sample taken at the last `en` was zeroed
);
  logic [W:0] mag;

  always_comb begin
    mag = d[W-1] ? (W+1)'(-(W+1)'(d)) : (W+1)'(d);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y       <= '0;
      cleared <= 1'b0;
    end else if (en) begin
      cleared <= (mag < (W+1)'(theta));
      y       <= (mag < (W+1)'(theta)) ? '0 : d;
    end
  end
endmodule
