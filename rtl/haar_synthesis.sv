// One recomposition level of the stationary Haar wavelet transform.
//
// Level j rebuilds the approximation a_{j-1} from the (recomposed)
// approximation a_j and the thresholded detail d_j:
//   H'_j(z) = 1 + z^-D,   G'_j(z) = z^-D - 1,   D = 2^(j-1)
//   y[n]    = ( H'_j a_j + G'_j d_j ) / 2
// i.e. each filter of the couple is followed by a gain of 0.5 and the two
// results are added (the outputs of the pair are averaged sample by sample).
// With the analysis filters of haar_analysis this gives y[n] = x[n-D] when no
// detail sample is modified (perfect reconstruction up to rounding). The sum is
// saturated to W bits and registered: one sample of latency. Registers advance
// only when `en` is high. The mirrored Haar filters and the averaging follow
// the design; the normalisation split, saturation and output register are this
// implementation's choices.
module haar_synthesis #(
  parameter int unsigned W     = 16,
  parameter int unsigned LEVEL = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] a,   // recomposed approximation of this level
  input  logic signed [W-1:0] d,   // thresholded detail of this level
  output logic signed [W-1:0] y    // approximation of the level above
);
  localparam int unsigned D = 1 << (LEVEL - 1);
  localparam logic signed [W+1:0] MAXV = (W+2)'((1 << (W - 1)) - 1);
  localparam logic signed [W+1:0] MINV = -(W+2)'(1 << (W - 1));

  logic signed [W-1:0] ad, dd;
  logic signed [W+1:0] tot, half;

  delay_line #(.W(W), .DEPTH(D)) u_a_taps (
    .clk(clk), .rst_n(rst_n), .en(en), .din(a), .dout(ad)
  );
  delay_line #(.W(W), .DEPTH(D)) u_d_taps (
    .clk(clk), .rst_n(rst_n), .en(en), .din(d), .dout(dd)
  );

  always_comb begin
    // H'(a) + G'(d) = a + a[n-D] + d[n-D] - d
    tot  = (W+2)'(a) + (W+2)'(ad) + (W+2)'(dd) - (W+2)'(d);
    half = tot >>> 1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y <= '0;
    end else if (en) begin
      if (half > MAXV)      y <= MAXV[W-1:0];
      else if (half < MINV) y <= MINV[W-1:0];
      else                  y <= half[W-1:0];
    end
  end
endmodule
