// One decomposition level of the stationary ("a trous") Haar wavelet transform.
//
// Level j splits the approximation a_{j-1} into
//   a_j[n] = (x[n] + x[n-D]) / 2      low-pass  H_j(z) = (1 + z^-D)/2
//   d_j[n] = (x[n] - x[n-D]) / 2      high-pass G_j(z) = (1 - z^-D)/2
// with D = 2^(j-1): instead of decimating, the filter taps are spread apart by
// a delay line of D samples, one power of two longer per level, as in the
// design's transposed-form filters (for two taps, delaying x and halving after
// the adder is the same as delaying x/2). The halving is an arithmetic shift (floor),
// so both outputs keep the input width. Both outputs are registered: one sample
// of latency. All registers advance only when `en` (one pulse per input
// sample) is high. The Haar filters and the power-of-two tap spacing follow the
// design; the divide-by-two normalisation, the widths and the output register
// are this implementation's choices.
module haar_analysis #(
  parameter int unsigned W     = 16,
  parameter int unsigned LEVEL = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] a,
  output logic signed [W-1:0] d
);
  localparam int unsigned D = 1 << (LEVEL - 1);

  logic signed [W-1:0] xd;
  logic signed [W:0]   sum, dif;

  delay_line #(.W(W), .DEPTH(D)) u_taps (
    .clk(clk), .rst_n(rst_n), .en(en), .din(x), .dout(xd)
  );

  always_comb begin
    sum = {x[W-1], x} + {xd[W-1], xd};
    dif = {x[W-1], x} - {xd[W-1], xd};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a <= '0;
      d <= '0;
    end else if (en) begin
      a <= sum[W:1];
      d <= dif[W:1];
    end
  end
endmodule
