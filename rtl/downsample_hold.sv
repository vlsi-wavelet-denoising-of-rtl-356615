// Down-sampling hold register for a threshold.
//
// Counts input samples (`in_valid` pulses) in blocks of N and, in the clock
// cycle after the edge that takes the N-th sample of a block, copies `d` into
// `q` and pulses `q_valid`. `q` holds between updates and is 0 after reset.
// It turns a threshold that is recomputed at every sample into one that
// changes once every N samples, like the down-sample block the design places
// after each threshold estimator; the one-cycle offset, which lets `d` settle
// on the window that includes the N-th sample, is this implementation's
// choice.
module downsample_hold #(
  parameter int unsigned W = 16,
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         q_valid
);
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  logic [CW-1:0] cnt;
  logic          take;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= '0;
      take    <= 1'b0;
      q       <= '0;
      q_valid <= 1'b0;
    end else begin
      take    <= 1'b0;
      q_valid <= 1'b0;
      if (in_valid) begin
        if (cnt == CW'(N - 1)) begin
          cnt  <= '0;
          take <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
      if (take) begin
        q       <= d;
        q_valid <= 1'b1;
      end
    end
  end
endmodule
