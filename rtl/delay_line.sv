// Sample-enabled delay line.
//
// Delays a signed W-bit stream by DEPTH samples: the registers shift only in a
// clock cycle where `en` is high, so the delay is counted in samples, not in
// clock cycles. With DEPTH = 0 the input is passed straight through. Used to
// line up the detail signal of each decomposition level with the recomposed
// approximation it is added to; the design places such delays between the
// detail filters and the threshold estimators. Registers reset to zero
// (reset is active low, synchronous).
module delay_line #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);
  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic signed [W-1:0] r [DEPTH];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) r[i] <= '0;
      end else if (en) begin
        r[0] <= din;
        for (int i = 1; i < DEPTH; i++) r[i] <= r[i-1];
      end
    end
    assign dout = r[DEPTH-1];
  end
endmodule
