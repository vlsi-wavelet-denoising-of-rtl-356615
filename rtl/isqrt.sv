// Sequential integer square root: root = floor(sqrt(value)).
//
// Restoring digit-by-digit method, one result bit per clock cycle: the
// remainder takes the next two bits of the radicand, and the trial divisor
// (root << 2 | 1) is subtracted whenever it fits. `start` (one cycle) loads
// `value`; `done` pulses IN_W/2 cycles later with `root` valid, and `root`
// holds until the next start. IN_W must be even. This block computes the
// square root that the threshold rule needs; its algorithm is this
// implementation's choice.
module isqrt #(
  parameter int unsigned IN_W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [IN_W-1:0]     value,
  output logic [IN_W/2-1:0]   root,
  output logic                busy,
  output logic                done
);
  localparam int unsigned OUT_W = IN_W / 2;
  localparam int unsigned CNT_W = $clog2(OUT_W + 1);

  logic [IN_W-1:0]  rad;
  logic [OUT_W+1:0] rem;
  logic [CNT_W-1:0] cnt;
  logic [OUT_W+1:0] rem_next, trial;

  initial assert (IN_W % 2 == 0) else $error("isqrt: IN_W must be even");

  always_comb begin
    rem_next = {rem[OUT_W-1:0], rad[IN_W-1 -: 2]};
    trial    = {root, 2'b01};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rad  <= '0;
      rem  <= '0;
      root <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rad  <= value;
        rem  <= '0;
        root <= '0;
        cnt  <= CNT_W'(OUT_W);
        busy <= 1'b1;
      end else if (busy) begin
        rad <= rad << 2;
        if (rem_next >= trial) begin
          rem  <= rem_next - trial;
          root <= {root[OUT_W-2:0], 1'b1};
        end else begin
          rem  <= rem_next;
          root <= {root[OUT_W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
