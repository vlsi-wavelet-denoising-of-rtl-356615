// Threshold estimator based on the sample standard deviation of a detail signal.
//
// Works on a sliding window of M = 4N samples that advances by N samples
// (three quarters overlap). Every detail sample is squared and added to an
// accumulator; after N samples the partial sum s = sum d^2 is written into one
// of four words of a single-port RAM used as a circular buffer, and the
// accumulator restarts. The four stored partial sums are then read back into
// four registers and added, and since the detail signals have zero mean the
// threshold of the Universal rule is
//   theta = sigma * sqrt(2 ln M),  sigma = sqrt( (s1+s2+s3+s4) / (4N-1) )
// computed here as theta = sqrt( K * (s1+s2+s3+s4) ) with the elaboration-time
// constant K = 2 ln M / (4N-1) on SIGMA_K_FRAC fractional bits, followed by a
// sequential square root (isqrt) and a shift by SIGMA_K_FRAC/2.
//
// Interface: `in_valid` marks a new detail sample `in_data` (signed, W bits).
// `theta` (unsigned, W bits, saturated) holds the current threshold; it is 0
// after reset and is updated once every N samples, `theta_valid` pulsing in
// the cycle it changes. Words not yet written count as zero, so the threshold
// grows during the first 4N samples (initial transient).
//
// Timing: theta_valid rises 10 + R_W clock cycles after the edge that takes
// the N-th sample of a block (write 1, read 5, multiply 1, square root start
// 1 and R_W steps, hand-over 1, output 1), R_W being the width of the root. The next block must not end before that, i.e. N samples
// must span more than UPDATE_CYCLES clock cycles; an assertion checks it.
//
// What follows the design: squaring and accumulation per sample, the N-sample
// partial sums, the 4-word single-port RAM as circular buffer, the four
// registers and adder tree, equations (4)-(6). This implementation's own: the
// widths, the merged constant K, and the hardware square root (the design
// leaves the square root outside the logic).
module sigma_threshold_estimator
  import wd_pkg::*;
#(
  parameter int unsigned W = 16,
  parameter int unsigned N = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  output logic        [W-1:0] theta,
  output logic                theta_valid
);
  localparam int unsigned SQ_W  = 2 * W - 1;                 // |d|^2 <= 2^(2W-2)
  localparam int unsigned S_W   = SQ_W + $clog2(N);          // one partial sum
  localparam int unsigned T_W   = S_W + 2;                   // sum of four
  localparam int unsigned P_W0  = T_W + SIGMA_K_FRAC;        // times K (K < 1)
  localparam int unsigned P_W   = P_W0 + (P_W0 % 2);         // even, for isqrt
  localparam int unsigned R_W   = P_W / 2;
  localparam int unsigned CNT_W = (N > 1) ? $clog2(N) : 1;
  localparam logic [SIGMA_K_FRAC-1:0] K = SIGMA_K_FRAC'(sigma_const(N));

  typedef enum logic [2:0] {S_IDLE, S_WRITE, S_READ, S_MUL, S_ROOT, S_OUT} state_e;

  state_e            state;
  logic [CNT_W-1:0]  cnt;        // samples taken in the current block
  logic [S_W-1:0]    acc;        // running sum of squares
  logic [S_W-1:0]    s_new;      // finished partial sum, waiting to be written
  logic [1:0]        wptr;       // next RAM word to overwrite
  logic [2:0]        rcnt;       // read sequencer
  logic [S_W-1:0]    part [4];   // partial sums read back from the RAM
  logic [T_W-1:0]    total;
  logic [P_W-1:0]    prod;

  logic [SQ_W-1:0]   sq;
  logic              ram_we;
  logic [1:0]        ram_addr;
  logic [S_W-1:0]    ram_rdata;
  logic              root_start, root_done;
  logic [R_W-1:0]    root;
  logic [R_W-1:0]    th_full;

  always_comb begin
    sq       = SQ_W'(in_data * in_data);
    ram_we   = (state == S_WRITE);
    ram_addr = (state == S_WRITE) ? wptr : rcnt[1:0];
    total    = T_W'(part[0]) + T_W'(part[1]) + T_W'(part[2]) + T_W'(part[3]);
    th_full  = root >> (SIGMA_K_FRAC / 2);
  end

  sp_ram #(.DW(S_W), .DEPTH(4)) u_ram (
    .clk(clk), .clr(!rst_n), .we(ram_we), .addr(ram_addr),
    .wdata(s_new), .rdata(ram_rdata)
  );

  isqrt #(.IN_W(P_W)) u_sqrt (
    .clk(clk), .rst_n(rst_n), .start(root_start), .value(prod),
    .root(root), .busy(), .done(root_done)
  );

  // Per-sample accumulation of d^2 over blocks of N samples.
  logic block_end;
  assign block_end = in_valid && (cnt == CNT_W'(N - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt   <= '0;
      acc   <= '0;
      s_new <= '0;
    end else if (in_valid) begin
      if (block_end) begin
        cnt   <= '0;
        acc   <= '0;
        s_new <= acc + S_W'(sq);
      end else begin
        cnt <= cnt + 1'b1;
        acc <= acc + S_W'(sq);
      end
    end
  end

  // Controller: store the partial sum, read back all four, scale, square root.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      wptr        <= '0;
      rcnt        <= '0;
      prod        <= '0;
      theta       <= '0;
      theta_valid <= 1'b0;
      root_start  <= 1'b0;
      for (int i = 0; i < 4; i++) part[i] <= '0;
    end else begin
      theta_valid <= 1'b0;
      root_start  <= 1'b0;
      case (state)
        S_IDLE: if (block_end) state <= S_WRITE;
        S_WRITE: begin
          wptr  <= wptr + 1'b1;
          rcnt  <= '0;
          state <= S_READ;
        end
        S_READ: begin
          // address rcnt is presented now, its word arrives next cycle
          if (rcnt != 3'd0) part[rcnt[1:0] - 2'd1] <= ram_rdata;
          rcnt <= rcnt + 1'b1;
          if (rcnt == 3'd4) state <= S_MUL;
        end
        S_MUL: begin
          prod       <= P_W'(total) * P_W'(K);
          root_start <= 1'b1;
          state      <= S_ROOT;
        end
        S_ROOT: if (root_done) state <= S_OUT;
        S_OUT: begin
          theta       <= (th_full > R_W'({W{1'b1}})) ? {W{1'b1}} : W'(th_full);
          theta_valid <= 1'b1;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A block must not end while the previous one is still being processed.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    block_end |-> (state == S_IDLE))
    else $error("sigma_threshold_estimator: block of N samples ended before the previous threshold update finished");

endmodule
