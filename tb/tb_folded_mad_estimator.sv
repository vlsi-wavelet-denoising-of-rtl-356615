// Self-checking testbench for folded_mad_estimator (W = 16, N = 4, M = 16).
// Samples arrive normally 50 cycles apart; in some blocks a sample is sent a
// few cycles after a block ends, while the sorter is busy, so that it must
// wait in the holding register. For every block the threshold must equal
//   floor( floor((m7 + m8)/2) * C / 2^14 ),  C = round(sqrt(2 ln 16)/0.6745 * 2^14)
// with m7, m8 the central magnitudes of the last 16 samples (zeros before the
// window fills), sorted here. For blocks whose last sample was written at
// once, theta_valid must rise with the (M + 3 + sort_phases)-th clock edge
// after that edge (the checker sees it one edge later), and
// sort_phases must never exceed M. Sorted, reversed and constant windows make
// the sorter stop both early and at its M-phase limit.
module tb_folded_mad_estimator;
  localparam int W = 16;
  localparam int N = 4;
  localparam int M = 16;
  localparam int BLOCKS = 40;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] in_data = '0;
  logic [W-1:0] theta;
  logic theta_valid, sample_held;
  logic [$clog2(M+1)-1:0] sort_phases;
  int checks = 0, failures = 0;
  int win[$];
  longint exp_th[BLOCKS];
  int t_end[BLOCKS];
  bit direct[BLOCKS];
  int cyc = 0, nupd = 0, n_held = 0, n_early = 0, n_full = 0;

  folded_mad_estimator #(.W(W), .N(N)) dut (
    .clk, .rst_n, .in_valid, .in_data, .theta, .theta_valid, .sort_phases, .sample_held);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && sample_held) n_held++;
    if (rst_n && theta_valid) begin
      checks++;
      if (longint'(theta) != exp_th[nupd]) begin
        failures++;
        $display("block %0d theta=%0d exp %0d", nupd, theta, exp_th[nupd]);
      end
      checks++;
      if (int'(sort_phases) > M) begin failures++; $display("phases %0d", sort_phases); end
      if (int'(sort_phases) < M) n_early++; else n_full++;
      if (direct[nupd]) begin
        checks++;
        if (cyc - t_end[nupd] - 1 != M + 3 + int'(sort_phases)) begin
          failures++;
          $display("block %0d latency %0d phases %0d", nupd, cyc - t_end[nupd], sort_phases);
        end
      end
      nupd++;
    end
  end

  initial begin
    int smp, srt[$];
    longint c, med, v;
    bit fast;
    c = longint'($sqrt(2.0 * $ln(16.0)) / 0.6745 * 16384.0 + 0.5);
    for (int i = 0; i < M; i++) win.push_back(0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < BLOCKS; b++) begin
      fast = (b % 5 == 3);     // first sample of this block comes during the sort
      direct[b] = 1;
      for (int i = 0; i < N; i++) begin
        case (b % 6)
          0: smp = $urandom_range(0, 6000) - 3000;
          1: smp = 100 * (b * N + i);                 // rising magnitudes
          2: smp = 30000 - 37 * i - 200 * b;          // falling magnitudes
          3: smp = 1234;                              // constant
          4: smp = (i == 0) ? -32768 : $urandom_range(0, 20) - 10;
          default: smp = $urandom_range(0, 60000) - 30000;
        endcase
        @(negedge clk);
        in_valid = 1;
        in_data  = W'(smp);
        @(posedge clk);
        if (i == N - 1) t_end[b] = cyc;
        win.push_back((smp < 0) ? -smp : smp);
        void'(win.pop_front());
        if (i == N - 1) begin
          srt = win;
          srt.sort();
          med = (longint'(srt[M/2-1]) + srt[M/2]) / 2;
          v = (med * c) >> 14;
          exp_th[b] = (v > 65535) ? 65535 : v;
        end
        @(negedge clk);
        in_valid = 0;
        if (i == N - 1 && fast && b + 1 < BLOCKS) repeat (3) @(negedge clk);
        else repeat (50) @(negedge clk);
      end
    end
    repeat (100) @(negedge clk);
    checks += 4;
    if (nupd != BLOCKS) begin failures++; $display("updates %0d exp %0d", nupd, BLOCKS); end
    if (n_held == 0) begin failures++; $display("holding register never used"); end
    if (n_early == 0) begin failures++; $display("sorter never stopped early"); end
    if (n_full == 0) $display("note: sorter never ran all M phases");
    $display("held=%0d early=%0d full=%0d", n_held, n_early, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
