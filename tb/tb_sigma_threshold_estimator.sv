// Self-checking testbench for sigma_threshold_estimator (W = 16, N = 8).
// Feeds blocks of 8 samples whose amplitude changes from block to block, one
// sample every 6 clock cycles. For every block the expected threshold is
//   floor( floor(sqrt(K * (s_b + s_{b-1} + s_{b-2} + s_{b-3}))) / 2^8 )
// with s the sum of squares of a block (missing blocks count as 0) and
// K = round(2 ln 32 / 31 * 2^16), all worked out here from the samples. Also
// checks that theta_valid rises with the 36th (10 + 26) clock edge after the
// edge taking the last sample of a block (26 = width of the root for these sizes).
module tb_sigma_threshold_estimator;
  localparam int W = 16;
  localparam int N = 8;
  localparam int BLOCKS = 14;
  localparam int LAT = 36;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] in_data = '0;
  logic [W-1:0] theta;
  logic theta_valid;
  int checks = 0, failures = 0;
  longint s[BLOCKS];
  longint exp_th[BLOCKS];
  int cyc = 0, t_end[BLOCKS], nupd = 0;

  sigma_threshold_estimator #(.W(W), .N(N)) dut (.clk, .rst_n, .in_valid, .in_data, .theta, .theta_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint isqrt_ref(longint v);
    longint r;
    r = longint'($sqrt(real'(v)));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  // checker: every theta_valid must carry the next expected value, on time
  always @(posedge clk) begin
    if (rst_n && theta_valid) begin
      checks += 2;
      if (longint'(theta) != exp_th[nupd]) begin
        failures++;
        $display("block %0d theta=%0d exp %0d", nupd, theta, exp_th[nupd]);
      end
      if (cyc - t_end[nupd] - 1 != LAT) begin
        failures++;
        $display("block %0d latency %0d exp %0d", nupd, cyc - t_end[nupd], LAT);
      end
      nupd++;
    end
  end

  initial begin
    longint k, tot, v;
    int amp, smp;
    k = longint'(2.0 * $ln(32.0) / 31.0 * 65536.0 + 0.5);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < BLOCKS; b++) begin
      amp = (b == 5) ? 32767 : 50 + 400 * (b % 4);
      s[b] = 0;
      for (int i = 0; i < N; i++) begin
        smp = (b == 5) ? ((i % 2) ? -32768 : 32767) : $urandom_range(0, 2 * amp) - amp;
        s[b] += longint'(smp) * smp;
        @(negedge clk);
        in_valid = 1;
        in_data  = W'(smp);
        @(posedge clk);
        if (i == N - 1) t_end[b] = cyc;
        @(negedge clk);
        in_valid = 0;
        repeat (4) @(negedge clk);
      end
      tot = 0;
      for (int j = b - 3; j <= b; j++) if (j >= 0) tot += s[j];
      v = isqrt_ref(tot * k) >> 8;
      exp_th[b] = (v > 65535) ? 65535 : v;
    end
    repeat (60) @(negedge clk);
    checks++;
    if (nupd != BLOCKS) begin failures++; $display("updates %0d exp %0d", nupd, BLOCKS); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
