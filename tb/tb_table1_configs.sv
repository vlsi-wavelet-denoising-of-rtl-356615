// Testbench for the threshold-estimator configurations whose cost the design
// evaluation compares: the sigma estimator and the folded MAD estimator at
// N = 32, 64 and 128 (windows of 128, 256 and 512 samples) and the unfolded
// MAD estimator at N = 8 (window of 32), all fed with the same stream of
// noise-plus-spike samples.
//
// Samples come 1040 clock cycles apart, enough for the largest folded sorter
// (M = 512: load 513 cycles, at most 512 sort phases) to finish between
// samples. Every threshold update of every instance is compared with a value
// computed here from the sample history: for sigma, floor(floor(sqrt(K *
// sum of the last four N-sample sums of squares)) / 2^8) with K = round(2 ln
// 4N / (4N-1) * 2^16); for MAD, floor(floor((m_a + m_b)/2) * C / 2^14) with
// m_a, m_b the central magnitudes of the last 4N samples and C = round(sqrt(2
// ln 4N) / 0.6745 * 2^14). Each instance must deliver one update per N
// samples.
module tb_table1_configs;
  import wd_pkg::*;
  localparam int W = 16;
  localparam int NI = 7;
  localparam int NS = 640;                       // 5 blocks of 128
  localparam int GAP = 1040;
  localparam int KIND[NI] = '{0, 0, 0, 1, 1, 1, 2};   // 0 sigma, 1 folded, 2 unfolded
  localparam int NN[NI]   = '{32, 64, 128, 32, 64, 128, 8};

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] x = '0;
  logic [W-1:0] th [NI];
  logic [NI-1:0] tv;
  int checks = 0, failures = 0;
  int hist[$];
  int nupd[NI];

  sigma_threshold_estimator #(.W(W), .N(32))  u0 (.clk, .rst_n, .in_valid, .in_data(x), .theta(th[0]), .theta_valid(tv[0]));
  sigma_threshold_estimator #(.W(W), .N(64))  u1 (.clk, .rst_n, .in_valid, .in_data(x), .theta(th[1]), .theta_valid(tv[1]));
  sigma_threshold_estimator #(.W(W), .N(128)) u2 (.clk, .rst_n, .in_valid, .in_data(x), .theta(th[2]), .theta_valid(tv[2]));
  folded_mad_estimator #(.W(W), .N(32))  u3 (.clk, .rst_n, .in_valid, .in_data(x), .theta(th[3]), .theta_valid(tv[3]), .sort_phases(), .sample_held());
  folded_mad_estimator #(.W(W), .N(64))  u4 (.clk, .rst_n, .in_valid, .in_data(x), .theta(th[4]), .theta_valid(tv[4]), .sort_phases(), .sample_held());
  folded_mad_estimator #(.W(W), .N(128)) u5 (.clk, .rst_n, .in_valid, .in_data(x), .theta(th[5]), .theta_valid(tv[5]), .sort_phases(), .sample_held());
  unfolded_mad_estimator #(.W(W), .N(8)) u6 (.clk, .rst_n, .in_valid, .in_data(x), .theta(th[6]), .theta_valid(tv[6]));

  always #5 clk = ~clk;

  initial begin
    repeat (NS * (GAP + 2) + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_sigma(int n, int b);   // b: blocks completed
    longint t, k, v, s;
    t = 0;
    for (int i = (b - 4) * n; i < b * n; i++) if (i >= 0) begin
      s = hist[i];
      t += s * s;
    end
    k = longint'(2.0 * $ln(real'(4 * n)) / real'(4 * n - 1) * 65536.0 + 0.5);
    t = t * k;
    v = longint'($sqrt(real'(t)));
    while (v * v > t) v--;
    while ((v + 1) * (v + 1) <= t) v++;
    v = v >> 8;
    return (v > 65535) ? 65535 : v;
  endfunction

  function automatic longint ref_mad(int n, int b);
    int m, w[$], s;
    longint c, med, v;
    m = 4 * n;
    for (int i = b * n - m; i < b * n; i++) begin
      s = (i >= 0) ? hist[i] : 0;
      w.push_back((s < 0) ? -s : s);
    end
    w.sort();
    med = (longint'(w[m/2-1]) + w[m/2]) / 2;
    c = longint'($sqrt(2.0 * $ln(real'(m))) / 0.6745 * 16384.0 + 0.5);
    v = (med * c) >> 14;
    return (v > 65535) ? 65535 : v;
  endfunction

  always @(posedge clk) begin
    for (int i = 0; i < NI; i++) begin
      if (rst_n && tv[i]) begin
        longint ex;
        nupd[i]++;
        ex = (KIND[i] == 0) ? ref_sigma(NN[i], nupd[i]) : ref_mad(NN[i], nupd[i]);
        checks++;
        if (longint'(th[i]) != ex) begin
          failures++;
          $display("instance %0d (kind %0d, N=%0d) update %0d theta=%0d exp %0d", i, KIND[i], NN[i], nupd[i], th[i], ex);
        end
      end
    end
  end

  initial begin
    int smp;
    for (int i = 0; i < NI; i++) nupd[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      smp = $urandom_range(0, 800) + $urandom_range(0, 800) - 800;
      if (n % 97 < 5) smp += (n % 97 < 2) ? -9000 : 6000;
      hist.push_back(smp);
      @(negedge clk);
      in_valid = 1;
      x = W'(smp);
      @(negedge clk);
      in_valid = 0;
      repeat (GAP - 2) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    for (int i = 0; i < NI; i++) begin
      $display("instance %0d kind %0d N=%0d updates %0d final theta %0d", i, KIND[i], NN[i], nupd[i], th[i]);
      checks++;
      if (nupd[i] != NS / NN[i]) begin failures++; $display("instance %0d updates %0d exp %0d", i, nupd[i], NS / NN[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
