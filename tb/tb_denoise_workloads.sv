// Denoising runs at the window sizes of the functional evaluation: the whole
// denoiser with the sigma estimator and with the folded MAD estimator, each at
// N = 64 (windows of 256 samples) and N = 128 (windows of 512 samples), on a
// synthetic spike recording whose background noise is low for the first half
// and high for the second.
//
// Samples come 1040 clock cycles apart (a 12 kHz stream needs far fewer
// cycles per sample than any practical clock provides). Checks, for all four
// instances: every output sample against the behavioural datapath model
// (wd_ref_model) and every threshold update of every level against a value
// worked out here from the delayed detail samples the estimator took (sigma:
// floor(floor(sqrt(K * sum of the last four N-sample sums of squares)) / 2^8);
// MAD: floor(floor((m_a + m_b)/2) * C / 2^14) over the last 4N magnitudes).
// Also reports, per level, how the sigma and MAD thresholds compare at the
// end of each noise segment.
module tb_denoise_workloads;
  import wd_pkg::*;
  localparam int W = 16, L = 4, NI = 4;
  localparam int NS = 2048;
  localparam int GAP = 1040;
  localparam int KIND[NI] = '{0, 1, 0, 1};          // 0 sigma, 1 folded MAD
  localparam int NN[NI]   = '{64, 64, 128, 128};

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] x = '0;
  logic ov [NI];
  logic signed [W-1:0] y [NI];
  logic [W-1:0] th [NI][L];
  logic [L-1:0] upd [NI], clr [NI];
  int ey [NI];
  int checks = 0, failures = 0;
  int hist [NI][L][$];
  int nupd [NI][L];

  wavelet_denoiser #(.N(64),  .ESTIMATOR(EST_SIGMA))      u0 (.clk, .rst_n, .in_valid, .in_sample(x), .out_valid(ov[0]), .out_sample(y[0]), .theta(th[0]), .theta_upd(upd[0]), .cleared(clr[0]));
  wavelet_denoiser #(.N(64),  .ESTIMATOR(EST_MAD_FOLDED)) u1 (.clk, .rst_n, .in_valid, .in_sample(x), .out_valid(ov[1]), .out_sample(y[1]), .theta(th[1]), .theta_upd(upd[1]), .cleared(clr[1]));
  wavelet_denoiser #(.N(128), .ESTIMATOR(EST_SIGMA))      u2 (.clk, .rst_n, .in_valid, .in_sample(x), .out_valid(ov[2]), .out_sample(y[2]), .theta(th[2]), .theta_upd(upd[2]), .cleared(clr[2]));
  wavelet_denoiser #(.N(128), .ESTIMATOR(EST_MAD_FOLDED)) u3 (.clk, .rst_n, .in_valid, .in_sample(x), .out_valid(ov[3]), .out_sample(y[3]), .theta(th[3]), .theta_upd(upd[3]), .cleared(clr[3]));

  for (genvar e = 0; e < NI; e++) begin : g_ref
    wd_ref_model #(.LEVELS(L)) u_ref (.clk, .en(in_valid), .x, .theta(th[e]), .y(ey[e]));
  end

  // delayed detail samples as the estimators take them
  logic signed [W-1:0] dd [NI][L];
  for (genvar j = 0; j < L; j++) begin : g_dd
    assign dd[0][j] = u0.dd[j+1];
    assign dd[1][j] = u1.dd[j+1];
    assign dd[2][j] = u2.dd[j+1];
    assign dd[3][j] = u3.dd[j+1];
  end

  always #5 clk = ~clk;

  initial begin
    repeat (NS * GAP + 10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_theta(int e, int j, int b);
    int n, m, s, w[$];
    longint t, k, v, c, med;
    n = NN[e];
    m = 4 * n;
    if (KIND[e] == 0) begin
      t = 0;
      for (int i = (b - 4) * n; i < b * n; i++) if (i >= 0) begin
        v = hist[e][j][i];
        t += v * v;
      end
      k = longint'(2.0 * $ln(real'(m)) / real'(m - 1) * 65536.0 + 0.5);
      t = t * k;
      v = longint'($sqrt(real'(t)));
      while (v * v > t) v--;
      while ((v + 1) * (v + 1) <= t) v++;
      v = v >> 8;
    end else begin
      for (int i = b * n - m; i < b * n; i++) begin
        s = (i >= 0) ? hist[e][j][i] : 0;
        w.push_back((s < 0) ? -s : s);
      end
      w.sort();
      med = (longint'(w[m/2-1]) + w[m/2]) / 2;
      c = longint'($sqrt(2.0 * $ln(real'(m))) / 0.6745 * 16384.0 + 0.5);
      v = (med * c) >> 14;
    end
    return (v > 65535) ? 65535 : v;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      for (int e = 0; e < NI; e++) begin
        for (int j = 0; j < L; j++) begin
          if (in_valid) hist[e][j].push_back(int'(dd[e][j]));
          if (upd[e][j]) begin
            longint ex;
            nupd[e][j]++;
            ex = ref_theta(e, j, nupd[e][j]);
            checks++;
            if (longint'(th[e][j]) != ex) begin
              failures++;
              $display("inst %0d level %0d update %0d theta=%0d exp %0d", e, j + 1, nupd[e][j], th[e][j], ex);
            end
          end
        end
      end
    end
  end

  always @(negedge clk) begin
    for (int e = 0; e < NI; e++) begin
      if (rst_n && ov[e]) begin
        checks++;
        if (int'(y[e]) != ey[e]) begin
          failures++;
          if (failures < 20) $display("inst %0d out=%0d exp %0d", e, y[e], ey[e]);
        end
      end
    end
  end

  function automatic int stim(int n);
    real v, nz;
    int sp;
    nz = (n < NS / 2) ? 150.0 : 1200.0;
    v = 800.0 * $sin(2.0 * 3.14159265 * n / 500.0);
    v += (real'($urandom_range(0, 1000)) + real'($urandom_range(0, 1000))
        + real'($urandom_range(0, 1000)) - 1500.0) / 1000.0 * nz;
    sp = n % 211;
    if (sp < 10) v += (sp < 4) ? -6000.0 : ((sp < 8) ? 3500.0 : 800.0);
    return int'(v);
  endfunction

  task automatic report(string tag);
    $display("%s: thresholds level1..4  sigma64 %0d %0d %0d %0d | mad64 %0d %0d %0d %0d | sigma128 %0d %0d %0d %0d | mad128 %0d %0d %0d %0d",
             tag, th[0][0], th[0][1], th[0][2], th[0][3], th[1][0], th[1][1], th[1][2], th[1][3],
             th[2][0], th[2][1], th[2][2], th[2][3], th[3][0], th[3][1], th[3][2], th[3][3]);
  endtask

  initial begin
    for (int e = 0; e < NI; e++) for (int j = 0; j < L; j++) nupd[e][j] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      in_valid = 1;
      x = W'(stim(n));
      @(negedge clk);
      in_valid = 0;
      repeat (GAP - 2) @(negedge clk);
      if (n == NS / 2 - 1) report("low noise ");
    end
    report("high noise");
    repeat (100) @(negedge clk);
    for (int e = 0; e < NI; e++) begin
      for (int j = 0; j < L; j++) begin
        checks++;
        if (nupd[e][j] != NS / NN[e]) begin
          failures++;
          $display("inst %0d level %0d updates %0d exp %0d", e, j + 1, nupd[e][j], NS / NN[e]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
