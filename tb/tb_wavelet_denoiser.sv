// End-to-end testbench of wavelet_denoiser, one instance per estimator kind,
// at reduced window sizes (N = 8, so windows of M = 32 samples).
//
// Stimulus: a synthetic extracellular recording generated here: a slow
// sinusoidal drift (period 240 samples, 20 Hz at 12 kHz), uniform-sum noise
// and biphasic spikes every ~150 samples, plus a short burst of full-scale
// samples that drives the recomposition into saturation. One sample every 40
// clock cycles, which leaves the folded sorter time to finish between blocks
// (M = 32 needs about 70 cycles per block of 8 samples).
//
// Checks, for every instance: the output after every sample against a
// behavioural model of the datapath (wd_ref_model) driven by the thresholds
// the instance shows; each threshold update of the sigma instance against a
// direct computation of theta from the delayed detail samples; the folded and
// the unfolded MAD instances must produce the same sequence of thresholds on
// every level. Counts how
// often each mechanism happened and fails if any never did: threshold
// updates on every level, detail samples cleared and kept by the hard
// thresholder, and output saturation.
module tb_wavelet_denoiser;
  import wd_pkg::*;
  localparam int W = 16, L = 4, N = 8;
  localparam int NS = 2000;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] x = '0;
  int checks = 0, failures = 0;

  logic               ov   [3];
  logic signed [W-1:0] os  [3];
  logic [W-1:0]       th   [3][L];
  logic [L-1:0]       upd  [3];
  logic [L-1:0]       clr  [3];
  int                 ey   [3];
  int n_upd[3][L], n_clr[3], n_keep[3], n_sat[3];

  wavelet_denoiser #(.W(W), .LEVELS(L), .N(N), .ESTIMATOR(EST_SIGMA)) u_sig (
    .clk, .rst_n, .in_valid, .in_sample(x), .out_valid(ov[0]), .out_sample(os[0]),
    .theta(th[0]), .theta_upd(upd[0]), .cleared(clr[0]));
  wavelet_denoiser #(.W(W), .LEVELS(L), .N(N), .ESTIMATOR(EST_MAD_FOLDED)) u_fmad (
    .clk, .rst_n, .in_valid, .in_sample(x), .out_valid(ov[1]), .out_sample(os[1]),
    .theta(th[1]), .theta_upd(upd[1]), .cleared(clr[1]));
  wavelet_denoiser #(.W(W), .LEVELS(L), .N(N), .ESTIMATOR(EST_MAD_UNFOLDED)) u_umad (
    .clk, .rst_n, .in_valid, .in_sample(x), .out_valid(ov[2]), .out_sample(os[2]),
    .theta(th[2]), .theta_upd(upd[2]), .cleared(clr[2]));

  for (genvar e = 0; e < 3; e++) begin : g_ref
    wd_ref_model #(.LEVELS(L)) u_ref (.clk, .en(in_valid), .x, .theta(th[e]), .y(ey[e]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (NS * 45 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent check of the sigma thresholds of level 1: collect the delayed
  // level-1 detail (the value the estimator takes at each sample edge).
  longint sq_blk = 0, part[$];
  int nblk = 0;
  longint exp_th1[$];
  longint kq;
  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      longint v, t;
      v = longint'(u_sig.dd[1]);
      sq_blk += v * v;
      nblk++;
      if (nblk == N) begin
        part.push_back(sq_blk);
        if (part.size() > 4) void'(part.pop_front());
        t = 0;
        foreach (part[i]) t += part[i];
        v = longint'($sqrt(real'(t * kq)));
        while (v * v > t * kq) v--;
        while ((v + 1) * (v + 1) <= t * kq) v++;
        v = v >> 8;
        exp_th1.push_back((v > 65535) ? 65535 : v);
        sq_blk = 0;
        nblk = 0;
      end
    end
  end

  // folded and unfolded MAD thresholds must agree update by update
  longint fq[L][$], uq[L][$];
  always @(posedge clk) begin
    for (int j = 0; j < L; j++) begin
      if (rst_n && upd[1][j]) fq[j].push_back(longint'(th[1][j]));
      if (rst_n && upd[2][j]) uq[j].push_back(longint'(th[2][j]));
      while (fq[j].size() != 0 && uq[j].size() != 0) begin
        longint f, u;
        f = fq[j].pop_front();
        u = uq[j].pop_front();
        checks++;
        if (f != u) begin
          failures++;
          $display("level %0d folded theta %0d unfolded %0d", j + 1, f, u);
        end
      end
    end
  end

  always @(posedge clk) begin
    for (int e = 0; e < 3; e++) begin
      for (int j = 0; j < L; j++) if (rst_n && upd[e][j]) n_upd[e][j]++;
    end
    if (rst_n && upd[0][0]) begin
      checks++;
      if (exp_th1.size() == 0) begin
        failures++;
        $display("sigma level-1 update with no block done");
      end else begin
        longint ex;
        ex = exp_th1.pop_front();
        if (longint'(th[0][0]) != ex) begin
          failures++;
          $display("sigma level-1 theta=%0d exp %0d", th[0][0], ex);
        end
      end
    end
  end

  // output checks, one cycle after every sample edge
  always @(negedge clk) begin
    for (int e = 0; e < 3; e++) begin
      if (rst_n && ov[e]) begin
        checks++;
        if (int'(os[e]) != ey[e]) begin
          failures++;
          if (failures < 20) $display("est %0d out=%0d exp %0d", e, os[e], ey[e]);
        end
        if (os[e] == 16'sh7fff || os[e] == -16'sh8000) n_sat[e]++;
        for (int j = 0; j < L; j++) if (clr[e][j]) n_clr[e]++; else n_keep[e]++;
      end
    end
  end

  function automatic int stim(int n);
    real v;
    int sp;
    v = 1500.0 * $sin(2.0 * 3.14159265 * n / 240.0);
    v += real'($urandom_range(0, 300)) + real'($urandom_range(0, 300)) - 300.0;
    sp = n % 150;
    if (sp < 6) v += (sp < 3) ? -4000.0 : 2500.0;
    if (n >= 1200 && n < 1216) v = (n % 2) ? 32767.0 : -32768.0;
    if (v > 32767.0) v = 32767.0;
    if (v < -32768.0) v = -32768.0;
    return int'(v);
  endfunction

  initial begin
    kq = longint'(sigma_const(N));
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      in_valid = 1;
      x = W'(stim(n));
      @(negedge clk);
      in_valid = 0;
      repeat (38) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    for (int e = 0; e < 3; e++) begin
      $display("estimator %0d: updates %0d/%0d/%0d/%0d cleared %0d kept %0d saturated %0d", e,
               n_upd[e][0], n_upd[e][1], n_upd[e][2], n_upd[e][3], n_clr[e], n_keep[e], n_sat[e]);
      for (int j = 0; j < L; j++) begin
        checks++;
        if (n_upd[e][j] == 0) begin failures++; $display("est %0d level %0d never updated", e, j + 1); end
      end
      checks += 3;
      if (n_clr[e] == 0)  begin failures++; $display("est %0d never cleared a sample", e); end
      if (n_keep[e] == 0) begin failures++; $display("est %0d never kept a sample", e); end
      if (n_sat[e] == 0)  begin failures++; $display("est %0d output never saturated", e); end
    end
    for (int e = 0; e < 3; e++) begin
      checks++;
      if (n_upd[e][0] != NS / N) begin failures++; $display("est %0d level-1 updates %0d exp %0d", e, n_upd[e][0], NS / N); end
    end
    checks++;
    if (n_upd[0][0] != NS / N) begin failures++; $display("sigma level-1 updates %0d exp %0d", n_upd[0][0], NS / N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
