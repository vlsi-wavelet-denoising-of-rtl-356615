// Full-size testbench of wavelet_denoiser with every parameter at its default
// (16-bit samples, 4 levels, sigma estimator, N = 64: windows of 256 samples).
//
// Runs 3000 samples of a synthetic recording (drift, noise, biphasic spikes
// and a larger-noise second half), one sample every 2 clock cycles. Checks the
// output after every sample against the behavioural datapath model
// (wd_ref_model) and every threshold update, on all four levels, against
// theta = floor(floor(sqrt(K * sum of the last four 64-sample sums of
// squares)) / 2^8) computed here from the delayed detail samples, with
// K = round(2 ln 256 / 255 * 2^16). Fails if a level never updates, or if no
// detail sample is ever cleared or kept.
module tb_wavelet_denoiser_full;
  localparam int W = 16, L = 4, N = 64;
  localparam int NS = 3000;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] x = '0, y;
  logic ov;
  logic [W-1:0] th [L];
  logic [L-1:0] upd, clr;
  int ey;
  int checks = 0, failures = 0;
  int n_upd[L], n_clr = 0, n_keep = 0;

  wavelet_denoiser dut (
    .clk, .rst_n, .in_valid, .in_sample(x), .out_valid(ov), .out_sample(y),
    .theta(th), .theta_upd(upd), .cleared(clr));

  wd_ref_model #(.LEVELS(L)) u_ref (.clk, .en(in_valid), .x, .theta(th), .y(ey));

  always #5 clk = ~clk;

  initial begin
    repeat (NS * 3 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // delayed detail of every level, as the estimators take it
  logic signed [W-1:0] dd [L];
  assign dd[0] = dut.dd[1];
  assign dd[1] = dut.dd[2];
  assign dd[2] = dut.dd[3];
  assign dd[3] = dut.dd[4];

  longint kq;
  longint acc[L], part[L][$], expq[L][$];
  int cnt[L];

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      for (int j = 0; j < L; j++) begin
        longint v, t;
        v = longint'(dd[j]);
        acc[j] += v * v;
        cnt[j]++;
        if (cnt[j] == N) begin
          part[j].push_back(acc[j]);
          if (part[j].size() > 4) void'(part[j].pop_front());
          t = 0;
          foreach (part[j][i]) t += part[j][i];
          t = t * kq;
          v = longint'($sqrt(real'(t)));
          while (v * v > t) v--;
          while ((v + 1) * (v + 1) <= t) v++;
          v = v >> 8;
          expq[j].push_back((v > 65535) ? 65535 : v);
          acc[j] = 0;
          cnt[j] = 0;
        end
      end
    end
  end

  always @(posedge clk) begin
    for (int j = 0; j < L; j++) begin
      if (rst_n && upd[j]) begin
        longint ex;
        n_upd[j]++;
        checks++;
        ex = (expq[j].size() != 0) ? expq[j].pop_front() : -1;
        if (longint'(th[j]) != ex) begin
          failures++;
          $display("level %0d theta=%0d exp %0d", j + 1, th[j], ex);
        end
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n && ov) begin
      checks++;
      if (int'(y) != ey) begin
        failures++;
        if (failures < 20) $display("out=%0d exp %0d", y, ey);
      end
      for (int j = 0; j < L; j++) if (clr[j]) n_clr++; else n_keep++;
    end
  end

  function automatic int stim(int n);
    real v, nz;
    int sp;
    nz = (n < NS / 2) ? 200.0 : 900.0;
    v = 1000.0 * $sin(2.0 * 3.14159265 * n / 400.0);
    v += (real'($urandom_range(0, 1000)) + real'($urandom_range(0, 1000)) - 1000.0) / 1000.0 * nz;
    sp = n % 173;
    if (sp < 8) v += (sp < 4) ? -5000.0 : 3000.0;
    return int'(v);
  endfunction

  initial begin
    kq = longint'(2.0 * $ln(256.0) / 255.0 * 65536.0 + 0.5);
    for (int j = 0; j < L; j++) begin acc[j] = 0; cnt[j] = 0; n_upd[j] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      in_valid = 1;
      x = W'(stim(n));
      @(negedge clk);
      in_valid = 0;
    end
    repeat (100) @(negedge clk);
    $display("updates %0d/%0d/%0d/%0d cleared %0d kept %0d final theta %0d/%0d/%0d/%0d",
             n_upd[0], n_upd[1], n_upd[2], n_upd[3], n_clr, n_keep, th[0], th[1], th[2], th[3]);
    for (int j = 0; j < L; j++) begin
      checks++;
      if (n_upd[j] != NS / N) begin failures++; $display("level %0d updates %0d", j + 1, n_upd[j]); end
    end
    checks += 2;
    if (n_clr == 0)  begin failures++; $display("no sample cleared"); end
    if (n_keep == 0) begin failures++; $display("no sample kept"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
