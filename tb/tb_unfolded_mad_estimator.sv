// Self-checking testbench for unfolded_mad_estimator (W = 16, N = 2, M = 8).
// Random signed samples (with repeated values and the most negative value)
// enter one every 3 cycles; after every second one (end of a block of N),
// the threshold must equal
//   floor( floor((m4 + m5)/2) * C / 2^14 ),  C = round(sqrt(2 ln 8)/0.6745 * 2^14)
// where m4, m5 are the two central magnitudes of the last 8 samples (zeros
// before the window fills), sorted here by the testbench. theta_valid must
// rise with the clock edge that follows the edge that took the block's last
// sample (the checker sees it one edge later), and only then.
module tb_unfolded_mad_estimator;
  localparam int W = 16;
  localparam int N = 2;
  localparam int M = 8;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] in_data = '0;
  logic [W-1:0] theta;
  logic theta_valid;
  int checks = 0, failures = 0;
  int win[$];
  int cyc = 0, t_in = 0, nvalid = 0;
  longint c, exp_th = 0;

  unfolded_mad_estimator #(.W(W), .N(N), .M(M)) dut (.clk, .rst_n, .in_valid, .in_data, .theta, .theta_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && theta_valid) begin
      nvalid++;
      checks += 2;
      if (cyc - t_in != 2) begin failures++; $display("latency %0d", cyc - t_in); end
      if (longint'(theta) != exp_th) begin
        failures++;
        if (failures < 10) $display("theta=%0d exp %0d", theta, exp_th);
      end
    end
  end

  initial begin
    int smp, srt[$];
    longint med, v;
    c = longint'($sqrt(2.0 * $ln(8.0)) / 0.6745 * 16384.0 + 0.5);
    for (int i = 0; i < M; i++) win.push_back(0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      case (k % 7)
        0: smp = -32768;
        1: smp = $urandom_range(0, 5) - 2;
        default: smp = (k > 300) ? 32767 - $urandom_range(0, 3) : $urandom_range(0, 4000) - 2000;
      endcase
      @(negedge clk);
      in_valid = 1;
      in_data  = W'(smp);
      @(posedge clk);
      win.push_back((smp < 0) ? -smp : smp);
      void'(win.pop_front());
      if (k % N == N - 1) begin
        t_in = cyc;
        srt = win;
        srt.sort();
        med = (longint'(srt[M/2-1]) + srt[M/2]) / 2;
        v = (med * c) >> 14;
        exp_th = (v > 65535) ? 65535 : v;
      end
      @(negedge clk);
      in_valid = 0;
      repeat (2) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (nvalid != 400 / N) begin failures++; $display("valid count %0d", nvalid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
