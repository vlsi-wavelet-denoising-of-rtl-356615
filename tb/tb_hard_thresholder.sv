// Self-checking testbench for hard_thresholder: random detail samples and
// thresholds, including |d| == theta and the most negative input; the output
// must be zero exactly when |d| < theta and d otherwise, and must hold while
// the enable is low.
module tb_hard_thresholder;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [W-1:0] d = '0, y;
  logic [W-1:0] theta = '0;
  logic cleared;
  int checks = 0, failures = 0;
  int ey = 0, ecl = 0, n_clear = 0, n_pass = 0;

  hard_thresholder #(.W(W)) dut (.clk, .rst_n, .en, .d, .theta, .y, .cleared);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      en    = ($urandom_range(0, 3) != 0);
      d     = W'($urandom_range(0, 4000) - 2000);
      theta = W'($urandom_range(0, 2500));
      if (k % 17 == 0) theta = W'((d < 0) ? -int'(d) : int'(d));   // equality
      if (k % 23 == 0) begin d = -W'(32768); theta = W'(32768); end
      if (k % 29 == 0) begin d = -W'(32768); theta = W'(32769); end
      @(posedge clk);
      if (en) begin
        m   = (int'(d) < 0) ? -int'(d) : int'(d);
        ecl = (m < int'(theta));
        ey  = ecl ? 0 : int'(d);
        if (ecl) n_clear++; else n_pass++;
      end
      #1;
      checks += 2;
      if (int'(y) != ey || int'(cleared) != ecl) begin
        failures++;
        if (failures < 10) $display("k=%0d d=%0d th=%0d y=%0d exp %0d", k, d, theta, y, ey);
      end
    end
    checks++;
    if (n_clear == 0 || n_pass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
