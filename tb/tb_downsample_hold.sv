// Self-checking testbench for downsample_hold (W = 16, N = 5).
// The input value changes every cycle; samples are marked at random. The
// output must change only in the cycle after the edge taking every 5th sample,
// to the value the input had in that cycle, and hold otherwise.
module tb_downsample_hold;
  localparam int W = 16, N = 5;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [W-1:0] d = '0, q;
  logic q_valid;
  int checks = 0, failures = 0;
  int cnt = 0, eq = 0, nupd = 0;
  bit take = 0, ev = 0;

  downsample_hold #(.W(W), .N(N)) dut (.clk, .rst_n, .in_valid, .d, .q, .q_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) == 0);
      d = W'($urandom);
      @(posedge clk);
      ev = 0;
      if (take) begin eq = int'(d); ev = 1; nupd++; end
      take = 0;
      if (in_valid) begin
        if (cnt == N - 1) begin cnt = 0; take = 1; end
        else cnt++;
      end
      #1;
      checks += 2;
      if (int'(q) != eq || q_valid != ev) begin
        failures++;
        if (failures < 10) $display("k=%0d q=%0d exp %0d v=%0d exp %0d", k, q, eq, q_valid, ev);
      end
    end
    checks++;
    if (nupd < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
