// Self-checking testbench for delay_line: random samples with random sample
// enables; the output must equal the input taken DEPTH enables earlier and
// must hold while the enable is low. Also checks the DEPTH = 0 pass-through.
module tb_delay_line;
  localparam int W = 16;
  localparam int DEPTH = 5;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [W-1:0] din = '0, dout, dout0;
  int checks = 0, failures = 0;
  int hist[$];

  delay_line #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .en, .din, .dout);
  delay_line #(.W(W), .DEPTH(0)) dut0 (.clk, .rst_n, .en, .din, .dout(dout0));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) hist.push_back(0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 2) != 0);
      din = W'($urandom);
      #1;
      checks++;
      if (dout0 !== din) failures++;
      @(posedge clk);
      if (en) begin
        hist.push_back(int'(din));
        void'(hist.pop_front());
      end
      #1;
      checks++;
      if (int'(dout) != hist[0]) begin
        failures++;
        if (failures < 10) $display("mismatch k=%0d got %0d exp %0d", k, dout, hist[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
