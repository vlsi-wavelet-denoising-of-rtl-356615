// Self-checking testbench for haar_analysis (level 3, taps 4 samples apart).
// Random samples under random enables; after every enabled edge the outputs
// must be floor((x[n] + x[n-4])/2) and floor((x[n] - x[n-4])/2), computed here
// from the sample history. Outputs must hold while the enable is low.
module tb_haar_analysis;
  localparam int W = 16;
  localparam int LEVEL = 3;
  localparam int D = 4;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [W-1:0] x = '0, a, d;
  int checks = 0, failures = 0;
  int hist[$];
  int ea = 0, ed = 0;

  haar_analysis #(.W(W), .LEVEL(LEVEL)) dut (.clk, .rst_n, .en, .x, .a, .d);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floor_half(int v);
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  initial begin
    for (int i = 0; i < D; i++) hist.push_back(0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      x  = (k < 20) ? ((k % 2) ? -W'(32768) : W'(32767)) : W'($urandom);
      @(posedge clk);
      if (en) begin
        ea = floor_half(int'(x) + hist[0]);
        ed = floor_half(int'(x) - hist[0]);
        hist.push_back(int'(x));
        void'(hist.pop_front());
      end
      #1;
      checks += 2;
      if (int'(a) != ea || int'(d) != ed) begin
        failures++;
        if (failures < 10) $display("k=%0d a=%0d/%0d d=%0d/%0d", k, a, ea, d, ed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
