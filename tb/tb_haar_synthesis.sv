// Self-checking testbench for haar_synthesis.
// Part 1 drives level 2 (taps 2 samples apart) with random a and d and checks
//   y = sat( floor( (a + a[n-2] + d[n-2] - d) / 2 ) )
// from the input history. Part 2 chains haar_analysis and haar_synthesis of
// level 3 and checks reconstruction: y after edge m equals x of edge m-1-4,
// to within the one LSB lost by the two halvings.
module tb_haar_synthesis;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [W-1:0] a = '0, d = '0, y;
  logic signed [W-1:0] x = '0, a3, d3, y3;
  int checks = 0, failures = 0;
  int ha[$], hd[$], hx[$];
  int ey = 0, sat_hits = 0;

  haar_synthesis #(.W(W), .LEVEL(2)) dut (.clk, .rst_n, .en, .a, .d, .y);
  haar_analysis  #(.W(W), .LEVEL(3)) u_an (.clk, .rst_n, .en, .x, .a(a3), .d(d3));
  haar_synthesis #(.W(W), .LEVEL(3)) u_sy (.clk, .rst_n, .en, .a(a3), .d(d3), .y(y3));

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
    int t, diff;
    for (int i = 0; i < 2; i++) begin ha.push_back(0); hd.push_back(0); end
    for (int i = 0; i < 6; i++) hx.push_back(0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 800; k++) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      if (k < 40) begin
        // extreme values to reach the saturation
        a = (k % 3 == 0) ? W'(32767) : -W'(32768);
        d = (k % 3 == 0) ? -W'(32768) : W'(32767);
      end else begin
        a = W'($urandom);
        d = W'($urandom);
      end
      x = W'($urandom_range(0, 40000) - 20000);
      @(posedge clk);
      if (en) begin
        t  = floor_half(int'(a) + ha[0] + hd[0] - int'(d));
        if (t > 32767)  begin t = 32767;  sat_hits++; end
        if (t < -32768) begin t = -32768; sat_hits++; end
        ey = t;
        ha.push_back(int'(a)); void'(ha.pop_front());
        hd.push_back(int'(d)); void'(hd.pop_front());
        hx.push_back(int'(x)); void'(hx.pop_front());
      end
      #1;
      checks++;
      if (int'(y) != ey) begin
        failures++;
        if (failures < 10) $display("k=%0d y=%0d exp %0d", k, y, ey);
      end
      if (k > 20) begin
        // hx[0] is the input taken 5 enables before the last one (hx holds 6)
        diff = int'(y3) - hx[0];
        checks++;
        if (diff > 1 || diff < -1) begin
          failures++;
          if (failures < 10) $display("k=%0d reconstruction y3=%0d x=%0d", k, y3, hx[0]);
        end
      end
    end
    checks++;
    if (sat_hits == 0) begin failures++; $display("saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
