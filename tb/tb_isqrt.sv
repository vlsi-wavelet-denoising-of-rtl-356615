// Testbench for the sequential integer square root (isqrt).
//
// Three instances: IN_W = 8 checked over every input value, and IN_W = 32
// and IN_W = 56 (the radicand width the sigma estimator uses at N = 64)
// checked on random values, on perfect squares and their neighbours, and on
// the largest input. Each result is compared with floor(sqrt(v)) found here
// by correcting a real-valued estimate, and `done` must rise on exactly the IN_W/2-th
// clock edge after the one that takes `start`, with `busy` high in between.
module tb_isqrt;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic s8 = 0, s32 = 0, s56 = 0;
  logic [7:0]  v8 = '0;
  logic [31:0] v32 = '0;
  logic [55:0] v56 = '0;
  logic [3:0]  r8;
  logic [15:0] r32;
  logic [27:0] r56;
  logic b8, b32, b56, d8, d32, d56;

  isqrt #(.IN_W(8))  u8  (.clk, .rst_n, .start(s8),  .value(v8),  .root(r8),  .busy(b8),  .done(d8));
  isqrt #(.IN_W(32)) u32 (.clk, .rst_n, .start(s32), .value(v32), .root(r32), .busy(b32), .done(d32));
  isqrt #(.IN_W(56)) u56 (.clk, .rst_n, .start(s56), .value(v56), .root(r56), .busy(b56), .done(d56));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint fsqrt(longint unsigned v);
    longint unsigned r;
    r = longint'($sqrt(real'(v)));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  // run one square root on the instance of width w; returns the cycles to done
  task automatic run(int w, longint unsigned v);
    int cyc;
    longint unsigned got;
    logic bz, dn;
    @(negedge clk);
    case (w)
      8:  begin v8  = 8'(v);  s8  = 1; end
      32: begin v32 = 32'(v); s32 = 1; end
      default: begin v56 = 56'(v); s56 = 1; end
    endcase
    @(negedge clk);
    s8 = 0; s32 = 0; s56 = 0;
    cyc = 0;                                        // edges after the one that took start
    forever begin
      case (w)
        8:  begin dn = d8;  bz = b8;  got = 64'(r8);  end
        32: begin dn = d32; bz = b32; got = 64'(r32); end
        default: begin dn = d56; bz = b56; got = 64'(r56); end
      endcase
      if (dn) break;
      if (!bz) begin
        failures++;
        $display("width %0d value %0d: busy low before done", w, v);
        break;
      end
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (got != fsqrt(v)) begin
      failures++;
      $display("width %0d value %0d: root %0d exp %0d", w, v, got, fsqrt(v));
    end
    checks++;
    if (cyc != w / 2) begin
      failures++;
      $display("width %0d value %0d: done after %0d cycles, exp %0d", w, v, cyc, w / 2);
    end
  endtask

  initial begin
    longint unsigned q;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < 256; v++) run(8, 64'(v));
    run(32, 64'hFFFF_FFFF);
    run(56, 64'hFF_FFFF_FFFF_FFFF);
    for (int i = 0; i < 300; i++) begin
      run(32, {$urandom, $urandom} & 64'hFFFF_FFFF);
      run(56, {$urandom, $urandom} & 64'hFF_FFFF_FFFF_FFFF);
      q = 64'($urandom) & 64'hFFF_FFFF;               // q < 2^28, q*q < 2^56
      run(56, q * q);
      if (q != 0) run(56, q * q - 1);
      q = q & 64'hFFFF;
      run(32, q * q);
      run(32, q * q + 2 * q);                       // (q+1)^2 - 1
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
