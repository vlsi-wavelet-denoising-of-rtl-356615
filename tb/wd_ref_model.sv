// Behavioural reference of the denoiser datapath, for testbenches only.
//
// Works on integers, one update per `en` clock edge, with every register of
// the datapath kept as an int and every tap line as an int queue: analysis
// (x + x[n-D])/2 and (x - x[n-D])/2, detail delays of 2*(LEVELS-j) samples,
// hard thresholding against the thresholds the device under test shows at
// the same edge, and recomposition (a + a[n-D] + d[n-D] - d)/2 with 16-bit
// saturation. `y` is the value the denoiser output should hold after the
// edge. Thresholds are taken from the device so that the datapath can be
// checked on its own; the estimators have testbenches of their own.
module wd_ref_model #(
  parameter int LEVELS = 4
) (
  input  logic               clk,
  input  logic               en,
  input  logic signed [15:0] x,
  input  logic [15:0]        theta [LEVELS],
  output int                 y
);
  int A [LEVELS+1];          // analysis output registers (A[0] unused)
  int Dt[LEVELS+1];          // detail output registers
  int T [LEVELS+1];          // thresholder registers
  int R [LEVELS+2];          // R[j]: output register of recomposition level j
  int tapx[LEVELS+1][$];     // analysis input taps
  int dly [LEVELS+1][$];     // detail delays
  int tapa[LEVELS+1][$];     // recomposition approximation taps
  int tapd[LEVELS+1][$];     // recomposition detail taps

  function automatic int fl2(int v);   // floor(v / 2)
    return (v >= 0) ? v / 2 : -((-v + 1) / 2);
  endfunction

  initial begin
    for (int j = 0; j <= LEVELS + 1; j++) R[j] = 0;
    for (int j = 0; j <= LEVELS; j++) begin
      A[j] = 0; Dt[j] = 0; T[j] = 0;
      if (j >= 1) begin
        for (int k = 0; k < (1 << (j - 1)); k++) begin
          tapx[j].push_back(0); tapa[j].push_back(0); tapd[j].push_back(0);
        end
        for (int k = 0; k < 2 * (LEVELS - j); k++) dly[j].push_back(0);
      end
    end
    y = 0;
  end

  always @(posedge clk) begin
    int nA[LEVELS+1], nD[LEVELS+1], nT[LEVELS+1], nR[LEVELS+2];
    int in, old, dd, m, ina, s;
    if (en) begin
      for (int j = 1; j <= LEVELS; j++) begin
        in  = (j == 1) ? int'(x) : A[j-1];
        old = tapx[j][0];
        nA[j] = fl2(in + old);
        nD[j] = fl2(in - old);
        tapx[j].push_back(in); void'(tapx[j].pop_front());
        // delayed detail seen by estimator and thresholder before this edge
        dd = (dly[j].size() == 0) ? Dt[j] : dly[j][0];
        if (dly[j].size() != 0) begin dly[j].push_back(Dt[j]); void'(dly[j].pop_front()); end
        m = (dd < 0) ? -dd : dd;
        nT[j] = (m < int'(theta[j-1])) ? 0 : dd;
        ina = (j == LEVELS) ? 0 : R[j+1];
        s = fl2(ina + tapa[j][0] + tapd[j][0] - T[j]);
        if (s > 32767) s = 32767;
        if (s < -32768) s = -32768;
        nR[j] = s;
        tapa[j].push_back(ina);  void'(tapa[j].pop_front());
        tapd[j].push_back(T[j]); void'(tapd[j].pop_front());
      end
      for (int j = 1; j <= LEVELS; j++) begin
        A[j] = nA[j]; Dt[j] = nD[j]; T[j] = nT[j]; R[j] = nR[j];
      end
      y = R[1];
    end
  end
endmodule
