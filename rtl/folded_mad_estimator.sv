// Threshold estimator based on the MAD, with an iterative (folded) sorter.
//
// Keeps the magnitudes of the last M = 4N detail samples in a single-port RAM
// written as a circular buffer. After every N new samples (a sliding window
// with three quarters overlap) the whole window is copied into M registers and
// sorted in place by odd-even transposition: one bank of compare-and-swap cells
// works on the pairs (0,1),(2,3),... and the other on (1,2),(3,4),...; the two
// banks take turns, one phase per clock cycle. Each cell swaps its pair when the
// first value is smaller (so the registers end in descending order) and raises
// `swp`. Sorting stops as soon as two consecutive phases raise no `swp`, and
// in any case after M phases. The median is the mean of the two central
// registers, and
//   theta = median * sqrt(2 ln M) / 0.6745
// with the constant on MAD_C_FRAC fractional bits (wd_pkg::mad_const).
//
// Interface: `in_valid` marks a new detail sample `in_data` (signed, W bits).
// `theta` (unsigned, W bits, saturated) is 0 after reset and is updated once
// every N samples, `theta_valid` pulsing in the cycle it changes; `sort_phases`
// gives the number of phases the last sort needed. RAM words not yet written
// are zero, which shapes the initial transient.
//
// Timing: while the sorter loads and sorts, the RAM port is busy; one sample
// arriving in that time waits in a holding register and is written once the
// sorter is idle. theta_valid rises M + 3 + sort_phases clock edges after the
// edge that writes the N-th sample of a block (start 1, load M+1, sort,
// median 1). Samples must therefore be
// at least about 2M+4 clock cycles apart over a block; an assertion flags a
// second sample arriving while one is still held.
//
// What follows the design: |x| of each sample, the single-port RAM that holds
// the window, the copy into registers before sorting, the two alternating
// comparator levels with their swp flags, the stop condition on swp, the
// median of the two central elements and the constant multiplier; one finite
// state machine per estimator. This implementation's own: the widths, the
// holding register, the shift-in load order and the two-phase stop rule (a
// single phase without swaps does not prove the vector sorted).
module folded_mad_estimator
  import wd_pkg::*;
#(
  parameter int unsigned W = 16,
  parameter int unsigned N = 64,
  parameter int unsigned M = 4 * N
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [W-1:0]   in_data,
  output logic        [W-1:0]   theta,
  output logic                  theta_valid,
  output logic [$clog2(M+1)-1:0] sort_phases,
  output logic                  sample_held   // a sample had to wait for the sorter
);
  localparam int unsigned AW    = $clog2(M);
  localparam int unsigned CW    = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned PW    = $clog2(M + 1);
  // scaling constant, MAD_C_FRAC fractional bits; above 4 for M >= 64
  localparam int unsigned CB = 20;
  localparam logic [CB-1:0] C = CB'(mad_const(M));

  initial assert (M % 2 == 0 && M >= 4) else $error("folded_mad_estimator: M must be even and >= 4");

  typedef enum logic [1:0] {S_COLLECT, S_LOAD, S_SORT, S_MED} state_e;

  state_e          state;
  logic [W-1:0]    r [M];          // sorting registers
  logic [W-1:0]    r_sw [M];       // registers after the active comparator bank
  logic [M-2:0]    swp;            // swap flags of all comparators
  logic            ph;             // 0: pairs (0,1),(2,3)..  1: pairs (1,2),(3,4)..
  logic            prev_quiet;     // the previous phase swapped nothing
  logic [PW-1:0]   pcnt;           // phases done in this sort
  logic [AW:0]     lcnt;           // load sequencer
  logic [AW-1:0]   wptr;
  logic [CW-1:0]   cnt;            // samples written in this block
  logic            go;             // a block is complete
  logic [W-1:0]    pend;           // holding register for one sample
  logic            pend_v;

  logic [W-1:0]    mag;
  logic            wr;
  logic [W-1:0]    wdata;
  logic [AW-1:0]   ram_addr;
  logic [W-1:0]    ram_rdata;
  logic [W:0]      mid_sum;
  logic [W-1:0]    med;
  logic [W+CB-1:0] scaled;
  logic            any_swp;

  always_comb begin
    mag      = in_data[W-1] ? W'(-in_data) : W'(in_data);
    wr       = (state == S_COLLECT) && !go && (pend_v || in_valid);
    wdata    = pend_v ? pend : mag;
    ram_addr = (state == S_LOAD) ? lcnt[AW-1:0] : wptr;
    mid_sum  = (W+1)'(r[M/2-1]) + (W+1)'(r[M/2]);
    med      = mid_sum[W:1];
    scaled   = ((W+CB)'(med) * (W+CB)'(C)) >> MAD_C_FRAC;
  end

  sp_ram #(.DW(W), .DEPTH(M)) u_ram (
    .clk(clk), .clr(!rst_n), .we(wr), .addr(ram_addr),
    .wdata(wdata), .rdata(ram_rdata)
  );

  // Two levels of comparators; only the bank selected by `ph` may swap.
  logic [W-1:0] cmp_hi [M-1];
  logic [W-1:0] cmp_lo [M-1];
  for (genvar i = 0; i < M - 1; i++) begin : g_cmp
    logic s;
    sort_cell #(.W(W)) u_cell (.a(r[i]), .b(r[i+1]), .hi(cmp_hi[i]), .lo(cmp_lo[i]), .swp(s));
    assign swp[i] = s && ((i % 2) == int'(ph));
  end

  always_comb begin
    for (int i = 0; i < M; i++) r_sw[i] = r[i];
    for (int i = 0; i < M - 1; i++) begin
      if (swp[i]) begin
        r_sw[i]   = cmp_hi[i];
        r_sw[i+1] = cmp_lo[i];
      end
    end
    any_swp = |swp;
  end

  // Window memory writes and block counting.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr        <= '0;
      cnt         <= '0;
      pend        <= '0;
      pend_v      <= 1'b0;
      sample_held <= 1'b0;
    end else begin
      sample_held <= 1'b0;
      if (wr) begin
        wptr <= (wptr == AW'(M - 1)) ? '0 : wptr + 1'b1;
        cnt  <= (cnt == CW'(N - 1)) ? '0 : cnt + 1'b1;
      end
      if (in_valid && !(wr && !pend_v)) begin
        pend        <= mag;      // arrived while the port is busy
        pend_v      <= 1'b1;
        sample_held <= 1'b1;
      end else if (wr && pend_v) begin
        pend_v <= 1'b0;
      end
    end
  end

  // Sorter controller.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_COLLECT;
      go          <= 1'b0;
      lcnt        <= '0;
      ph          <= 1'b0;
      prev_quiet  <= 1'b0;
      pcnt        <= '0;
      theta       <= '0;
      theta_valid <= 1'b0;
      sort_phases <= '0;
      for (int i = 0; i < M; i++) r[i] <= '0;
    end else begin
      theta_valid <= 1'b0;
      if (wr && cnt == CW'(N - 1)) go <= 1'b1;
      case (state)
        S_COLLECT: if (go) begin
          go    <= 1'b0;
          lcnt  <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          // word lcnt is addressed now and arrives next cycle; shift it in
          if (lcnt != '0) begin
            for (int i = 0; i < M - 1; i++) r[i] <= r[i+1];
            r[M-1] <= ram_rdata;
          end
          lcnt <= lcnt + 1'b1;
          if (lcnt == (AW+1)'(M)) begin
            state      <= S_SORT;
            ph         <= 1'b0;
            prev_quiet <= 1'b0;
            pcnt       <= '0;
          end
        end
        S_SORT: begin
          for (int i = 0; i < M; i++) r[i] <= r_sw[i];
          ph         <= ~ph;
          prev_quiet <= !any_swp;
          pcnt       <= pcnt + 1'b1;
          if ((!any_swp && prev_quiet) || pcnt == PW'(M - 1)) state <= S_MED;
        end
        S_MED: begin
          theta       <= (scaled > (W+CB)'({W{1'b1}})) ? {W{1'b1}} : scaled[W-1:0];
          theta_valid <= 1'b1;
          sort_phases <= pcnt;
          state       <= S_COLLECT;
        end
        default: state <= S_COLLECT;
      endcase
    end
  end

  a_no_pend_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(in_valid && pend_v && !wr))
    else $error("folded_mad_estimator: second sample arrived while the sorter was busy");

endmodule
