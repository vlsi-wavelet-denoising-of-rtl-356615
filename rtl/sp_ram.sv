// Single-port RAM with synchronous read and a clear input.
//
// One address port shared by reads and writes: in a cycle with `we` high the
// word at `addr` is written, otherwise it is read; `rdata` shows the word read
// one cycle later (a write also updates `rdata` with the written word).
// `clr` (synchronous) sets every word to zero, matching the reset pin the
// design gives its RAM blocks. Used as the circular buffer of partial sums in
// the sigma estimator and as the window memory of the folded MAD estimator.
module sp_ram #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 4,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          clr,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (clr) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      rdata <= '0;
    end else if (we) begin
      mem[addr] <= wdata;
      rdata     <= wdata;
    end else begin
      rdata <= mem[addr];
    end
  end
endmodule
