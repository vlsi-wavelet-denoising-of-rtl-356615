// Compare-and-swap cell of the sorters.
//
// Takes two unsigned values A and B and swaps them when A < B, so the larger
// value leaves on `hi` (the A side) and the smaller on `lo` (the B side); `swp`
// flags that a swap took place. Purely combinational. The swap rule (swap if
// A < B) and the `swp` flag are those of the sorting cell of the design; the
// port names are this implementation's.
module sort_cell #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] hi,
  output logic [W-1:0] lo,
  output logic         swp
);
  always_comb begin
    swp = (a < b);
    hi  = swp ? b : a;
    lo  = swp ? a : b;
  end
endmodule
