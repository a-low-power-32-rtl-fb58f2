// row_decoder: NOR-style 2:4 row decoder powered by the precharge pulse.
//
// Each row line is the NOR of the address literals that must be 0 for that
// row (for row i, a<b> where bit b of i is 0 and a<b>bar where it is 1), so
// exactly one row line is high for any address. The decoder has no supply
// outside the precharge pulse, so all row lines are low then. True and
// complement address lines both come in, as in the original decoder; the
// row-to-address assignment is the natural binary one (row i for a1a0 = i),
// this design's choice.
//
// Interface: a[ROW_BITS-1:0], a_bar (must be ~a), precharge (active high),
// row[2**ROW_BITS-1:0]. Timing: purely combinational.
`timescale 1ps / 1ps
module row_decoder #(
  parameter int unsigned ROW_BITS = rom_pkg::ROW_BITS
) (
  input  logic [ROW_BITS-1:0]      a,
  input  logic [ROW_BITS-1:0]      a_bar,
  input  logic                     precharge,
  output logic [(1<<ROW_BITS)-1:0] row
);
  always_comb begin
    for (int unsigned r = 0; r < (1 << ROW_BITS); r++) begin
      logic any_high;
      any_high = 1'b0;
      for (int unsigned b = 0; b < ROW_BITS; b++)
        any_high |= r[b] ? a_bar[b] : a[b];
      row[r] = precharge & ~any_high;
    end
  end
endmodule
