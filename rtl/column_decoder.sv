// column_decoder: tree based 2**COL_BITS:1 column decoder (8:1 by default).
//
// A binary reduction tree of 2:1 selections, as the pass-transistor tree of
// the original design: level 0 picks one line of each pair c0/c1, c2/c3, ...
// with sel[0] (address bit a2), level 1 picks one of each pair of level-0
// results with sel[1] (a3), and the last level uses sel[COL_BITS-1] (a4).
// The tree has 2**k + 2**(k-1) + ... + 1 nodes, the 14 transistors of the
// 8-input case counting each pass device of the 7 selections.
//
// Interface: c[2**COL_BITS-1:0] bit lines, sel[COL_BITS-1:0] column address,
// out the selected line. Timing: purely combinational.
`timescale 1ps / 1ps
module column_decoder #(
  parameter int unsigned COL_BITS = rom_pkg::COL_BITS
) (
  input  logic [(1<<COL_BITS)-1:0] c,
  input  logic [COL_BITS-1:0]      sel,
  output logic                     out
);
  // node[l] holds the 2**(COL_BITS-l) values entering level l.
  logic [COL_BITS:0][(1<<COL_BITS)-1:0] node;

  assign node[0] = c;

  for (genvar l = 0; l < COL_BITS; l++) begin : g_level
    localparam int unsigned N_OUT = 1 << (COL_BITS - l - 1);
    for (genvar j = 0; j < N_OUT; j++) begin : g_sel
      assign node[l+1][j] = sel[l] ? node[l][2*j+1] : node[l][2*j];
    end
    if (N_OUT < (1 << COL_BITS)) begin : g_unused
      assign node[l+1][(1<<COL_BITS)-1:N_OUT] = '0;
    end
  end

  assign out = node[COL_BITS][0];
endmodule
