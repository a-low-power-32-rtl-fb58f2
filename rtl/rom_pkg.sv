// rom_pkg: organisation, contents and timing constants shared by the 32x1 ROM.
//
// The ROM is 4 rows by 8 columns. Address bit a<i> is addr[i]; a0 and a1 pick
// the row, a2..a4 the column. ROM_DATA is indexed [row][col], and a 1 means no
// pull-down transistor at that crossing of the NOR array (the stored bit is 1).
// TABLE_I_PATTERN is the test pattern the ROM is characterised with: even rows
// hold 0,1,0,1,... on bit lines 0..7, odd rows hold 1,0,1,0,... .
// The timing constants are in picoseconds: the 1.2 ns pulse width and the
// 2.5 ns shortest time between address transitions (0.4 GHz) follow the
// original design; the 560 ps edge-to-pulse delay is this model's choice, set
// to the ROM's overall access latency because decoders and array are modelled
// without delay.
`timescale 1ps / 1ps
package rom_pkg;
  localparam int unsigned ROW_BITS  = 2;
  localparam int unsigned COL_BITS  = 3;
  localparam int unsigned ROWS      = 1 << ROW_BITS;
  localparam int unsigned COLS      = 1 << COL_BITS;
  localparam int unsigned ADDR_BITS = ROW_BITS + COL_BITS;

  typedef logic [ROWS-1:0][COLS-1:0] rom_data_t;

  // Row 3 is the leftmost byte; bit 0 of each byte is bit line 0.
  localparam rom_data_t TABLE_I_PATTERN = 32'h55AA_55AA;

  localparam int unsigned PULSE_WIDTH_PS    = 1200;
  localparam int unsigned PULSE_DELAY_PS    = 560;
  localparam int unsigned MIN_TRANSITION_PS = 2500;
endpackage
