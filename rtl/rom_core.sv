// rom_core: the NOR ROM array, ROWS word lines by COLS bit lines.
//
// Every bit line has a pull-up whose supply is the precharge pulse. Where a
// stored bit is 0 the array has a pull-down transistor between that bit line
// and ground, gated by the word line; the transistors of one bit line sit in
// parallel, so any active word line with a pull-down on it pulls the line
// low (a NOR). Without a pull-down the line stays high: stored 1. Outside
// the precharge pulse the pull-ups have no supply and every bit line reads 0.
// The contents default to the test pattern of the original design
// (rom_pkg::TABLE_I_PATTERN); ROM_DATA[row][col] = 1 means no transistor.
//
// Interface: wl[ROWS-1:0] word lines, precharge, bl[COLS-1:0] bit lines.
// Timing: purely combinational.
`timescale 1ps / 1ps
module rom_core #(
  parameter int unsigned ROWS = rom_pkg::ROWS,
  parameter int unsigned COLS = rom_pkg::COLS,
  parameter logic [ROWS-1:0][COLS-1:0] ROM_DATA = rom_pkg::TABLE_I_PATTERN
) (
  input  logic [ROWS-1:0] wl,
  input  logic            precharge,
  output logic [COLS-1:0] bl
);
  always_comb begin
    for (int unsigned c = 0; c < COLS; c++) begin
      logic pulled_down;
      pulled_down = 1'b0;
      for (int unsigned r = 0; r < ROWS; r++)
        pulled_down |= wl[r] & ~ROM_DATA[r][c];
      bl[c] = precharge & ~pulled_down;
    end
  end
endmodule
