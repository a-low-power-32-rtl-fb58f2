// rom32x1_atd: a 32x1 bit NOR ROM whose decoders and array are powered only
// for a short slot after each address change.
//
// An address transition detector (atd) watches all five address bits and
// emits a pulse after any of them changes. That pulse is the precharge
// supply of the row decoder and of the array: while it is high, the row
// decoder raises one of four word lines (from a0,a1), the array drives its
// eight bit lines with the selected row, and the column decoder passes one
// of them (picked by a2,a3,a4) to outbit. Outside the pulse every word and
// bit line is low, so outbit is 0 and no static current flows. The stored bit
// must therefore be sampled while precharge is high.
//
// Interface: addr[4:0] (addr[i] is address bit a<i>), precharge (the ATD
// pulse, brought out so a reader can time the sample), outbit. There is no
// clock and no reset. Timing: precharge rises PULSE_DELAY_PS (560 ps) after
// an address change and lasts PULSE_WIDTH_PS (1.2 ns); outbit follows it
// without further delay. Address bits may change at most every
// MIN_TRANSITION_PS (2.5 ns, 0.4 GHz). Organisation, decoder structure,
// contents, pulse width and transition limit follow the original design;
// the edge-to-pulse delay, the active-high precharge and the
// row/column bit order within each decoder are this design's choices.
`timescale 1ps / 1ps
module rom32x1_atd #(
  parameter int unsigned ROW_BITS          = rom_pkg::ROW_BITS,
  parameter int unsigned COL_BITS          = rom_pkg::COL_BITS,
  parameter logic [(1<<ROW_BITS)-1:0][(1<<COL_BITS)-1:0] ROM_DATA = rom_pkg::TABLE_I_PATTERN,
  parameter int unsigned PULSE_WIDTH_PS    = rom_pkg::PULSE_WIDTH_PS,
  parameter int unsigned PULSE_DELAY_PS    = rom_pkg::PULSE_DELAY_PS,
  parameter int unsigned MIN_TRANSITION_PS = rom_pkg::MIN_TRANSITION_PS
) (
  input  logic [ROW_BITS+COL_BITS-1:0] addr,
  output logic                         precharge,
  output logic                         outbit
);
  localparam int unsigned ROWS = 1 << ROW_BITS;
  localparam int unsigned COLS = 1 << COL_BITS;

  logic [ROW_BITS-1:0] row_a, row_a_bar;
  logic [ROWS-1:0]     wl;
  logic [COLS-1:0]     bl;

  assign row_a     = addr[ROW_BITS-1:0];
  assign row_a_bar = ~row_a;

  atd #(
    .N_INPUTS         (ROW_BITS + COL_BITS),
    .PULSE_WIDTH_PS   (PULSE_WIDTH_PS),
    .PULSE_DELAY_PS   (PULSE_DELAY_PS),
    .MIN_TRANSITION_PS(MIN_TRANSITION_PS)
  ) u_atd (
    .addr (addr),
    .pulse(precharge)
  );

  row_decoder #(.ROW_BITS(ROW_BITS)) u_row_decoder (
    .a        (row_a),
    .a_bar    (row_a_bar),
    .precharge(precharge),
    .row      (wl)
  );

  rom_core #(.ROWS(ROWS), .COLS(COLS), .ROM_DATA(ROM_DATA)) u_rom_core (
    .wl       (wl),
    .precharge(precharge),
    .bl       (bl)
  );

  column_decoder #(.COL_BITS(COL_BITS)) u_column_decoder (
    .c  (bl),
    .sel(addr[ROW_BITS +: COL_BITS]),
    .out(outbit)
  );
endmodule
