// atd: address transition detector. Gives one short high pulse whenever any
// address bit changes; the pulse is the supply ("precharge") of the row
// decoder and the ROM array, so they draw current only around a read.
//
// Structure, as in the original block diagram: one dual_edge_pulse_gen per
// address bit, and a wide OR of their outputs. Simultaneous changes on
// several bits give a single pulse. The OR is plain logic; the pulse
// generators are behavioural models with delays.
//
// Interface: addr[N_INPUTS-1:0] (a0..a4), pulse. Timing: pulse rises
// PULSE_DELAY_PS after an address change and lasts PULSE_WIDTH_PS (1.2 ns).
`timescale 1ps / 1ps
module atd #(
  parameter int unsigned N_INPUTS          = rom_pkg::ADDR_BITS,
  parameter int unsigned PULSE_WIDTH_PS    = rom_pkg::PULSE_WIDTH_PS,
  parameter int unsigned PULSE_DELAY_PS    = rom_pkg::PULSE_DELAY_PS,
  parameter int unsigned MIN_TRANSITION_PS = rom_pkg::MIN_TRANSITION_PS
) (
  input  logic [N_INPUTS-1:0] addr,
  output logic                pulse
);
  logic [N_INPUTS-1:0] bit_pulse;

  for (genvar i = 0; i < N_INPUTS; i++) begin : g_pg
    dual_edge_pulse_gen #(
      .PULSE_WIDTH_PS   (PULSE_WIDTH_PS),
      .PULSE_DELAY_PS   (PULSE_DELAY_PS),
      .MIN_TRANSITION_PS(MIN_TRANSITION_PS)
    ) u_pg (
      .clk  (addr[i]),
      .pulse(bit_pulse[i])
    );
  end

  assign pulse = |bit_pulse;
endmodule
