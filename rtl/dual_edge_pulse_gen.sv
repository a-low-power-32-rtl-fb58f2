// dual_edge_pulse_gen: behavioural model (not synthesizable logic) of the
// dual edge pulse generator, one per address bit in the address transition
// detector.
//
// The real part is a transistor circuit around two inverters: right after an
// edge of its input the inverters still hold the old level, and the output is
// high until they catch up. This model keeps the function, not the
// transistors: it compares the input with a copy of itself delayed by
// PULSE_WIDTH_PS, and the time the two disagree, shifted by PULSE_DELAY_PS,
// is the output pulse. Both rising and falling input edges give one pulse.
//
// Interface: clk is the input (an address bit, named Clk in the original
// schematic), pulse the output. Timing: pulse rises PULSE_DELAY_PS after each
// input edge and stays high PULSE_WIDTH_PS. The 1.2 ns width follows the
// original design; the delay is this model's choice (see rom_pkg). The part
// works only if edges are at least MIN_TRANSITION_PS apart (the ROM's
// 0.4 GHz transition limit); an assertion reports closer edges.
`timescale 1ps / 1ps
module dual_edge_pulse_gen #(
  parameter int unsigned PULSE_WIDTH_PS    = rom_pkg::PULSE_WIDTH_PS,
  parameter int unsigned PULSE_DELAY_PS    = rom_pkg::PULSE_DELAY_PS,
  parameter int unsigned MIN_TRANSITION_PS = rom_pkg::MIN_TRANSITION_PS
) (
  input  logic clk,
  output logic pulse
);
  logic clk_dly;     // input as seen through the delay stage
  logic mismatch;    // input and delayed input disagree: an edge is recent

  assign #(PULSE_WIDTH_PS) clk_dly = clk;
  assign mismatch = clk ^ clk_dly;
  assign #(PULSE_DELAY_PS) pulse = mismatch;

  // Edges closer than the transition limit would merge pulses.
  realtime last_edge;
  initial last_edge = -1.0e9;
  always @(clk) begin
    assert ($realtime - last_edge >= MIN_TRANSITION_PS)
      else $error("dual_edge_pulse_gen: input edges %0t ps apart, limit %0d ps",
                  $realtime - last_edge, MIN_TRANSITION_PS);
    last_edge = $realtime;
  end
endmodule
