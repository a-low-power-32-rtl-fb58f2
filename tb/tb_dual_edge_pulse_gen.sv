// tb_dual_edge_pulse_gen: checks the dual edge pulse generator model.
//
// Drives rising and falling edges spaced 5 ns and 2.5 ns apart (200 MHz and
// the 0.4 GHz limit) and checks, for every edge, that the output is low just
// before the expected rise, high just after it and just before the expected
// fall, and low after it. It also counts output pulses against input edges
// and measures each pulse's width and its delay from the edge.
`timescale 1ps / 1ps
module tb_dual_edge_pulse_gen;
  localparam int unsigned W = 1200;
  localparam int unsigned D = 560;
  localparam int unsigned GUARD = 50;

  logic clk = 1'b0;
  logic pulse;
  int   checks = 0, failures = 0;
  int   n_edges = 0, n_pulses = 0;
  realtime t_edge, t_rise;
  bit      armed = 1'b0;   // timing checks start after the power-up idle time

  dual_edge_pulse_gen dut (.clk(clk), .pulse(pulse));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $realtime, what);
    end
  endtask

  always @(posedge pulse) if (armed) begin
    n_pulses++;
    t_rise = $realtime;
    check($realtime - t_edge > D - GUARD && $realtime - t_edge < D + GUARD,
          "pulse delay from edge");
  end
  always @(negedge pulse) if (armed) begin
    check($realtime - t_rise > W - GUARD && $realtime - t_rise < W + GUARD,
          "pulse width");
  end

  task automatic edge_and_check(input int unsigned spacing);
    clk = ~clk;
    t_edge = $realtime;
    n_edges++;
    #(D - GUARD);     check(pulse == 1'b0, "low before rise");
    #(2 * GUARD);     check(pulse == 1'b1, "high after rise");
    #(W - 2 * GUARD); check(pulse == 1'b1, "high before fall");
    #(2 * GUARD);     check(pulse == 1'b0, "low after fall");
    #(spacing - D - W - GUARD);
  endtask

  initial begin
    #10000;
    check(pulse == 1'b0, "idle low");
    n_pulses = 0;   // a power-up pulse is not counted
    armed = 1'b1;
    repeat (8) edge_and_check(5000);
    repeat (8) edge_and_check(2500);
    #10000;
    check(pulse == 1'b0, "idle low at end");
    check(n_pulses == n_edges, "one pulse per input edge");
    $display("edges=%0d pulses=%0d", n_edges, n_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
