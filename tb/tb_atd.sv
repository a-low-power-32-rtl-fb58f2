// tb_atd: checks the address transition detector.
//
// Changes each of the five address bits alone, then several bits at once,
// every 5 ns, and checks that each change gives exactly one output pulse,
// rising 560 ps after the change and lasting 1.2 ns, and that the output is
// low between pulses. A stretch with no change must give no pulse.
`timescale 1ps / 1ps
module tb_atd;
  localparam int unsigned W = 1200;
  localparam int unsigned D = 560;
  localparam int unsigned GUARD = 50;
  localparam int unsigned PERIOD = 5000;

  logic [4:0] addr = '0;
  logic       pulse;
  int         checks = 0, failures = 0;
  int         n_changes = 0, n_pulses = 0;
  int         bit_seen [5] = '{default: 0};
  int         multi_seen = 0;

  atd dut (.addr(addr), .pulse(pulse));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s (addr=%b)", $realtime, what, addr);
    end
  endtask

  always @(posedge pulse) n_pulses++;

  task automatic change_to(input logic [4:0] a);
    logic [4:0] diff;
    diff = a ^ addr;
    for (int b = 0; b < 5; b++) if (diff[b]) bit_seen[b]++;
    if ($countones(diff) > 1) multi_seen++;
    addr = a;
    n_changes++;
    #(D - GUARD);     check(pulse == 1'b0, "low before rise");
    #(2 * GUARD);     check(pulse == 1'b1, "high after rise");
    #(W - 2 * GUARD); check(pulse == 1'b1, "high before fall");
    #(2 * GUARD);     check(pulse == 1'b0, "low after fall");
    #(PERIOD - D - W - GUARD);
  endtask

  initial begin
    #10000;
    check(pulse == 1'b0, "idle low");
    n_pulses = 0;   // a power-up pulse is not counted
    for (int b = 0; b < 5; b++) begin
      change_to(addr ^ (5'b1 << b));   // rising edge of bit b
      change_to(addr ^ (5'b1 << b));   // falling edge of bit b
    end
    change_to(5'b11111);
    change_to(5'b01010);
    change_to(5'b10101);
    change_to(5'b00000);
    // No change for 20 ns: no pulse.
    begin
      int n_before;
      n_before = n_pulses;
      #20000;
      check(n_pulses == n_before && pulse == 1'b0, "no pulse without change");
    end
    check(n_pulses == n_changes, "one pulse per address change");
    for (int b = 0; b < 5; b++) check(bit_seen[b] > 0, "every bit toggled");
    check(multi_seen > 0, "simultaneous multi-bit change seen");
    $display("changes=%0d pulses=%0d multi=%0d", n_changes, n_pulses, multi_seen);
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
