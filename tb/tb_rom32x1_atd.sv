// tb_rom32x1_atd: end-to-end test of the 32x1 ROM at its default parameters.
//
// Steps the address as a system would at 200 MHz (one address every 5 ns):
// first the eight addresses 0..7 of row 0, then all 32 addresses in a
// scrambled order with several bits changing at once, then a stretch at the
// 0.4 GHz limit (2.5 ns). For every address it checks:
//   - precharge and outbit are low just before the slot,
//   - during the slot precharge is high and outbit equals the stored bit,
//     worked out from the test pattern's rule (row[0] xor col[0], with
//     row = {a1,a0} and col = {a4,a3,a2}),
//   - both are low again after the slot (read outside the slot gives 0),
//   - the slot opens 560 ps after the change and lasts 1.2 ns.
// It counts each mechanism: a transition on each address bit, multi-bit
// transitions, reads of 1 and of 0, every word line and every bit line
// selected, zero outside the slot, and reads at the 0.4 GHz limit.
`timescale 1ps / 1ps
module tb_rom32x1_atd;
  localparam int unsigned W = 1200;
  localparam int unsigned D = 560;
  localparam int unsigned GUARD = 50;

  logic [4:0] addr = 5'b11100;   // last address of row 0, so 00000 is a change
  logic       precharge, outbit;
  int         checks = 0, failures = 0;

  int n_bit_trans [5] = '{default: 0};
  int n_row [4]       = '{default: 0};
  int n_col [8]       = '{default: 0};
  int n_multi = 0, n_ones = 0, n_zeros = 0, n_gated = 0, n_fast = 0;
  int n_slots = 0;
  realtime t_change, t_rise;
  bit      armed = 1'b0;   // timing checks start after the power-up idle time

  rom32x1_atd dut (.addr(addr), .precharge(precharge), .outbit(outbit));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s (addr=%b)", $realtime, what, addr);
    end
  endtask

  function automatic bit stored(logic [4:0] a);
    logic [1:0] row;
    logic [2:0] col;
    row = a[1:0];
    col = a[4:2];
    return row[0] ^ col[0];
  endfunction

  always @(posedge precharge) if (armed) begin
    n_slots++;
    t_rise = $realtime;
    check($realtime - t_change > D - GUARD && $realtime - t_change < D + GUARD,
          "slot opens 560 ps after the address change");
  end
  always @(negedge precharge) if (armed)
    check($realtime - t_rise > W - GUARD && $realtime - t_rise < W + GUARD,
          "slot lasts 1.2 ns");

  task automatic read(input logic [4:0] a, input int unsigned period, input bit fast);
    logic [4:0] diff;
    bit exp;
    diff = a ^ addr;
    for (int b = 0; b < 5; b++) if (diff[b]) n_bit_trans[b]++;
    if ($countones(diff) > 1) n_multi++;
    addr = a;
    t_change = $realtime;
    exp = stored(a);
    #(D - GUARD);
    check(precharge == 1'b0 && outbit == 1'b0, "low before the slot");
    #(GUARD + W / 2);
    check(precharge == 1'b1, "slot open");
    check(outbit == exp, $sformatf("read %b expected %b", outbit, exp));
    if (outbit == exp) begin
      if (exp) n_ones++; else n_zeros++;
      n_row[a[1:0]]++;
      n_col[a[4:2]]++;
      if (fast) n_fast++;
    end
    #(W / 2 + GUARD);
    check(precharge == 1'b0 && outbit == 1'b0, "zero after the slot");
    if (precharge == 1'b0 && outbit == 1'b0) n_gated++;
    #(period - D - W - GUARD);
  endtask

  initial begin
    logic [4:0] perm [32];
    int n_changes;
    n_changes = 0;
    #10000;
    check(precharge == 1'b0 && outbit == 1'b0, "idle: no slot, output zero");
    n_slots = 0;   // a power-up slot, if the model gave one, is not counted
    armed = 1'b1;
    // Addresses 00000..00111 in turn (expected 0,1,0,1,0,1,0,1).
    for (int i = 0; i < 8; i++) begin
      read(5'(i << 2), 5000, 1'b0);
      n_changes++;
    end
    // All 32 addresses, scrambled (13*i+7 mod 32 visits each once).
    for (int i = 0; i < 32; i++) perm[i] = 5'((13 * i + 7) % 32);
    for (int i = 0; i < 32; i++) begin
      if (perm[i] != addr) begin
        read(perm[i], 5000, 1'b0);
        n_changes++;
      end
    end
    // At the 0.4 GHz transition limit.
    for (int i = 0; i < 16; i++) begin
      read(addr ^ (5'($urandom_range(0, 31)) | 5'(1 << (i % 5))), 2500, 1'b1);
      n_changes++;
    end
    #10000;
    check(precharge == 1'b0 && outbit == 1'b0, "idle at end");
    check(n_slots == n_changes, "one slot per address change");

    // Every mechanism must have happened.
    for (int b = 0; b < 5; b++) check(n_bit_trans[b] > 0, $sformatf("transition on a%0d", b));
    for (int r = 0; r < 4; r++) check(n_row[r] > 0, $sformatf("word line %0d read", r));
    for (int c = 0; c < 8; c++) check(n_col[c] > 0, $sformatf("bit line %0d read", c));
    check(n_multi > 0, "multi-bit transition");
    check(n_ones > 0 && n_zeros > 0, "reads of 1 and of 0");
    check(n_gated > 0, "output zero outside the slot");
    check(n_fast > 0, "reads at 0.4 GHz");
    $display("slots=%0d ones=%0d zeros=%0d multi=%0d gated=%0d fast=%0d",
             n_slots, n_ones, n_zeros, n_multi, n_gated, n_fast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
