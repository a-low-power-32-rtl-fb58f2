// tb_rom_workloads: reads the whole ROM with three kinds of contents at
// several address transition rates.
//
// Three ROMs hold all ones, the 50 % ones test pattern (row[0] xor col[0])
// and all zeros. The address is stepped through all 32 locations (scrambled
// order, several bits changing at once) at 50, 100, 200 and 400 MHz, i.e. one
// address every 20, 10, 5 and 2.5 ns. Each read is sampled in the middle of
// the precharge slot and compared with the contents; after the slot every
// output must be 0. Every rate and every content kind must see reads of the
// expected value, and the slot count must equal the number of changes.
`timescale 1ps / 1ps
module tb_rom_workloads;
  localparam int unsigned W = 1200;
  localparam int unsigned D = 560;
  localparam int unsigned GUARD = 50;
  localparam int unsigned N_RATES = 4;
  localparam int unsigned PERIOD_PS [N_RATES] = '{20000, 10000, 5000, 2500};

  logic [4:0] addr = 5'b11111;
  logic [2:0] pre, out;       // [0] all ones, [1] 50 % ones, [2] all zeros
  int         checks = 0, failures = 0;
  int         n_slots = 0, n_changes = 0;
  int         n_ok [N_RATES][3];

  rom32x1_atd #(.ROM_DATA(32'hFFFF_FFFF)) u_ones (.addr(addr), .precharge(pre[0]), .outbit(out[0]));
  rom32x1_atd                             u_half (.addr(addr), .precharge(pre[1]), .outbit(out[1]));
  rom32x1_atd #(.ROM_DATA(32'h0000_0000)) u_zero (.addr(addr), .precharge(pre[2]), .outbit(out[2]));

  always @(posedge pre[1]) n_slots++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s (addr=%b)", $realtime, what, addr);
    end
  endtask

  task automatic read(input logic [4:0] a, input int rate);
    logic [2:0] exp;
    exp = {1'b0, a[0] ^ a[2], 1'b1};
    addr = a;
    n_changes++;
    #(D + W / 2);
    check(pre == 3'b111, "slot open in all three ROMs");
    for (int k = 0; k < 3; k++) begin
      check(out[k] == exp[k], $sformatf("ROM %0d read %b expected %b", k, out[k], exp[k]));
      if (out[k] == exp[k]) n_ok[rate][k]++;
    end
    #(W / 2 + GUARD);
    check(pre == 3'b000 && out == 3'b000, "all outputs zero after the slot");
    #(PERIOD_PS[rate] - D - W - GUARD);
  endtask

  initial begin
    for (int r = 0; r < N_RATES; r++) for (int k = 0; k < 3; k++) n_ok[r][k] = 0;
    #10000;
    n_slots = 0;   // a power-up slot is not counted
    for (int r = 0; r < N_RATES; r++) begin
      for (int i = 0; i < 32; i++) begin
        logic [4:0] a;
        a = 5'((13 * i + 7 + r) % 32);
        if (a != addr) read(a, r);
      end
    end
    #10000;
    check(n_slots == n_changes, "one slot per address change");
    for (int r = 0; r < N_RATES; r++)
      for (int k = 0; k < 3; k++)
        check(n_ok[r][k] >= 31, $sformatf("rate %0d ROM %0d read everywhere", r, k));
    $display("changes=%0d slots=%0d", n_changes, n_slots);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
