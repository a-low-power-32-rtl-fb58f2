// tb_rom_core: checks the NOR ROM array.
//
// One array holds the default test pattern; the expected bit is worked out
// from the pattern's rule (even rows 0,1,0,1,... and odd rows 1,0,1,0,...
// on bit lines 0..7, i.e. row[0] xor col[0]). A second array holds other
// contents. For every word-line combination and both precharge levels the
// bit lines must be high exactly where precharge is high and no active word
// line has a stored 0; with one word line active that is the stored row.
`timescale 1ps / 1ps
module tb_rom_core;
  localparam logic [3:0][7:0] OTHER = 32'hC3_0F_F0_96;

  logic [3:0] wl;
  logic       precharge;
  logic [7:0] bl, bl2;
  int         checks = 0, failures = 0;

  rom_core dut (.wl(wl), .precharge(precharge), .bl(bl));
  rom_core #(.ROM_DATA(OTHER)) dut2 (.wl(wl), .precharge(precharge), .bl(bl2));

  function automatic bit pattern_bit(int r, int c);
    return bit'((r % 2) != (c % 2));
  endfunction

  initial begin
    for (int p = 0; p < 2; p++) begin
      for (int w = 0; w < 16; w++) begin
        logic [7:0] exp, exp2;
        wl = 4'(w);
        precharge = p[0];
        for (int c = 0; c < 8; c++) begin
          exp[c]  = p[0];
          exp2[c] = p[0];
          for (int r = 0; r < 4; r++) begin
            if (wl[r] && !pattern_bit(r, c)) exp[c] = 1'b0;
            if (wl[r] && !OTHER[r][c])       exp2[c] = 1'b0;
          end
        end
        #1000;
        checks += 2;
        if (bl !== exp) begin
          failures++;
          $display("FAIL wl=%b pre=%0d bl=%b expected %b", wl, p, bl, exp);
        end
        if (bl2 !== exp2) begin
          failures++;
          $display("FAIL (other) wl=%b pre=%0d bl=%b expected %b", wl, p, bl2, exp2);
        end
      end
    end
    // One-hot word lines read the stored rows directly.
    precharge = 1'b1;
    for (int r = 0; r < 4; r++) begin
      wl = 4'b0001 << r;
      #1000;
      checks++;
      if (bl !== (r % 2 ? 8'h55 : 8'hAA)) begin
        failures++;
        $display("FAIL row %0d read %h", r, bl);
      end
    end
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
