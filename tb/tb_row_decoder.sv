// tb_row_decoder: exhaustive check of the 2:4 row decoder.
//
// For every row address and both precharge levels, compares the row lines
// with a one-hot word (1 << address) when precharge is high and all-zero
// when it is low.
`timescale 1ps / 1ps
module tb_row_decoder;
  logic [1:0] a, a_bar;
  logic       precharge;
  logic [3:0] row;
  int         checks = 0, failures = 0;

  row_decoder dut (.a(a), .a_bar(a_bar), .precharge(precharge), .row(row));

  initial begin
    for (int p = 0; p < 2; p++) begin
      for (int i = 0; i < 4; i++) begin
        logic [3:0] exp;
        a = 2'(i);
        a_bar = ~a;
        precharge = p[0];
        exp = p[0] ? (4'b0001 << i) : 4'b0000;
        #1000;
        checks++;
        if (row !== exp) begin
          failures++;
          $display("FAIL a=%0d precharge=%0d row=%b expected %b", i, p, row, exp);
        end
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
