// tb_column_decoder: checks the 8:1 tree column decoder.
//
// For 64 random bit-line words and every select value, the output must be
// bit line number sel; walking-one and walking-zero words are checked too.
`timescale 1ps / 1ps
module tb_column_decoder;
  logic [7:0] c;
  logic [2:0] sel;
  logic       out;
  int         checks = 0, failures = 0;

  column_decoder dut (.c(c), .sel(sel), .out(out));

  task automatic try_word(input logic [7:0] w);
    c = w;
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s);
      #1000;
      checks++;
      if (out !== w[s]) begin
        failures++;
        $display("FAIL c=%b sel=%0d out=%b", w, s, out);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin
      try_word(8'b1 << i);
      try_word(~(8'b1 << i));
    end
    repeat (64) try_word(8'($urandom));
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
