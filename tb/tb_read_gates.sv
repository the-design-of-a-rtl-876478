// tb_read_gates: random head read values and one-hot pattern selects; the
// word must be the 13 heads of the selected pattern in bit order, taken from
// the drum layout (column by column from row 5 to row 1 inside a group of 13
// columns), and all zero when nothing is selected or the gate is closed.
`timescale 1ns/1ps
module tb_read_gates;
  import drum_pkg::*;
  logic [199:0] head_rd;
  logic [14:0] sel;
  logic en;
  word_t word;

  read_gates dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (2000) begin
      int ps;
      word_t exp;
      for (int i = 0; i < 200; i += 32) head_rd[i +: 32] = $urandom;
      ps = $urandom % 16;
      sel = (ps < 15) ? 15'(1 << ps) : '0;
      en = ($urandom % 4) != 0;
      exp = '0;
      if (en && ps < 15)
        for (int k = 0; k < 13; k++) begin
          int gi, i, ci, r;
          gi = ps / 5;
          i  = 13 * (ps % 5) + k;          // position in the group's 65 heads
          ci = i / 5;                      // column in the group
          r  = 5 - (i % 5);                // row
          exp[k] = head_rd[5 * (13 * gi + ci) + (5 - r)];
        end
      #1;
      checks++;
      if (word != exp) begin failures++; $display("FAIL: sel %0d en %0d word %h exp %h", ps, en, word, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
