// tb_write_gates: checks the head write enables against the head layout of
// the drum: heads in 5 rows of 40 columns, head number 5*(column-1)+(5-row),
// three groups of 13 columns, and inside a group the 65 heads taken column
// by column from row 5 to row 1 give pattern 0 bits 0..12, then pattern 1,
// and so on. Spot checks take cells of the published layout (for example
// column 3, row 2 of a group is bit 0 of pattern 1). Random words and
// one-hot selects, with and without the write strobe.
`timescale 1ns/1ps
module tb_write_gates;
  import drum_pkg::*;
  word_t word, dr_line;
  logic [14:0] sel;
  logic wr;
  logic [199:0] head_we;

  write_gates dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Pattern (0..14) and bit of the head in drum column col (1..40) and row
  // r (1..5); -1 for the spare column.
  function automatic void layout(input int col, input int r, output int pat, output int bitn);
    int gi, ci, i;
    if (col > 39) begin pat = -1; bitn = -1; return; end
    gi = (col - 1) / 13;
    ci = (col - 1) % 13;
    i  = 5 * ci + (5 - r);
    pat = 5 * gi + i / 13;
    bitn = i % 13;
  endfunction

  initial begin
    int pat, bitn;
    // Cells of the published layout (group 1).
    layout(1, 5, pat, bitn);  check(pat == 0 && bitn == 0,  "col 1 row 5: PT0 bit 0");
    layout(3, 3, pat, bitn);  check(pat == 0 && bitn == 12, "col 3 row 3: PT0 bit 12");
    layout(3, 2, pat, bitn);  check(pat == 1 && bitn == 0,  "col 3 row 2: PT1 bit 0");
    layout(13, 1, pat, bitn); check(pat == 4 && bitn == 12, "col 13 row 1: PT4 bit 12");
    layout(14, 5, pat, bitn); check(pat == 5 && bitn == 0,  "col 14 row 5: group 2 PT0 bit 0");
    repeat (400) begin
      int ps;
      word = word_t'($urandom);
      ps = $urandom % 16;                       // 15 = no pattern selected
      sel = (ps < 15) ? 15'(1 << ps) : '0;
      wr = ($urandom % 4) != 0;
      #1;
      check(dr_line == word, "data lines carry the word");
      for (int col = 1; col <= 40; col++)
        for (int r = 1; r <= 5; r++) begin
          int h;
          bit exp;
          h = 5 * (col - 1) + (5 - r);
          layout(col, r, pat, bitn);
          exp = (pat >= 0) && wr && (pat == ps);
          check(head_we[h] == exp, $sformatf("head col %0d row %0d", col, r));
          // The data line a selected head sees is bit `bitn` of the word.
          if (exp) check(dr_line[bitn] == word[bitn], "data line of head");
        end
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
