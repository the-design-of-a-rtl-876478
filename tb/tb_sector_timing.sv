// tb_sector_timing: drives HP, SP and JP strobes in the order the drum gives
// them (SP with HP at home, JP1 after each SP, JP2 and JP3 before the next)
// and also in random order, comparing P, p0..p3, JP1..JP3 and SC with a
// reference model written from the counter's transfer equations.
`timescale 1ns/1ps
module tb_sector_timing;
  logic clk = 0, rst_n = 0;
  always #125 clk = ~clk;

  logic hp = 0, sp = 0, jp = 0;
  logic [1:0] p;
  logic [3:0] p_char;
  logic jp1, jp2, jp3, sc;

  sector_timing dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int ref_p = 0;
  bit ref_sc = 0;
  int n_jp1 = 0, n_jp2 = 0, n_jp3 = 0;

  task automatic step(input bit h, input bit s, input bit j);
    @(negedge clk);
    hp = h; sp = s; jp = j;
    #1;
    check(jp1 == (j && ref_p == 0) && jp2 == (j && ref_p == 1) && jp3 == (j && ref_p == 2),
          "J pulse decode");
    n_jp1 += int'(jp1); n_jp2 += int'(jp2); n_jp3 += int'(jp3);
    @(posedge clk);
    if (s) ref_p = 0; else if (j) ref_p = (ref_p + 1) % 4;
    if (h) ref_sc = 0; else if (s) ref_sc = 1;
    @(negedge clk);
    hp = 0; sp = 0; jp = 0;
    check(p == 2'(ref_p), $sformatf("P %0d expected %0d", p, ref_p));
    check(p_char == 4'(1 << ref_p), "characteristic functions");
    check(sc == ref_sc, "SC");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(p == 0 && !sc, "reset state");
    // Two drum revolutions in drum order.
    for (int rev = 0; rev < 2; rev++)
      for (int sec = 0; sec < 2; sec++) begin
        step(sec == 0, 1, 0);              // SP (with HP at home)
        check(sc == (sec == 1), "SC names the sector");
        step(0, 0, 1);                     // JP1
        repeat (3) step(0, 0, 0);
        step(0, 0, 1);                     // JP2
        check(p_char[2], "p2 between JP2 and JP3");
        step(0, 0, 1);                     // JP3
        check(p == 3, "P = 3 after JP3");
      end
    check(n_jp1 == 4 && n_jp2 == 4 && n_jp3 == 4, "one JP1, JP2, JP3 per sector");
    // Random strobes, including the mod-four wrap.
    repeat (300) step(($urandom % 16) == 0, ($urandom % 8) == 0, ($urandom % 2) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
