// tb_address_register: loads random address words and checks the sector,
// group and pattern fields (B11, B9..B10, B6..B8 counted from the left),
// holding between loads and clearing on request.
`timescale 1ns/1ps
module tb_address_register;
  import drum_pkg::*;
  logic clk = 0, rst_n = 0;
  always #125 clk = ~clk;

  logic load = 0, clear = 0, s;
  word_t b = '0;
  group_t g;
  pat_t pt;

  address_register dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int rs = 0, rg = 0, rp = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (500) begin
      logic [12:0] v;
      @(negedge clk);
      v = 13'($urandom);
      b = word_t'(v);
      load  = ($urandom % 2) == 0;
      clear = ($urandom % 7) == 0;
      @(posedge clk);
      if (clear) begin rs = 0; rg = 0; rp = 0; end
      else if (load) begin
        // word_t bit i (from the left) is v[12-i]
        rs = int'(v[12-11]);
        rg = int'({v[12-9], v[12-10]});
        rp = int'({v[12-6], v[12-7], v[12-8]});
      end
      @(negedge clk);
      load = 0; clear = 0;
      check(s == 1'(rs) && g == 2'(rg) && pt == 3'(rp),
            $sformatf("address s=%0d g=%0d pt=%0d expected %0d %0d %0d", s, g, pt, rs, rg, rp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
