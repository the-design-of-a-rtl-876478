// tb_address_decode: exhaustive check of the pattern select for every group
// code, pattern code and enable value: group 1..3 with pattern 0..4 selects
// line 5*(group-1)+pattern, everything else selects nothing.
`timescale 1ns/1ps
module tb_address_decode;
  import drum_pkg::*;
  group_t g;
  pat_t pt;
  logic en;
  logic [14:0] sel;
  logic valid;

  address_decode dut (.*);

  int checks = 0, failures = 0;
  initial begin
    for (int e = 0; e < 2; e++)
      for (int gi = 0; gi < 4; gi++)
        for (int pi = 0; pi < 8; pi++) begin
          logic [14:0] exp;
          bit ok_addr;
          g = 2'(gi); pt = 3'(pi); en = 1'(e);
          #1;
          ok_addr = (gi >= 1) && (pi <= 4);
          exp = (ok_addr && e == 1) ? (15'd1 << ((gi - 1) * 5 + pi)) : 15'd0;
          checks += 2;
          if (sel != exp) begin failures++; $display("FAIL: g=%0d pt=%0d en=%0d sel=%h", gi, pi, e, sel); end
          if (valid != ok_addr) begin failures++; $display("FAIL: valid g=%0d pt=%0d", gi, pi); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
