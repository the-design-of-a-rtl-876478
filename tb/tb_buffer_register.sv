// tb_buffer_register: random sequences of B operations, checked against a
// reference model: clear, load of the 12 data cells from DMO (parity cell
// kept), load of all 13 cells from the drum, and hold. P(B) and the parity
// check are recomputed by counting ones; Z must collect every failed check
// it is told to sample and clear only on the manual reset.
`timescale 1ns/1ps
module tb_buffer_register;
  import drum_pkg::*;
  logic clk = 0, rst_n = 0;
  always #125 clk = ~clk;

  b_op_e b_op = B_HOLD;
  data_t dmo = '0, lb;
  word_t drum_word = '0, b;
  logic z_check = 0, z_reset = 0, parity, f1, z;

  buffer_register dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int ones(input data_t d);
    int n = 0;
    for (int i = 0; i < 12; i++) n += int'(d[i]);
    return n;
  endfunction

  logic [12:0] ref_b = '0;   // ref_b[12-i] is Bi
  bit ref_z = 0;
  int n_fail_seen = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) begin
      bit ref_p, ref_f1;
      data_t cur;
      @(negedge clk);
      b_op      = b_op_e'($urandom % 4);
      dmo       = data_t'($urandom);
      drum_word = word_t'($urandom);
      z_check   = ($urandom % 3) == 0;
      z_reset   = ($urandom % 29) == 0;
      #1;
      for (int i = 0; i < 12; i++) cur[i] = ref_b[12-i];
      ref_p  = (ones(cur) % 2) == 0;
      ref_f1 = ref_b[0] ^ ref_p;
      check(b == word_t'(ref_b), "B contents");
      check(lb == cur, "L(B)");
      check(parity == ref_p, "P(B)");
      check(f1 == ref_f1, "parity check f1");
      check(z == ref_z, "Z");
      if (z_check && ref_f1) n_fail_seen++;
      @(posedge clk);
      if (z_reset) ref_z = 0; else if (z_check) ref_z = ref_z | ref_f1;
      case (b_op)
        B_CLEAR:     ref_b = '0;
        B_LOAD_DMO:  ref_b = {dmo, ref_b[0]};
        B_LOAD_DRUM: ref_b = drum_word;
        default:     ;
      endcase
    end
    // A stored word read back with correct parity must pass.
    @(negedge clk); b_op = B_LOAD_DRUM; drum_word = {12'o5252, 1'b1}; z_check = 0; z_reset = 0;
    @(negedge clk); b_op = B_HOLD;
    check(!f1, "odd-parity word passes");
    check(n_fail_seen > 0, "parity failures exercised");
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
