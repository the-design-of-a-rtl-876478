// tb_transfer_control: steps the control unit through a complete write and a
// complete read by hand-placed strobes, checking every transfer equation:
// Q set by the control word, the address word loaded at t0 (H, N set), the
// address step only with F, N, p2 and t2, a write started only by SP in the
// sector before the addressed one and a read only by JP1 inside the
// addressed sector, the AK request and answer of each of 299 words, the drum
// write at CP, the drum load at BP, the Z check at each read answer, and the
// reset of the unit by JP3 (write) or the next JP1 (read).
`timescale 1ns/1ps
module tb_transfer_control;
  import drum_pkg::*;
  logic clk = 0, rst_n = 0;
  always #125 clk = ~clk;

  logic ctl_word = 0, rw = 0, t0 = 0, t2 = 0, mrq1b = 0;
  logic sp = 0, ap = 0, cp = 0, bp = 0, jp1 = 0, jp3 = 0, p2 = 0;
  logic b11 = 0, s = 0, sc = 0;
  b_op_e b_op;
  logic addr_load, addr_clear, drum_write, z_check, ak, q, h, n, r, y;

  transfer_control dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Record what the unit asks for during the strobe cycle.
  b_op_e seen_op;
  logic  seen_load, seen_clear, seen_write, seen_z;
  task automatic strobe(input string which);
    @(negedge clk);
    case (which)
      "ctl": ctl_word = 1;
      "t0":  t0 = 1;
      "t0m": begin t0 = 1; mrq1b = 1; end
      "t2":  t2 = 1;
      "t2p": begin t2 = 1; p2 = 1; end
      "sp":  sp = 1;
      "ap":  ap = 1;
      "cp":  cp = 1;
      "bp":  bp = 1;
      "jp1": jp1 = 1;
      "jp3": jp3 = 1;
      default: ;
    endcase
    #1;
    seen_op = b_op; seen_load = addr_load; seen_clear = addr_clear;
    seen_write = drum_write; seen_z = z_check;
    @(negedge clk);
    {ctl_word, t0, mrq1b, t2, p2, sp, ap, cp, bp, jp1, jp3} = '0;
  endtask

  int nreq, nans, nwr, nld, nz;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check({q, h, n, r, y, ak} == 6'b0, "all control flip-flops start at zero");

    // ---------------- write to sector 1 ----------------
    rw = 1;
    strobe("t0");  check(!h && seen_op == B_HOLD, "no address without Q");
    strobe("ctl"); check(q, "control word sets Q");
    strobe("t0");  check(seen_op == B_LOAD_DMO && h && n, "address word to B, H and N set");
    strobe("t0");  check(seen_op == B_HOLD, "further t0 ignored while waiting");
    b11 = 1; sc = 1;                        // addressed sector is under the heads: F = 0
    strobe("t2p"); check(!seen_load && n, "no address step when F = 0");
    sc = 0;                                 // sector before the addressed one: F = 1
    strobe("t2");  check(!seen_load && n, "no address step outside p2");
    strobe("t2p"); check(seen_load && !n && seen_op == B_HOLD, "address step");
    s = 1;
    strobe("jp1"); check(!r && !y, "a write does not start on JP1");
    strobe("sp");  check(r, "SP opening the addressed sector starts the write");
    sc = 1;
    nreq = 0; nans = 0; nwr = 0;
    for (int w = 0; w < DATA_WORDS; w++) begin
      strobe("ap"); if (ak && seen_op == B_CLEAR) nreq++;
      strobe("t0m"); if (!ak && seen_op == B_LOAD_DMO) nans++;
      strobe("cp"); if (seen_write) nwr++;
    end
    check(nreq == DATA_WORDS && nans == DATA_WORDS && nwr == DATA_WORDS,
          $sformatf("write words: req %0d ans %0d wr %0d", nreq, nans, nwr));
    strobe("jp3");
    check(seen_clear && !r && !q && !h && !ak, "JP3 ends the write");
    strobe("cp");  check(!seen_write, "no drum write after the end");

    // ---------------- read from sector 0 ----------------
    rw = 0; b11 = 0; s = 0; sc = 1;
    strobe("ctl");
    strobe("t0");  check(h && n, "read: address word taken");
    strobe("t2p"); check(seen_load && seen_op == B_CLEAR && !n, "read address step clears B");
    strobe("sp");  check(!r && !y, "a read does not start on SP");
    s = 0;
    strobe("jp1"); check(!y, "no read start outside the addressed sector");
    sc = 0;
    strobe("jp1"); check(y, "JP1 inside the addressed sector starts the read");
    nld = 0; nreq = 0; nans = 0; nz = 0;
    for (int w = 0; w < DATA_WORDS; w++) begin
      strobe("bp"); if (seen_op == B_LOAD_DRUM) nld++;
      strobe("cp"); if (ak) nreq++;
      strobe("t0m"); if (!ak && seen_z && seen_op == B_CLEAR) nans++;
    end
    check(nld == DATA_WORDS && nreq == DATA_WORDS && nans == DATA_WORDS,
          $sformatf("read words: load %0d req %0d ans %0d", nld, nreq, nans));
    strobe("jp1");
    check(seen_clear && !y && !q && !h && !ak, "next JP1 ends the read");
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
