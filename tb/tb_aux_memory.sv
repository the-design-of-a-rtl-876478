// tb_aux_memory: end-to-end test of the drum auxiliary memory at its default
// parameters, with a behavioural drum and a behavioural DMA channel.
//
// The DMA side issues t0 every 2 us (the channel's top rate of 5e5 cycles a
// second) and t2 0.5 us later. A transfer pulses ctl_word, offers the block
// address on DMO at the next t0, then answers each raised AK with MRQ1B at the
// next t0, up to its word count. The test writes and reads blocks in both
// sectors and in the first and last patterns, writes a short block (the rest
// of the block must be filled with zero words), corrupts one stored bit to
// make the parity check set Z, and resets Z by hand. Two transfers are
// started on purpose just inside and just after the address window before
// their sector: the first must start at the next SP, the second must let the
// sector pass and start one revolution later. It checks every stored
// bit against the head layout and parity rule, every word read back, one
// drum write per 8 us word slot, the first write in slot 1 of the sector and
// 299 words per block, and counts each mechanism it exercises.
`timescale 1ns/1ps
module tb_aux_memory;
  import drum_pkg::*;

  localparam int unsigned CLK_PER_US = 4;
  localparam int unsigned SLOT_CLK   = 8 * CLK_PER_US;

  logic clk = 0, rst_n = 0;
  always #125 clk = ~clk;   // 4 MHz

  logic ctl_word = 0, rw = 0, t0, t2, mrq1b, z_reset = 0;
  data_t dmo, dmi;
  logic ak, busy, z;
  logic hp_trk, sp_trk, ap_trk, jp_trk;
  logic [199:0] head_rd, head_we;
  word_t dr_line;
  int unsigned slot;

  aux_memory dut (.*);
  drum_model #(.CLK_PER_US(CLK_PER_US), .START_SLOT(137)) dm (
    .clk, .head_we, .dr_line, .head_rd, .hp_trk, .sp_trk, .ap_trk, .jp_trk, .slot);

  int checks = 0, failures = 0;
  int n_wait = 0, n_write = 0, n_read = 0, n_fill = 0, n_parity = 0, n_zreset = 0;
  int n_sector0 = 0, n_sector1 = 0, n_group3 = 0, n_in_window = 0, n_missed = 0;
  int unsigned last_wait_us;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- DMA channel model ----------------
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign t0 = (cyc % 8 == 0);
  assign t2 = (cyc % 8 == 2);

  bit    dma_on = 0;
  bit    dma_write = 0;
  int    dma_count = 0, dma_limit = 0;
  bit    cnt_clr = 0;                 // clears the DMA and monitor counters
  data_t addr_word;
  data_t wbuf [DATA_WORDS];
  data_t rbuf [DATA_WORDS];

  assign mrq1b = dma_on && t0 && ak && (dma_count < dma_limit);
  assign dmo   = (dma_on && dma_write && dma_count < dma_limit) ? wbuf[dma_count] : addr_word;

  always @(posedge clk) begin
    if (cnt_clr) dma_count <= 0;
    else if (mrq1b) begin
      if (!dma_write) rbuf[dma_count] <= dmi;
      dma_count <= dma_count + 1;
    end
  end

  // ---------------- write-strobe monitor ----------------
  int wr_n = 0, wr_first_slot = -1, wr_bad_gap = 0;
  int unsigned wr_last_cyc = 0;
  always @(posedge clk) begin
    if (cnt_clr) begin
      wr_n <= 0; wr_bad_gap <= 0;
    end else if (dut.u_ctl.drum_write) begin
      if (wr_n == 0) wr_first_slot <= int'(slot);
      else if (cyc - wr_last_cyc != SLOT_CLK) wr_bad_gap <= wr_bad_gap + 1;
      wr_last_cyc <= cyc;
      wr_n <= wr_n + 1;
    end
  end

  // Heads of bit k of pattern p are 13*p + k; pattern p = 5*(group-1) + pt.
  function automatic int head_of(int g, int pt, int k);
    return 65 * (g - 1) + 13 * pt + k;
  endfunction

  function automatic data_t mk_addr(int s, int g, int pt);
    data_t a;
    a = data_t'($urandom);          // B0..B5 carry no address
    a[6:8] = 3'(pt); a[9:10] = 2'(g); a[11] = 1'(s);
    return a;
  endfunction

  // Run one transfer and wait for the unit to go idle.
  task automatic transfer(input bit wr, input int s, input int g, input int pt, input int nwords);
    int unsigned t_addr, t_start;
    @(posedge clk);
    rw <= wr; dma_write <= wr; cnt_clr <= 1; dma_limit <= nwords;
    addr_word <= mk_addr(s, g, pt);
    @(posedge clk);
    cnt_clr  <= 0;
    ctl_word <= 1;
    @(posedge clk);
    ctl_word <= 0;
    wait (busy);
    t_addr = cyc;
    dma_on <= 1;
    wait (dut.r || dut.y);
    t_start = cyc;
    if (t_start - t_addr > 2 * SLOT_CLK) n_wait++;
    last_wait_us = (t_start - t_addr) / CLK_PER_US;
    check(dut.s == 1'(s) && dut.g == 2'(g) && dut.pt == 3'(pt), "address registers");
    wait (!busy);
    @(posedge clk);
    dma_on <= 0;
    check(!ak, "AK dropped at end of transfer");
    check(dma_count == nwords, $sformatf("words moved %0d expected %0d", dma_count, nwords));
    check(dut.g == 0 && dut.pt == 0 && !dut.s && !dut.q, "registers cleared at end");
    if (s == 0) n_sector0++; else n_sector1++;
    if (g == 3) n_group3++;
  endtask

  task automatic write_block(input int s, input int g, input int pt, input int nwords);
    for (int i = 0; i < DATA_WORDS; i++) wbuf[i] = data_t'($urandom);
    transfer(1'b1, s, g, pt, nwords);
    n_write++;
    check(wr_n == DATA_WORDS, $sformatf("drum writes %0d", wr_n));
    check(wr_bad_gap == 0, "one drum write per 8 us word slot");
    check(wr_first_slot == 300 * s + 1, $sformatf("first write in slot %0d", wr_first_slot));
    // Stored data and parity, slot j holds word j-1.
    for (int j = 1; j <= DATA_WORDS; j++) begin
      data_t exp_d;
      logic  ok;
      exp_d = (j <= nwords) ? wbuf[j-1] : '0;
      ok = 1;
      for (int k = 0; k < 12; k++)
        if (dm.track[head_of(g, pt, k)][300*s + j] != exp_d[k]) ok = 0;
      if (dm.track[head_of(g, pt, 12)][300*s + j] != ~(^exp_d)) ok = 0;
      check(ok, $sformatf("stored word slot %0d", j));
    end
    if (nwords < DATA_WORDS) n_fill++;
  endtask

  task automatic read_block(input int s, input int g, input int pt, input data_t exp[DATA_WORDS],
                            input int bad_word);
    transfer(1'b0, s, g, pt, DATA_WORDS);
    n_read++;
    for (int j = 0; j < DATA_WORDS; j++)
      if (j != bad_word)
        check(rbuf[j] == exp[j], $sformatf("read word %0d got %h expected %h", j, rbuf[j], exp[j]));
  endtask

  data_t img_a [DATA_WORDS];
  data_t img_b [DATA_WORDS];
  data_t img_c [DATA_WORDS];
  logic [599:0] guard;

  initial begin
    addr_word = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);

    // Block A: sector 1, group 2, pattern 3, full block.
    guard = dm.track[head_of(2, 2, 5)];
    write_block(1, 2, 3, DATA_WORDS);
    img_a = wbuf;
    check(dm.track[head_of(2, 2, 5)] == guard, "neighbouring pattern untouched");
    read_block(1, 2, 3, img_a, -1);
    check(!z, "no parity failure on clean read");

    // Block B: sector 0, group 1, pattern 0, short block of 100 words.
    write_block(0, 1, 0, 100);
    for (int i = 0; i < DATA_WORDS; i++) img_b[i] = (i < 100) ? wbuf[i] : '0;
    read_block(0, 1, 0, img_b, -1);
    check(!z, "zero-filled words pass the parity check");

    // Block C: sector 1, group 3, pattern 4 (the last pattern).
    write_block(1, 3, 4, DATA_WORDS);
    img_c = wbuf;
    read_block(1, 3, 4, img_c, -1);
    // Block A must have survived the writes to B and C.
    read_block(1, 2, 3, img_a, -1);
    check(!z, "Z still clear");

    // Address word arriving at the start of the p2 window before sector 1:
    // the write must start at the very next SP (within 16 us).
    wait (dut.u_sector.p == 2'd2 && !dut.u_sector.sc);
    write_block(1, 1, 2, DATA_WORDS);
    check(last_wait_us <= 16, $sformatf("in-window address waited %0d us", last_wait_us));
    if (last_wait_us <= 16) n_in_window++;
    // Address word arriving after JP3, just before sector 1 opens: too late
    // for this sector, so the write must wait a full revolution and still
    // land in slots 1..299 of sector 1.
    wait (dut.u_sector.p == 2'd3 && !dut.u_sector.sc);
    write_block(1, 1, 1, DATA_WORDS);
    check(last_wait_us > 4700 && last_wait_us < 4820,
          $sformatf("late address waited %0d us", last_wait_us));
    if (last_wait_us > 4700) n_missed++;
    read_block(1, 1, 1, wbuf, -1);

    // Corrupt one bit of word 50 of block A and read it back.
    dm.track[head_of(2, 3, 4)][300 + 51] = ~dm.track[head_of(2, 3, 4)][300 + 51];
    read_block(1, 2, 3, img_a, 50);
    check(rbuf[50] == (img_a[50] ^ (12'b1 << (11 - 4))), "corrupted word delivered");
    check(z, "parity failure sets Z");
    if (z) n_parity++;
    @(posedge clk); z_reset <= 1;
    @(posedge clk); z_reset <= 0;
    @(posedge clk);
    check(!z, "manual reset clears Z");
    if (!z) n_zreset++;

    $display("mechanisms: sector_wait=%0d write=%0d read=%0d short_fill=%0d parity_fail=%0d z_reset=%0d sector0=%0d sector1=%0d group3=%0d in_window=%0d missed_window=%0d",
             n_wait, n_write, n_read, n_fill, n_parity, n_zreset, n_sector0, n_sector1, n_group3,
             n_in_window, n_missed);
    check(n_wait > 0 && n_write > 0 && n_read > 0 && n_fill > 0 && n_parity > 0 &&
          n_zreset > 0 && n_sector0 > 0 && n_sector1 > 0 && n_group3 > 0 &&
          n_in_window > 0 && n_missed > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
