// tb_capacity: fills the whole drum store and reads it back: 30 block
// locations (2 sectors x 3 groups x 5 patterns) of 299 data words each, 8970
// words in all, through the default-size design with a behavioural drum and
// DMA channel. Each block gets distinct random data; after all 30 writes
// every block is read back and compared word for word, so a block that
// overwrote another would show. Also checks that no read sets the parity
// flag, that the five spare heads of the last column are never written, and
// that 14 blocks of one sector (a full 4096-word memory image) load in
// under 0.1 s.
`timescale 1ns/1ps
module tb_capacity;
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
  int n_sector0 = 0, n_sector1 = 0, n_group3 = 0;

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

  data_t img [30][DATA_WORDS];
  int spare_writes = 0;
  int unsigned t_rd0, t_rd1;
  real ms_14;
  always @(posedge clk) if (|head_we[199:195]) spare_writes <= spare_writes + 1;

  initial begin
    addr_word = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    for (int loc = 0; loc < 30; loc++) begin
      write_block(loc % 2, (loc / 2) % 3 + 1, loc / 6, DATA_WORDS);
      img[loc] = wbuf;
    end
    // Read back sector 0 blocks first, then sector 1. Blocks of one sector
    // follow each other once per revolution, so the first 14 reads (a full
    // 4096-word memory image) are timed.
    for (int k = 0; k < 30; k++) begin
      int loc;
      loc = (k < 15) ? 2 * k : 2 * (k - 15) + 1;
      if (k == 0) t_rd0 = cyc;
      read_block(loc % 2, (loc / 2) % 3 + 1, loc / 6, img[loc], -1);
      if (k == 13) t_rd1 = cyc;
    end
    ms_14 = real'(t_rd1 - t_rd0) / CLK_PER_US / 1000.0;
    $display("14 blocks (4096-word memory image) read in %0.1f ms", ms_14);
    check(ms_14 < 100.0, "4096-word load under 0.1 s");
    check(!z, "no parity failure over the whole store");
    check(spare_writes == 0, "spare heads never written");
    $display("capacity: %0d blocks of %0d words written and read back", n_write, DATA_WORDS);
    check(n_write == 30 && n_read == 30, "all 30 locations used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
