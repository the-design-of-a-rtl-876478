// tb_timing_pulses: checks the timing pulse shaper against the document's
// pulse widths. Track marks are driven like the drum's: an AP-track level
// that rises at the A pulse and falls at the C pulse, and short marks on the
// HP, SP and JP tracks, including a second mark inside a running pulse that
// must be ignored. Checks: every pulse is 2 us wide (BP 1 us), BP starts
// when AP ends, CP follows the falling AP-track edge, each pulse has exactly
// one strobe, at its first clock, strobes lag their track edge by 3 clocks,
// and BP starts 2 us after AP (AP 4 us and BP 6 us after CP, 8 us period).
`timescale 1ns/1ps
module tb_timing_pulses;
  localparam int unsigned CPU = 4;   // clocks per microsecond
  logic clk = 0, rst_n = 0;
  always #125 clk = ~clk;

  logic hp_trk = 0, sp_trk = 0, ap_trk = 0, jp_trk = 0;
  logic hp, sp, ap, cp, bp, jp, hp_stb, sp_stb, ap_stb, cp_stb, bp_stb, jp_stb;

  timing_pulses dut (.*);   // default CLK_PER_US = 4

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Pulse-width and strobe monitor for each output.
  logic [5:0] pv, sv, pv_d;
  int unsigned start [6];
  int unsigned nstb [6], npulse [6];
  int unsigned width_bad [6];
  int unsigned lastw [6];
  assign pv = {hp, sp, ap, cp, bp, jp};
  assign sv = {hp_stb, sp_stb, ap_stb, cp_stb, bp_stb, jp_stb};
  always @(posedge clk) begin
    pv_d <= rst_n ? pv : '0;
    if (rst_n) for (int i = 0; i < 6; i++) begin
      if (sv[i]) begin
        nstb[i]++;
        if (!(pv[i] && !pv_d[i])) width_bad[i]++;   // strobe not at the first clock
      end
      if (pv[i] && !pv_d[i]) begin start[i] = cyc; npulse[i]++; end
      if (!pv[i] && pv_d[i]) lastw[i] = cyc - start[i];
    end
  end

  int unsigned ap_start, t_edge;
  initial begin
    pv_d = '0;
    for (int i = 0; i < 6; i++) begin nstb[i] = 0; npulse[i] = 0; width_bad[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    // Eight word slots of 8 us.
    for (int w = 0; w < 8; w++) begin
      for (int c = 0; c < 8 * CPU; c++) begin
        @(negedge clk);
        ap_trk = (c >= 4 * CPU);
        hp_trk = (w == 0) && (c < CPU);
        sp_trk = (w == 0 || w == 4) && (c < CPU);
        // JP mark, plus a second mark 1 us later that falls inside the pulse.
        jp_trk = (w == 2) && ((c >= 2*CPU && c < 2*CPU + 2) || (c >= 3*CPU && c < 3*CPU + 2));
        if (w == 1 && c == 4 * CPU) t_edge = cyc;
      end
    end
    ap_trk = 0;
    repeat (40) @(posedge clk);
    // 8 rising AP-track edges, 8 falling ones (the last after the loop).
    check(npulse[3] == 8 && nstb[3] == 8, $sformatf("AP pulses %0d", npulse[3]));
    check(npulse[2] == 8 && nstb[2] == 8, $sformatf("CP pulses %0d", npulse[2]));
    check(npulse[1] == 8 && nstb[1] == 8, $sformatf("BP pulses %0d", npulse[1]));
    check(npulse[5] == 1 && nstb[5] == 1, "one HP");
    check(npulse[4] == 2 && nstb[4] == 2, "two SP");
    check(npulse[0] == 1 && nstb[0] == 1, "one JP, second mark ignored");
    for (int i = 0; i < 6; i++) begin
      check(width_bad[i] == 0, "strobe at first clock of pulse");
      check(lastw[i] == ((i == 1) ? 1 * CPU : 2 * CPU), $sformatf("pulse %0d width %0d", i, lastw[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // BP must start right after AP ends; AP strobe 3 clocks after its edge.
  always @(posedge clk) if (rst_n) begin
    if (ap_stb) ap_start = cyc;
    if (bp_stb) begin
      checks++;
      if (cyc - ap_start != 2 * CPU) begin failures++; $display("FAIL: BP at %0d after AP", cyc - ap_start); end
    end
    if (ap_stb && t_edge != 0 && cyc - t_edge < 8) begin
      checks++;
      if (cyc - t_edge != 3) begin failures++; $display("FAIL: AP latency %0d", cyc - t_edge); end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
