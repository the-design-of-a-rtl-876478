// aux_memory: block-transfer interface between a 12-bit minicomputer's DMA
// channel and a magnetic drum, built around the drum's own timing tracks.
//
// The drum turns once per 4.8 ms and carries 600 word slots per track. The
// 195 usable storage heads form 15 patterns of 13 heads, each writing one
// 13-bit word (12 data bits plus odd parity) per slot; each pattern's track
// is split into two sectors of 300 slots, giving 30 block locations of 299
// data words. The first word of a transfer names the block: B11 the sector,
// B9..B10 the group (1..3), B6..B8 the pattern (0..4).
// Data flow: DMO -> B -> write gates -> heads on a write; heads -> read
// gates -> B -> DMI on a read. Timing: the timing-track signals are shaped
// into HP, SP, AP, CP, BP and JP (timing_pulses); P and SC locate the sector
// (sector_timing); transfer_control sequences the transfer, one word per
// 8 us slot, requesting each word from the DMA controller with AK and taking
// its answer on MRQ1B with t0. A parity failure on a read sets Z, which
// stays set until z_reset.
// The enables of the five spare heads (head_we[199:195]) are constant zero.
// Outside this block: the DMA controller and computer, the level converters,
// the analog read amplifiers (head_rd) and the vacuum-tube write drivers
// (head_we, dr_line).
module aux_memory
  import drum_pkg::*;
#(
  parameter int unsigned CLK_PER_US = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // DMA channel
  input  logic                 ctl_word,
  input  logic                 rw,
  input  logic                 t0,
  input  logic                 t2,
  input  logic                 mrq1b,
  input  data_t                dmo,
  output data_t                dmi,
  output logic                 ak,
  output logic                 busy,
  // parity failure flag
  output logic                 z,
  input  logic                 z_reset,
  // drum timing tracks
  input  logic                 hp_trk,
  input  logic                 sp_trk,
  input  logic                 ap_trk,
  input  logic                 jp_trk,
  // storage heads
  input  logic [NUM_HEADS-1:0] head_rd,
  output logic [NUM_HEADS-1:0] head_we,
  output word_t                dr_line
);

  logic hp, sp, ap, cp, bp, jp;
  logic hp_stb, sp_stb, ap_stb, cp_stb, bp_stb, jp_stb;
  logic [1:0] p;
  logic [3:0] p_char;
  logic jp1, jp2, jp3, sc;
  b_op_e b_op;
  logic addr_load, addr_clear, drum_write, z_check;
  logic q, h, n, r, y;
  word_t b, drum_word;
  data_t lb;
  logic parity, f1;
  logic s;
  group_t g;
  pat_t pt;
  logic [PATTERNS-1:0] sel;
  logic addr_valid;

  timing_pulses #(.CLK_PER_US(CLK_PER_US)) u_timing (
    .clk, .rst_n, .hp_trk, .sp_trk, .ap_trk, .jp_trk,
    .hp, .sp, .ap, .cp, .bp, .jp,
    .hp_stb, .sp_stb, .ap_stb, .cp_stb, .bp_stb, .jp_stb
  );

  sector_timing u_sector (
    .clk, .rst_n, .hp(hp_stb), .sp(sp_stb), .jp(jp_stb),
    .p, .p_char, .jp1, .jp2, .jp3, .sc
  );

  transfer_control u_ctl (
    .clk, .rst_n, .ctl_word, .rw, .t0, .t2, .mrq1b,
    .sp(sp_stb), .ap(ap_stb), .cp(cp_stb), .bp(bp_stb), .jp1, .jp3,
    .p2(p_char[2]), .b11(b[11]), .s, .sc,
    .b_op, .addr_load, .addr_clear, .drum_write, .z_check, .ak,
    .q, .h, .n, .r, .y
  );

  buffer_register u_b (
    .clk, .rst_n, .b_op, .dmo, .drum_word, .z_check, .z_reset,
    .b, .lb, .parity, .f1, .z
  );

  address_register u_addr (
    .clk, .rst_n, .load(addr_load), .clear(addr_clear), .b, .s, .g, .pt
  );

  address_decode u_dec (
    .g, .pt, .en(s == sc), .sel, .valid(addr_valid)
  );

  write_gates u_wg (
    .word({lb, parity}), .sel, .wr(drum_write), .dr_line, .head_we
  );

  read_gates u_rg (
    .head_rd, .sel, .en(y), .word(drum_word)
  );

  assign dmi  = y ? lb : '0;
  assign busy = h;

endmodule
