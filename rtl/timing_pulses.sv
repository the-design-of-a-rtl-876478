// timing_pulses: shapes the drum timing-track signals into HP, SP, AP, CP, BP
// and JP pulses.
//
// The timing heads give one mark per pulse position. Each signal is brought
// into the clock domain by a two-flop synchroniser, its leading edge fires a
// 2 us one-shot, and the shaped pulse is what the rest of the design sees.
// Following the document: every pulse is 2 us wide except BP, which is 1 us
// wide and is made from the trailing edge of AP; CP comes from the inverted
// AP track. This design takes the AP-track signal as a level that rises at the
// A-pulse position and falls at the C-pulse position (the "inverted signal"),
// and treats the head amplifiers and limiters ahead of this block as analog.
// Outputs: the shaped pulses and, for each, a one-clock strobe at its start.
// Latency: a strobe follows its track edge by three clocks; BP starts in the
// clock after AP ends, so it lies 2 us after AP as in the document.
module timing_pulses #(
  parameter int unsigned CLK_PER_US = 4,
  parameter int unsigned PULSE_US   = 2,
  parameter int unsigned BP_US      = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic hp_trk,
  input  logic sp_trk,
  input  logic ap_trk,
  input  logic jp_trk,
  output logic hp, sp, ap, cp, bp, jp,
  output logic hp_stb, sp_stb, ap_stb, cp_stb, bp_stb, jp_stb
);

  localparam int unsigned PW  = PULSE_US * CLK_PER_US;
  localparam int unsigned BPW = BP_US * CLK_PER_US;

  logic [3:0] s1, s2, s3;   // synchroniser stages and edge-detect history
  logic       hp_rise, sp_rise, ap_rise, ap_fall, jp_rise;
  logic       ap_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0;
    end else begin
      s1 <= {hp_trk, sp_trk, ap_trk, jp_trk};
      s2 <= s1;
      s3 <= s2;
    end
  end

  assign hp_rise = s2[3] & ~s3[3];
  assign sp_rise = s2[2] & ~s3[2];
  assign ap_rise = s2[1] & ~s3[1];
  assign ap_fall = ~s2[1] & s3[1];
  assign jp_rise = s2[0] & ~s3[0];

  monostable #(.WIDTH(PW))  u_hp (.clk, .rst_n, .trig(hp_rise), .pulse(hp), .stb(hp_stb), .last());
  monostable #(.WIDTH(PW))  u_sp (.clk, .rst_n, .trig(sp_rise), .pulse(sp), .stb(sp_stb), .last());
  monostable #(.WIDTH(PW))  u_ap (.clk, .rst_n, .trig(ap_rise), .pulse(ap), .stb(ap_stb), .last(ap_last));
  monostable #(.WIDTH(PW))  u_cp (.clk, .rst_n, .trig(ap_fall), .pulse(cp), .stb(cp_stb), .last());
  monostable #(.WIDTH(BPW)) u_bp (.clk, .rst_n, .trig(ap_last), .pulse(bp), .stb(bp_stb), .last());
  monostable #(.WIDTH(PW))  u_jp (.clk, .rst_n, .trig(jp_rise), .pulse(jp), .stb(jp_stb), .last());

endmodule
