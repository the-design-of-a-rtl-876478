// drum_model: behavioural model of the magnetic drum, its storage heads with
// their read and write circuits, and its timing tracks. Not synthesizable;
// testbench use only.
//
// The drum turns once per 600 word slots of 8 us (4.8 ms). Each of the 200
// storage heads has a 600-bit track; head_rd[h] shows the bit of the slot
// under the heads, and a head whose head_we is high writes data line
// dr_line[h % 13] into that slot. Timing tracks, per slot of 8 us:
//   ap_trk  high from 4 us to the end of the slot (rising edge = A pulse,
//           falling edge = C pulse at the start of the next slot)
//   hp_trk  1 us mark at the start of slot 0
//   sp_trk  1 us marks at the start of slots 0 and 300
//   jp_trk  1 us marks 2 us into sector slots 298, 299 and 1 (JP2, JP3, JP1:
//           8 us from JP2 to JP3 and 16 us from JP3 to JP1)
// START_SLOT sets the angle at time zero. Track contents start random.
module drum_model #(
  parameter int unsigned CLK_PER_US = 4,
  parameter int unsigned START_SLOT = 0
) (
  input  logic         clk,
  input  logic [199:0] head_we,
  input  logic [0:12]  dr_line,
  output logic [199:0] head_rd,
  output logic         hp_trk,
  output logic         sp_trk,
  output logic         ap_trk,
  output logic         jp_trk,
  output int unsigned  slot
);

  localparam int unsigned SLOT_CLK = 8 * CLK_PER_US;

  logic [599:0] track [200];
  int unsigned  c = 0;          // clock within the slot
  int unsigned  ss;             // slot within the sector

  initial begin
    slot = START_SLOT;
    for (int h = 0; h < 200; h++)
      for (int w = 0; w < 600; w++)
        track[h][w] = 1'($urandom);
  end

  always @(posedge clk) begin
    for (int h = 0; h < 200; h++)
      if (head_we[h]) track[h][slot] <= dr_line[h % 13];
    if (c == SLOT_CLK - 1) begin
      c <= 0;
      slot <= (slot == 599) ? 0 : slot + 1;
    end else
      c <= c + 1;
  end

  always_comb begin
    ss = slot % 300;
    for (int h = 0; h < 200; h++) head_rd[h] = track[h][slot];
    ap_trk = (c >= 4 * CLK_PER_US);
    hp_trk = (slot == 0) && (c < CLK_PER_US);
    sp_trk = (ss == 0) && (c < CLK_PER_US);
    jp_trk = (ss == 298 || ss == 299 || ss == 1) &&
             (c >= 2 * CLK_PER_US) && (c < 3 * CLK_PER_US);
  end

endmodule
