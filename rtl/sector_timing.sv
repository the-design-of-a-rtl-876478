// sector_timing: the mod-four counter P and the sector control flip-flop SC.
//
// Each sector carries three J pulses on the timing track: JP2 and JP3 just
// before the sector ends and JP1 just after the next sector begins. P is
// zeroed by every SP and counts J pulses, so the J pulse that finds P at 0 is
// JP1, at 1 is JP2 and at 2 is JP3; p2 (P == 2) is the window between JP2 and
// JP3 in which the block address is taken. SC is reset by HP and set by the
// SP that follows it, so SC names the sector under the heads (0 for the half
// revolution after HP, 1 for the other). Both follow the document; the
// one-clock strobe inputs and the decoded jp1/jp2/jp3 strobes are this
// design's form of its pulse-driven flip-flops.
// Timing: jp1/jp2/jp3 are combinational from jp and P; P and SC change on the
// clock after their strobe. HP has priority over SP (they coincide at home).
module sector_timing (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       hp,       // HP strobe
  input  logic       sp,       // SP strobe
  input  logic       jp,       // JP strobe
  output logic [1:0] p,
  output logic [3:0] p_char,   // p_char[i] = 1 when P == i
  output logic       jp1,
  output logic       jp2,
  output logic       jp3,
  output logic       sc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p  <= 2'd0;
      sc <= 1'b0;
    end else begin
      if (sp)      p <= 2'd0;
      else if (jp) p <= p + 2'd1;   // wraps modulo four
      if (hp)      sc <= 1'b0;
      else if (sp) sc <= 1'b1;
    end
  end

  always_comb begin
    p_char = '0;
    p_char[p] = 1'b1;
  end

  assign jp1 = jp & p_char[0];
  assign jp2 = jp & p_char[1];
  assign jp3 = jp & p_char[2];

endmodule
