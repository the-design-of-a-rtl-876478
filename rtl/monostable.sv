// monostable: digital stand-in for a one-shot multivibrator.
//
// A one-clock trigger starts a pulse of WIDTH clocks. The one-shot is not
// retriggerable: a trigger that arrives while the pulse is running is ignored.
// `pulse` is the shaped pulse; `stb` is high in its first clock only, so logic
// that must act once per pulse can use it as an edge; `last` is high in its
// final clock, so a following one-shot can start on this one's trailing edge.
// Timing: pulse and stb rise one clock after trig.
module monostable #(
  parameter int unsigned WIDTH = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig,
  output logic pulse,
  output logic stb,
  output logic last
);

  logic [$clog2(WIDTH+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      cnt <= '0;
    else if (trig && cnt == '0)
      cnt <= ($bits(cnt))'(WIDTH);
    else if (cnt != '0)
      cnt <= cnt - 1'b1;
  end

  assign pulse = (cnt != '0);
  assign stb   = (cnt == ($bits(cnt))'(WIDTH));
  assign last  = (cnt == ($bits(cnt))'(1));

endmodule
