// write_gates: drives the drum write circuits for one word.
//
// Head numbering used throughout the design: head h sits in column h/5
// (column 1 of the drum is 0) and row 5 - h%5, so h runs down a column from
// row 5 to row 1 and then on to the next column. With that numbering the
// document's pattern layout becomes linear: bit k of pattern p is head
// 13*p + k, and heads 195..199 (the last column) are spares.
// As in the document, data bit k goes to bit k of every pattern in parallel
// (dr_line), and only the heads of the selected pattern are enabled, during
// the one-clock write strobe `wr`. dr_line carries L(B) and P(B) at all
// times; head_we is combinational from sel and wr. Two kinds of outputs are
// idle by design: dr_line is the input word wired straight through (the
// parallel data wiring to every pattern), and the five spare-head enables
// are constant zero.
module write_gates
  import drum_pkg::*;
#(
  parameter int unsigned N_HEADS    = NUM_HEADS,
  parameter int unsigned N_PATTERNS = PATTERNS
) (
  input  word_t                   word,
  input  logic [N_PATTERNS-1:0]   sel,
  input  logic                    wr,
  output word_t                   dr_line,
  output logic [N_HEADS-1:0]      head_we
);

  assign dr_line = word;

  always_comb begin
    head_we = '0;
    for (int p = 0; p < N_PATTERNS; p++)
      for (int k = 0; k < WORD_BITS; k++)
        if (p*WORD_BITS + k < N_HEADS)
          head_we[p*WORD_BITS + k] = wr & sel[p];
  end

endmodule
