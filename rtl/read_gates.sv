// read_gates: picks the 13 read-circuit outputs of the selected pattern.
//
// Uses the head numbering of write_gates (bit k of pattern p is head
// 13*p + k). Bit k of the result is the OR over patterns of
// "pattern selected and its head k reads one"; with one pattern selected that
// is a plain 15-way multiplexer per bit. `en` (the read-cycle flip-flop Y)
// gates the whole word so nothing reaches the buffer register outside a read
// cycle. Purely combinational; the buffer register samples the result at BP.
module read_gates
  import drum_pkg::*;
#(
  parameter int unsigned N_HEADS    = NUM_HEADS,
  parameter int unsigned N_PATTERNS = PATTERNS
) (
  input  logic [N_HEADS-1:0]    head_rd,
  input  logic [N_PATTERNS-1:0] sel,
  input  logic                  en,
  output word_t                 word
);

  always_comb begin
    word = '0;
    for (int p = 0; p < N_PATTERNS; p++)
      for (int k = 0; k < WORD_BITS; k++)
        if (p*WORD_BITS + k < N_HEADS)
          word[k] = word[k] | (en & sel[p] & head_rd[p*WORD_BITS + k]);
  end

endmodule
