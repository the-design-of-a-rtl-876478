// buffer_register: the 13-cell buffer register B, its parity logic and the
// parity-failure flip-flop Z.
//
// B holds each word on its way between the computer's DMA channel and the
// drum. Per the document, B0..B11 are data and B12 is parity; P(B) is one
// when L(B) = B0..B11 has an even number of ones and is the parity written to
// the drum, so stored words have odd parity. f1(B) = B12 xor P(B) is one when
// a word read back fails that check, and Z accumulates f1 over the words
// handed to the computer until it is reset by hand. The address fields of
// the first word are B11 (sector), B9..B10 (group) and B6..B8 (pattern).
// Interface: one b_op per clock (hold, clear, load L(B) from DMO leaving
// B12 alone, load all 13 cells from the drum). Outputs are combinational from
// the register. z_check samples f1 of the value B holds in that clock.
module buffer_register
  import drum_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  b_op_e  b_op,
  input  data_t  dmo,
  input  word_t  drum_word,
  input  logic   z_check,
  input  logic   z_reset,
  output word_t  b,
  output data_t  lb,       // L(B)
  output logic   parity,   // P(B)
  output logic   f1,       // parity failure of B
  output logic   z
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b <= '0;
      z <= 1'b0;
    end else begin
      unique case (b_op)
        B_CLEAR:     b <= '0;
        B_LOAD_DMO:  b[0:DATA_BITS-1] <= dmo;
        B_LOAD_DRUM: b <= drum_word;
        default:     ;
      endcase
      if (z_reset)      z <= 1'b0;
      else if (z_check) z <= z | f1;
    end
  end

  assign lb     = b[0:DATA_BITS-1];
  assign parity = even_ones(lb);
  assign f1     = b[DATA_BITS] ^ parity;

endmodule
