// address_register: the block address registers S, G and PT.
//
// The first word of every transfer is a block address. When told to load,
// the register copies S <- B11 (sector), G <- B9,B10 (group) and
// PT <- B6,B7,B8 (pattern) from the buffer register, as the document's
// address transfer equation does; clear zeroes all three at the end of a
// transfer. Group codes 1..3 name the three head groups and 0 names none, so
// a cleared register selects no heads (this design's reading of the group
// labels G1..G3). Timing: outputs change on the clock after load or clear.
module address_register
  import drum_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  logic   clear,
  input  word_t  b,
  output logic   s,
  output group_t g,
  output pat_t   pt
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= 1'b0; g <= '0; pt <= '0;
    end else if (clear) begin
      s <= 1'b0; g <= '0; pt <= '0;
    end else if (load) begin
      s  <= b[11];
      g  <= b[9:10];
      pt <= b[6:8];
    end
  end

endmodule
