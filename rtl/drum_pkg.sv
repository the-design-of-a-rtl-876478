// drum_pkg: sizes, word types and shared encodings of the drum auxiliary memory.
//
// A stored word is 13 bits: twelve data bits B0..B11 and a parity bit B12.
// Bits are numbered from the left, B0 being the most significant data bit and
// B11 the least significant, so the vector types below are declared [0:N].
// The storage heads form 5 rows of 40 columns (200 heads). Three groups of 13
// columns each hold five 13-head patterns, giving 15 patterns; the last
// column (5 heads) is spare. Each track holds 600 words per revolution, split
// into two sectors of 300 word slots.
package drum_pkg;

  localparam int unsigned DATA_BITS          = 12;   // B0..B11
  localparam int unsigned WORD_BITS          = 13;   // plus parity B12
  localparam int unsigned HEAD_ROWS          = 5;
  localparam int unsigned HEAD_COLUMNS       = 40;
  localparam int unsigned NUM_HEADS          = HEAD_ROWS * HEAD_COLUMNS;   // 200
  localparam int unsigned GROUPS             = 3;
  localparam int unsigned PATTERNS_PER_GROUP = 5;
  localparam int unsigned PATTERNS           = GROUPS * PATTERNS_PER_GROUP; // 15
  localparam int unsigned WORDS_PER_REV      = 600;
  localparam int unsigned WORDS_PER_SECTOR   = 300;
  localparam int unsigned DATA_WORDS         = 299;  // data words per block

  typedef logic [0:DATA_BITS-1] data_t;  // L(B), DMO, DMI
  typedef logic [0:WORD_BITS-1] word_t;  // B, DR
  typedef logic [1:0]           group_t; // G0 G1 (G0 is the high bit)
  typedef logic [2:0]           pat_t;   // PT0 PT1 PT2 (PT0 is the high bit)

  // Operation applied to the buffer register B in one clock.
  typedef enum logic [1:0] {
    B_HOLD      = 2'd0,
    B_CLEAR     = 2'd1,   // 0 -> B
    B_LOAD_DMO  = 2'd2,   // DMO -> L(B)
    B_LOAD_DRUM = 2'd3    // DR -> B
  } b_op_e;

  // P(B): one when L(B) holds an even number of ones. Written to the drum as
  // B12, so a stored word always has an odd number of ones.
  function automatic logic even_ones(input data_t d);
    return ~(^d);
  endfunction

endpackage
