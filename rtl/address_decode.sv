// address_decode: turns the group and pattern registers into one of the
// pattern-select lines.
//
// The heads are arranged in GROUPS groups of PATTERNS_PER_GROUP patterns of
// 13 heads. Group code g (1..GROUPS) and pattern code pt (0..PATTERNS_PER_GROUP-1)
// select line (g-1)*PATTERNS_PER_GROUP + pt. Group code 0 or an out-of-range
// pattern selects nothing and drops `valid`. The select is also gated by
// `en`, which the top drives with "the addressed sector is under the heads"
// (S equal to SC), so no head is selected outside the addressed half of the
// drum. Purely combinational.
module address_decode
  import drum_pkg::*;
#(
  parameter int unsigned N_GROUPS   = GROUPS,
  parameter int unsigned N_PATTERNS = PATTERNS_PER_GROUP
) (
  input  group_t                           g,
  input  pat_t                             pt,
  input  logic                             en,
  output logic [N_GROUPS*N_PATTERNS-1:0]   sel,
  output logic                             valid
);

  always_comb begin
    sel   = '0;
    valid = (g != '0) && (int'(g) <= N_GROUPS) && (int'(pt) < N_PATTERNS);
    for (int gi = 1; gi <= N_GROUPS; gi++)
      for (int pi = 0; pi < N_PATTERNS; pi++)
        if (en && int'(g) == gi && int'(pt) == pi)
          sel[(gi-1)*N_PATTERNS + pi] = 1'b1;
  end

endmodule
