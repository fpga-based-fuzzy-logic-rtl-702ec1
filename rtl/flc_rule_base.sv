// flc_rule_base: the knowledge base of the fuzzy controller, a 25-entry rule
// read-only memory.
//
// For an (error set, change-of-error set) pair it returns the consequent of
// the matching IF-THEN rule as the 12-bit output singleton D1..D5
// (-1, -0.5, 0, 0.5, 1 in the Q10 scale). The rule matrix is the design's;
// storing it as a constant array read by two indices is this design's
// choice. Purely combinational.
module flc_rule_base
  import flc_pkg::*;
(
  input  fset_t e_set,
  input  fset_t de_set,
  output fset_t c_set,
  output mf_t   c_val
);

  always_comb begin
    if (e_set <= PB && de_set <= PB) c_set = RULE_TABLE[e_set][de_set];
    else                             c_set = ZZ;
    c_val = MF_CENTER[c_set];
  end

endmodule
