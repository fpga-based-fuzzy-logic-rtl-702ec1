// flc_fuzzifier: maps one normalised crisp input onto the five linguistic
// values NB, NS, Z, PS, PB.
//
// The sets are triangles centred at -1, -0.5, 0, 0.5 and 1 (in the Q10
// scale -1024 .. 1024), each reaching to the centres of its neighbours, so
// adjacent sets overlap by 50 % and the degrees of the (at most two) active
// sets always add up to 1. The outer sets NB and PB stay at 1 beyond -1 and
// +1. Because the centres are equally spaced by a power of two, the active
// pair and the degrees come from a shift and a mask rather than a divider:
//   p     = clamp(x, -1, 1) + 1           (0 .. 2048)
//   lo    = p >> 9, capped at 3           (index of the lower active set)
//   mu_hi = 2 * (p - 512*lo)              (degree of set lo+1)
//   mu_lo = 1024 - mu_hi                  (degree of set lo)
// Purely combinational.
module flc_fuzzifier
  import flc_pkg::*;
(
  input  logic signed [NORM_W-1:0] x,
  output fuzzy_t                   f
);

  logic signed [NORM_W-1:0] xc;
  logic [FUZZY_LOG+1:0]     p;      // 0 .. 2048
  logic [2:0]               idx;
  logic [FUZZY_LOG+1:0]     rem;
  logic [MU_W-1:0]          mu_hi;

  always_comb begin
    if (x > NORM_W'(FUZZY_ONE))       xc = NORM_W'(FUZZY_ONE);
    else if (x < -NORM_W'(FUZZY_ONE)) xc = -NORM_W'(FUZZY_ONE);
    else                              xc = x;
    p   = (FUZZY_LOG+2)'(xc + NORM_W'(FUZZY_ONE));
    idx = 3'(p >> MF_STEP_LOG);
    if (idx > 3'd3) idx = 3'd3;
    rem   = p - ((FUZZY_LOG+2)'(idx) << MF_STEP_LOG);
    mu_hi = MU_W'(rem << (FUZZY_LOG - MF_STEP_LOG));
    f.lo    = fset_t'(idx);
    f.mu_hi = mu_hi;
    f.mu_lo = MU_W'(FUZZY_ONE) - mu_hi;
  end

endmodule
