// flc_pkg: types and constants shared by the fuzzy logic voltage controller.
//
// Number formats used throughout the controller:
//   * ADC samples are 12-bit unsigned codes (reference and measured voltage).
//   * Normalised controller inputs and the crisp fuzzy output are signed
//     integers in which 1.0 is represented by FUZZY_ONE = 1024 (Q10). The
//     membership-function centres M1..M5 and the output singletons D1..D5 are
//     12-bit signed integers in this scale.
//   * Membership degrees run from 0 to FUZZY_ONE (11 bits, unsigned).
//   * The duty cycle is a 16-bit unsigned value in which 1.0 is
//     DUTY_ONE = 32768 (Q15).
// The knowledge base (five input sets NB, NS, Z, PS, PB centred at -1, -0.5,
// 0, 0.5, 1 and the 5x5 rule matrix of duty-cycle variations) follows the
// design's rule table; the fixed-point scales are this design's own choice.
package flc_pkg;

  localparam int ADC_W   = 12;   // A/D converter resolution
  localparam int ERR_W   = 13;   // signed error in ADC codes
  localparam int NORM_W  = 16;   // normalised inputs / output
  localparam int MF_W    = 12;   // membership centres and output singletons
  localparam int MU_W    = 11;   // membership degree, 0 .. FUZZY_ONE
  localparam int DUTY_W  = 16;   // duty cycle, Q15
  localparam int NSETS   = 5;    // linguistic values per variable

  localparam int FUZZY_ONE = 1024;   // 1.0 in the normalised (Q10) scale
  localparam int FUZZY_LOG = 10;
  localparam int DUTY_ONE  = 32768;  // 1.0 duty cycle (Q15)
  localparam int DUTY_LOG  = 15;

  // Linguistic values, in increasing order along the universe of discourse.
  typedef enum logic [2:0] {
    NB = 3'd0,  // negative big
    NS = 3'd1,  // negative small
    ZZ = 3'd2,  // zero
    PS = 3'd3,  // positive small
    PB = 3'd4   // positive big
  } fset_t;

  // Result of fuzzifying one crisp input: with 50 % overlapping triangular
  // sets at most two adjacent sets are active, `lo` and `lo + 1`, and their
  // degrees add up to FUZZY_ONE.
  typedef struct packed {
    fset_t           lo;
    logic [MU_W-1:0] mu_lo;
    logic [MU_W-1:0] mu_hi;
  } fuzzy_t;

  typedef logic signed [MF_W-1:0] mf_t;

  // Centres of the input sets M1..M5 (also the output singletons D1..D5).
  localparam mf_t MF_CENTER [NSETS] = '{-12'sd1024, -12'sd512, 12'sd0, 12'sd512, 12'sd1024};
  localparam int  MF_STEP_LOG = 9;   // centres are 512 = 2^9 apart

  // Rule matrix: consequent for (error set, change-of-error set).
  // Rows: error NB..PB; columns: change of error NB..PB.
  localparam fset_t RULE_TABLE [NSETS][NSETS] = '{
    '{NB, NB, NB, NS, ZZ},
    '{NB, NB, NS, ZZ, PS},
    '{NB, NS, ZZ, PS, PS},
    '{NS, ZZ, PS, PB, PB},
    '{ZZ, PS, PB, PB, PB}
  };

  typedef enum logic {
    CTRL_FLC = 1'b0,
    CTRL_PI  = 1'b1
  } ctrl_sel_t;

endpackage
