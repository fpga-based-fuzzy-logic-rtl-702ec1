// flc_inference: inference engine of the fuzzy controller.
//
// With 50 % overlapping input sets, each input activates at most two
// adjacent sets, so at most four of the 25 rules fire: (lo,lo), (lo,hi),
// (hi,lo) and (hi,hi) of the error and change-of-error sets. The four rules
// are evaluated in parallel. Each rule's firing weight is the product of the
// two antecedent degrees, f_i = mu_e * mu_de (product inference), and its
// contribution is f_i * C_i with C_i the rule's output singleton read from
// the rule base. The block outputs the two sums the centre-of-gravity
// defuzzifier divides:
//   num = sum f_i * C_i    (signed, Q30)
//   den = sum f_i          (unsigned, Q20)
// A rule whose hi set would lie beyond PB never has a non-zero weight; its
// index is clamped to PB.
//
// Timing: one register stage; `out_valid` follows `in_valid` by one cycle.
module flc_inference
  import flc_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  fuzzy_t                    fe,
  input  fuzzy_t                    fde,
  output logic signed [2*MU_W+MF_W:0] num,
  output logic [2*MU_W:0]           den,
  output logic                      out_valid,
  output logic [3:0]                fired       // which of the four rules had a non-zero weight
);

  localparam int FW = 2 * MU_W;            // product of two degrees
  localparam int NW = 2 * MU_W + MF_W + 1; // numerator width

  fset_t           e_idx  [2];
  fset_t           de_idx [2];
  logic [MU_W-1:0] e_mu   [2];
  logic [MU_W-1:0] de_mu  [2];
  mf_t             c_val  [4];
  logic [FW-1:0]   w      [4];

  logic signed [NW-1:0] num_c;
  logic [FW:0]          den_c;
  logic [3:0]           fired_c;

  always_comb begin
    e_idx[0]  = fe.lo;
    e_idx[1]  = (fe.lo  == PB) ? PB : fset_t'(fe.lo + 3'd1);
    de_idx[0] = fde.lo;
    de_idx[1] = (fde.lo == PB) ? PB : fset_t'(fde.lo + 3'd1);
    e_mu[0]   = fe.mu_lo;
    e_mu[1]   = fe.mu_hi;
    de_mu[0]  = fde.mu_lo;
    de_mu[1]  = fde.mu_hi;
  end

  for (genvar i = 0; i < 2; i++) begin : g_e
    for (genvar j = 0; j < 2; j++) begin : g_de
      flc_rule_base u_rule (
        .e_set (e_idx[i]),
        .de_set(de_idx[j]),
        .c_set (),
        .c_val (c_val[2*i+j])
      );
      assign w[2*i+j] = FW'(e_mu[i]) * FW'(de_mu[j]);
    end
  end

  always_comb begin
    num_c   = '0;
    den_c   = '0;
    fired_c = '0;
    for (int k = 0; k < 4; k++) begin
      num_c      = num_c + $signed({1'b0, w[k]}) * NW'(c_val[k]);
      den_c      = den_c + (FW+1)'(w[k]);
      fired_c[k] = (w[k] != '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num       <= '0;
      den       <= '0;
      out_valid <= 1'b0;
      fired     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        num   <= num_c;
        den   <= den_c;
        fired <= fired_c;
      end
    end
  end

endmodule
