// flc_controller: the complete fuzzy logic voltage controller, from two ADC
// codes to a duty cycle.
//
// Chain: input scaling (error, change of error, gains Ge and Ge') ->
// two fuzzifiers (five triangular sets each) -> inference engine (product
// of antecedent degrees, 25-rule base, at most four rules fire) ->
// centre-of-gravity defuzzifier (sequential divider) -> incremental duty
// law d(i) = d(i-1) + beta * delta_d(i).
//
// Interface: `sample` (one cycle) starts a control step on the current
// `vref` and `vmeas`. `duty_valid` pulses when `duty` has been updated,
// LATENCY = 15 cycles after `sample`. One step is in flight at a time: a
// sample arriving while the previous step is still in the scaler, the
// inference stage or the divider is dropped and flagged on `overrun`, so
// samples should be at least 14 cycles apart (the 1 MHz control rate leaves
// 50 cycles at 50 MHz). `dd` is the last defuzzified change of duty cycle,
// `fired` the rules that fired in the last step and `sat` whether the duty
// was clamped. Assertions check that no inference result meets a busy
// divider and that every accepted sample gives `duty_valid` LATENCY cycles
// later. The stage split, latency and handshake are this design's choices.
module flc_controller
  import flc_pkg::*;
#(
  parameter int unsigned GE_COEF    = 5243,
  parameter int unsigned GDE_COEF   = 13107,
  parameter int unsigned COEF_SHIFT = 8,
  parameter int unsigned BETA_Q16   = 524,
  parameter int unsigned D_MIN      = 0,
  parameter int unsigned D_MAX      = DUTY_ONE,
  parameter int unsigned D_INIT     = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sample,
  input  logic [ADC_W-1:0]         vref,
  input  logic [ADC_W-1:0]         vmeas,
  output logic [DUTY_W-1:0]        duty,
  output logic                     duty_valid,
  output logic signed [NORM_W-1:0] dd,
  output logic [3:0]               fired,
  output logic                     sat,
  output logic                     overrun
);

  localparam int NUM_W   = 2 * MU_W + MF_W + 1;
  localparam int DEN_W   = 2 * MU_W + 1;
  localparam int LATENCY = 15;

  logic signed [NORM_W-1:0] e_norm, de_norm;
  logic                     sc_valid;
  fuzzy_t                   fe, fde;
  logic signed [NUM_W-1:0]  num;
  logic [DEN_W-1:0]         den;
  logic                     inf_valid;
  logic                     dz_done, dz_busy;
  logic                     in_flight;

  // a step occupies the scaler output, the inference register or the divider
  assign in_flight = sc_valid || inf_valid || dz_busy;

  flc_input_scaling #(
    .GE_COEF   (GE_COEF),
    .GDE_COEF  (GDE_COEF),
    .COEF_SHIFT(COEF_SHIFT)
  ) u_scale (
    .clk, .rst_n,
    .sample (sample && !in_flight),
    .vref, .vmeas,
    .err    (),
    .e_norm, .de_norm,
    .valid  (sc_valid)
  );

  flc_fuzzifier u_fuzz_e  (.x(e_norm),  .f(fe));
  flc_fuzzifier u_fuzz_de (.x(de_norm), .f(fde));

  flc_inference u_inf (
    .clk, .rst_n,
    .in_valid (sc_valid),
    .fe, .fde,
    .num, .den,
    .out_valid(inf_valid),
    .fired
  );

  flc_defuzzifier #(.NUM_W(NUM_W), .DEN_W(DEN_W)) u_defuzz (
    .clk, .rst_n,
    .start(inf_valid),
    .num, .den,
    .dd,
    .done (dz_done),
    .busy (dz_busy)
  );

  flc_duty_update #(
    .BETA_Q16(BETA_Q16),
    .D_MIN   (D_MIN),
    .D_MAX   (D_MAX),
    .D_INIT  (D_INIT)
  ) u_duty (
    .clk, .rst_n,
    .dd_valid  (dz_done),
    .dd,
    .duty,
    .duty_valid,
    .sat
  );

  assign overrun = sample && in_flight;

  a_no_lost_result: assert property (@(posedge clk) disable iff (!rst_n)
    inf_valid |-> !dz_busy)
    else $error("flc_controller: inference result reached a busy divider");

  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
    (sample && !in_flight) |=> ##LATENCY duty_valid)
    else $error("flc_controller: duty not updated %0d cycles after sample", LATENCY);

endmodule
