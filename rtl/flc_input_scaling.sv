// flc_input_scaling: error, change of error and their normalisation.
//
// On each `sample` strobe the block forms the error e(n) = Vref - Vmeas from
// the two 12-bit ADC codes and the change of error e'(n) = e(n) - e(n-1),
// then scales both into the controller's normalised range (1.0 = 1024):
//   e_norm  = (e  * GE_COEF)  >>> COEF_SHIFT
//   de_norm = (de * GDE_COEF) >>> COEF_SHIFT
// saturated to 16 bits. The coefficients fold the ADC volts-per-code into the
// input gains Ge = 0.4 and Ge' = 1e-6 (the latter applied to e'/dt with a
// 1 us sample period, so it reduces to the plain per-sample difference in
// volts). With the assumed 0.05 V per code:
//   GE_COEF  = 0.4 * 0.05 * 1024 * 256 = 5243
//   GDE_COEF = 1.0 * 0.05 * 1024 * 256 = 13107
// The gains come from the design; the ADC scale and fixed-point widths are
// this design's choice and are parameters.
//
// Timing: outputs are registered; `valid` pulses one cycle after `sample`.
// The error also appears unscaled on `err` for the PI controller.
module flc_input_scaling
  import flc_pkg::*;
#(
  parameter int unsigned GE_COEF    = 5243,
  parameter int unsigned GDE_COEF   = 13107,
  parameter int unsigned COEF_SHIFT = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sample,
  input  logic [ADC_W-1:0]         vref,
  input  logic [ADC_W-1:0]         vmeas,
  output logic signed [ERR_W-1:0]  err,
  output logic signed [NORM_W-1:0] e_norm,
  output logic signed [NORM_W-1:0] de_norm,
  output logic                     valid
);

  localparam int PW = ERR_W + 1 + 18;   // product width

  logic signed [ERR_W-1:0] e_now, e_prev;
  logic signed [ERR_W:0]   de_now;
  logic signed [PW-1:0]    pe, pde;

  function automatic logic signed [NORM_W-1:0] sat16(input logic signed [PW-1:0] v);
    localparam logic signed [PW-1:0] MAXV = PW'((1 << (NORM_W - 1)) - 1);
    localparam logic signed [PW-1:0] MINV = -PW'(1 << (NORM_W - 1));
    if (v > MAXV)      return NORM_W'(MAXV);
    else if (v < MINV) return NORM_W'(MINV);
    else               return NORM_W'(v);
  endfunction

  always_comb begin
    e_now  = $signed({1'b0, vref}) - $signed({1'b0, vmeas});
    de_now = (ERR_W+1)'(e_now) - (ERR_W+1)'(e_prev);
    pe     = (PW'(e_now)  * $signed(PW'(GE_COEF)))  >>> COEF_SHIFT;
    pde    = (PW'(de_now) * $signed(PW'(GDE_COEF))) >>> COEF_SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_prev  <= '0;
      err     <= '0;
      e_norm  <= '0;
      de_norm <= '0;
      valid   <= 1'b0;
    end else begin
      valid <= sample;
      if (sample) begin
        e_prev  <= e_now;
        err     <= e_now;
        e_norm  <= sat16(pe);
        de_norm <= sat16(pde);
      end
    end
  end

endmodule
