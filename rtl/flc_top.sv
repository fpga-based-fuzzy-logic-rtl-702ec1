// flc_top: FPGA voltage controller for the source buck converter of a DC
// multiconverter system.
//
// The 50 MHz board clock is divided to a 1 MHz control rate (`clk_div`).
// At every control tick both controllers take a step on the two 12-bit ADC
// codes, the voltage reference `vref` and the measured bus voltage `vmeas`:
// the fuzzy logic controller (`flc_controller`, the main controller) and a
// proportional-integral controller (`pi_controller`, kept for comparison).
// `ctrl_sel` chooses which duty cycle drives the pulse width modulator
// (`pwm_gen`), whose 10 kHz sawtooth is also advanced by the control tick;
// `pwm` is the gate command for the converter switch's driver. The ADC, the
// gate driver and the converter itself are outside this module.
//
// Timing: the FLC updates its duty LATENCY = 15 clocks after each tick and
// the PI one clock after; the PWM picks up the selected duty at the start of
// each switching period. `ctrl_sel` may change at any time; each controller
// keeps running while unselected, so a switch-over takes effect at the next
// switching period with no reset (this design's choice).
module flc_top
  import flc_pkg::*;
#(
  parameter int unsigned CLK_SCALE  = 50,    // 50 MHz -> 1 MHz
  parameter int unsigned PWM_PERIOD = 100,   // 1 MHz / 100 = 10 kHz
  parameter int unsigned GE_COEF    = 5243,  // Ge  = 0.4
  parameter int unsigned GDE_COEF   = 13107, // Ge' = 1e-6 at 1 us sampling
  parameter int unsigned BETA_Q16   = 524,   // output gain 0.008
  parameter int unsigned KP_COEF    = 1638,  // Kp = 1
  parameter int unsigned KI_COEF    = 7730   // Ki = 72
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [ADC_W-1:0]         vref,
  input  logic [ADC_W-1:0]         vmeas,
  input  ctrl_sel_t                ctrl_sel,
  output logic                     pwm,
  output logic [DUTY_W-1:0]        duty,
  output logic [$clog2(PWM_PERIOD+1)-1:0] saw,
  output logic                     ctrl_tick,
  output logic                     clk_1mhz,
  output logic [DUTY_W-1:0]        flc_duty,
  output logic [DUTY_W-1:0]        pi_duty,
  output logic                     flc_duty_valid,
  output logic signed [NORM_W-1:0] flc_dd,
  output logic [3:0]               flc_fired,
  output logic                     flc_sat,
  output logic                     pi_sat,
  output logic                     flc_overrun,
  output logic                     pwm_period_start
);

  clk_div #(.SCALE(CLK_SCALE)) u_clk_div (
    .clk, .rst_n,
    .tick   (ctrl_tick),
    .clk_out(clk_1mhz)
  );

  flc_controller #(
    .GE_COEF (GE_COEF),
    .GDE_COEF(GDE_COEF),
    .BETA_Q16(BETA_Q16)
  ) u_flc (
    .clk, .rst_n,
    .sample    (ctrl_tick),
    .vref, .vmeas,
    .duty      (flc_duty),
    .duty_valid(flc_duty_valid),
    .dd        (flc_dd),
    .fired     (flc_fired),
    .sat       (flc_sat),
    .overrun   (flc_overrun)
  );

  pi_controller #(
    .KP_COEF(KP_COEF),
    .KI_COEF(KI_COEF)
  ) u_pi (
    .clk, .rst_n,
    .sample    (ctrl_tick),
    .vref, .vmeas,
    .duty      (pi_duty),
    .duty_valid(),
    .sat       (pi_sat)
  );

  assign duty = (ctrl_sel == CTRL_PI) ? pi_duty : flc_duty;

  pwm_gen #(.PERIOD(PWM_PERIOD)) u_pwm (
    .clk, .rst_n,
    .tick        (ctrl_tick),
    .duty,
    .pwm,
    .saw,
    .period_start(pwm_period_start)
  );

endmodule
