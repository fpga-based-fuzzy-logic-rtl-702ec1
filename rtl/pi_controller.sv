// pi_controller: fixed-point proportional-integral voltage controller, the
// conventional alternative to the fuzzy controller on the same ADC inputs.
//
// On each `sample` the error e = Vref - Vmeas (ADC codes) is formed and
//   acc  <- clamp(acc + KI_COEF * e)                 (integral part)
//   duty <- clamp(KP_COEF * e + acc >>> ACC_FRAC)    (Q15 duty cycle)
// Both clamps hold the result within [0, 1.0] of duty; clamping the
// accumulator is the anti-windup. The coefficients fold the gains Kp = 1 and
// Ki = 72 (with the 1 us sample period) and the assumed 0.05 V per ADC code
// into Q15 duty units:
//   KP_COEF = 1 * 0.05 * 32768                = 1638
//   KI_COEF = 72 * 1e-6 * 0.05 * 32768 * 2^16 = 7730   (ACC_FRAC = 16)
// The gains are the design's; widths, clamps and scales are this design's.
//
// Timing: `duty` and `duty_valid` are registered, one cycle after `sample`.
module pi_controller
  import flc_pkg::*;
#(
  parameter int unsigned KP_COEF  = 1638,
  parameter int unsigned KI_COEF  = 7730,
  parameter int unsigned ACC_FRAC = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sample,
  input  logic [ADC_W-1:0]  vref,
  input  logic [ADC_W-1:0]  vmeas,
  output logic [DUTY_W-1:0] duty,
  output logic              duty_valid,
  output logic              sat
);

  localparam int AW = DUTY_LOG + 2 + ACC_FRAC + 2;  // accumulator width
  localparam int PW = AW + 8;

  localparam logic signed [AW-1:0] ACC_MAX = AW'(DUTY_ONE) <<< ACC_FRAC;

  logic signed [ERR_W-1:0] e;
  logic signed [AW-1:0]    acc, acc_sum, acc_nxt;
  logic signed [PW-1:0]    p_term, u;

  always_comb begin
    e       = $signed({1'b0, vref}) - $signed({1'b0, vmeas});
    acc_sum = acc + AW'(e) * $signed(AW'(KI_COEF));
    if (acc_sum > ACC_MAX)       acc_nxt = ACC_MAX;
    else if (acc_sum < 0)        acc_nxt = '0;
    else                         acc_nxt = acc_sum;
    p_term  = PW'(e) * $signed(PW'(KP_COEF));
    u       = p_term + (PW'(acc_nxt) >>> ACC_FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      duty       <= '0;
      duty_valid <= 1'b0;
      sat        <= 1'b0;
    end else begin
      duty_valid <= sample;
      if (sample) begin
        acc <= acc_nxt;
        if (u > PW'(DUTY_ONE)) begin
          duty <= DUTY_W'(DUTY_ONE);
          sat  <= 1'b1;
        end else if (u < 0) begin
          duty <= '0;
          sat  <= 1'b1;
        end else begin
          duty <= DUTY_W'(u);
          sat  <= 1'b0;
        end
      end
    end
  end

endmodule
