// flc_duty_update: output scaling and incremental duty-cycle law of the
// fuzzy controller.
//
// The defuzzified value delta_d is a normalised change of duty cycle. Each
// time a new value arrives (`dd_valid`) the duty cycle is updated as
//   d(i) = d(i-1) + beta * delta_d(i)
// with beta the controller's output gain (0.008). In fixed point, with duty
// in Q15 and delta_d in Q10, the step is (delta_d * BETA_Q16) >>> 11, where
// BETA_Q16 = round(0.008 * 65536) = 524. The result is clamped to
// [D_MIN, D_MAX] so the integrating duty register cannot wind up.
//
// Timing: `duty` is registered and changes the cycle after `dd_valid`;
// `duty_valid` pulses with it. `sat` tells whether the last update was
// clamped. Reset value is D_INIT.
module flc_duty_update
  import flc_pkg::*;
#(
  parameter int unsigned BETA_Q16 = 524,
  parameter int unsigned D_MIN    = 0,
  parameter int unsigned D_MAX    = DUTY_ONE,
  parameter int unsigned D_INIT   = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     dd_valid,
  input  logic signed [NORM_W-1:0] dd,
  output logic [DUTY_W-1:0]        duty,
  output logic                     duty_valid,
  output logic                     sat
);

  localparam int SHIFT = FUZZY_LOG + 16 - DUTY_LOG;
  localparam int W     = NORM_W + 18;

  logic signed [W-1:0] step, nxt;

  always_comb begin
    step = (W'(dd) * $signed(W'(BETA_Q16))) >>> SHIFT;
    nxt  = $signed(W'(duty)) + step;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      duty       <= DUTY_W'(D_INIT);
      duty_valid <= 1'b0;
      sat        <= 1'b0;
    end else begin
      duty_valid <= dd_valid;
      if (dd_valid) begin
        if (nxt > $signed(W'(D_MAX))) begin
          duty <= DUTY_W'(D_MAX);
          sat  <= 1'b1;
        end else if (nxt < $signed(W'(D_MIN))) begin
          duty <= DUTY_W'(D_MIN);
          sat  <= 1'b1;
        end else begin
          duty <= DUTY_W'(nxt);
          sat  <= 1'b0;
        end
      end
    end
  end

endmodule
