// pwm_gen: sawtooth-and-comparator pulse width modulator for the converter
// switch.
//
// A counter advanced by the control-rate enable `tick` forms the sawtooth;
// it counts 0 .. PERIOD-1, so with a 1 MHz tick and PERIOD = 100 the
// switching frequency is 10 kHz. The duty command from the controller
// (Q15, 32768 = 100 %) is converted to a count, duty * PERIOD / 32768, and
// compared with the sawtooth: the gate output is high while the sawtooth is
// below that count. The command is sampled once per period, when the sawtooth
// wraps, so a command change never splits a pulse (this design's choice).
//
// Interface: `duty` may change at any time; `pwm` is registered. `saw` is the
// current sawtooth count and `period_start` pulses with the tick that starts
// a new period.
module pwm_gen
  import flc_pkg::*;
#(
  parameter int unsigned PERIOD = 100
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  logic [DUTY_W-1:0] duty,
  output logic              pwm,
  output logic [$clog2(PERIOD+1)-1:0] saw,
  output logic              period_start
);

  localparam int unsigned SW = $clog2(PERIOD + 1);

  logic [SW-1:0] on_cnt;     // latched compare level for this period
  logic [SW-1:0] next_level;
  logic [DUTY_W+SW-1:0] prod;

  always_comb begin
    prod = (DUTY_W+SW)'(duty) * (DUTY_W+SW)'(PERIOD);
    if (duty >= DUTY_W'(DUTY_ONE)) next_level = SW'(PERIOD);
    else                           next_level = SW'(prod >> DUTY_LOG);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      saw          <= '0;
      on_cnt       <= '0;
      pwm          <= 1'b0;
      period_start <= 1'b0;
    end else begin
      period_start <= 1'b0;
      if (tick) begin
        if (saw == SW'(PERIOD - 1)) begin
          saw          <= '0;
          on_cnt       <= next_level;
          pwm          <= (next_level != '0);
          period_start <= 1'b1;
        end else begin
          saw <= saw + 1'b1;
          pwm <= (saw + 1'b1) < on_cnt;
        end
      end
    end
  end

endmodule
