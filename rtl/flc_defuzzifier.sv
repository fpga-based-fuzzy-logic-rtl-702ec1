// flc_defuzzifier: centre-of-gravity defuzzifier, delta_d = num / den.
//
// The crisp output is the weighted average of the fired rules' output
// singletons: the sum of weight * singleton divided by the sum of weights.
// The quotient is a weighted average of values in [-1, 1], so its magnitude
// never exceeds 1.0 (1024) and fits in QW = 11 bits. A restoring divider
// works on magnitudes and produces one quotient bit per clock, most
// significant first: bit k is set when the remainder is at least den << k.
// The sign of the numerator is applied at the end. The result truncates
// toward zero. A zero denominator gives a zero output.
//
// Timing: `start` loads the operands; `done` pulses QW + 1 = 12 cycles later
// with `dd` valid, and `dd` holds until the next result. `busy` is high in
// between; a `start` while busy is ignored. Assertions check the
// QW + 1 cycle latency and that `done` is a single-cycle pulse.
module flc_defuzzifier
  import flc_pkg::*;
#(
  parameter int NUM_W = 2 * MU_W + MF_W + 1,
  parameter int DEN_W = 2 * MU_W + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [NUM_W-1:0]  num,
  input  logic [DEN_W-1:0]         den,
  output logic signed [NORM_W-1:0] dd,
  output logic                     done,
  output logic                     busy
);

  localparam int QW = FUZZY_LOG + 1;         // quotient bits
  localparam int RW = NUM_W + 1;             // remainder width

  logic [RW-1:0]       rem;
  logic [DEN_W-1:0]    dv;
  logic [QW-1:0]       q;
  logic                neg;
  logic [$clog2(QW+1)-1:0] step;
  logic [RW-1:0]       trial;

  always_comb trial = RW'(dv) << (step - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem  <= '0;
      dv   <= '0;
      q    <= '0;
      neg  <= 1'b0;
      step <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      dd   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rem  <= num[NUM_W-1] ? RW'(-num) : RW'(num);
          neg  <= num[NUM_W-1];
          dv   <= den;
          q    <= '0;
          step <= ($clog2(QW+1))'(QW);
          busy <= 1'b1;
        end
      end else if (step != '0) begin
        if (dv != '0 && rem >= trial) begin
          rem <= rem - trial;
          q   <= q | (QW'(1) << (step - 1'b1));
        end
        step <= step - 1'b1;
      end else begin
        busy <= 1'b0;
        done <= 1'b1;
        dd   <= neg ? -NORM_W'(q) : NORM_W'(q);
      end
    end
  end

  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |=> ##(QW + 1) done)
    else $error("flc_defuzzifier: result not ready %0d cycles after start", QW + 1);

  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    done |=> !done)
    else $error("flc_defuzzifier: done held for more than one cycle");

endmodule
