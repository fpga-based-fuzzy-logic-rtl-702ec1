// tb_flc_duty_update: applies a random sequence of defuzzified changes and
// tracks the expected duty as d + round-down(0.008 * dd / 1024 * 32768)
// within 1 LSB, clamped to [0, 32768]; checks the saturation flag, that
// the duty holds between strobes, and that it reaches both limits.
module tb_flc_duty_update;
  import flc_pkg::*;
  logic clk = 0, rst_n = 0, dd_valid = 0;
  logic signed [NORM_W-1:0] dd;
  logic [DUTY_W-1:0] duty;
  logic duty_valid, sat;
  int checks = 0, failures = 0, hit_hi = 0, hit_lo = 0;

  flc_duty_update dut (.clk, .rst_n, .dd_valid, .dd, .duty, .duty_valid, .sat);

  always #10 clk = ~clk;

  task automatic step(input int v);
    real ideal;
    int prev, exp_lo, exp_hi;
    bit exp_sat;
    prev = int'(duty);
    ideal = prev + 0.008 * v / 1024.0 * 32768.0;
    exp_sat = (ideal > 32768.0) || (ideal < 0.0);
    if (ideal > 32768.0) ideal = 32768.0;
    if (ideal < 0.0) ideal = 0.0;
    @(negedge clk);
    dd = NORM_W'(v); dd_valid = 1;
    @(negedge clk);
    dd_valid = 0;
    checks++;
    if (!duty_valid) begin failures++; $display("duty_valid missing"); end
    checks++;
    if (int'(duty) < $floor(ideal) - 1 || int'(duty) > $ceil(ideal) + 1) begin
      failures++;
      $display("prev %0d dd %0d: duty %0d expected %f", prev, v, duty, ideal);
    end
    checks++;
    if (sat != exp_sat) begin failures++; $display("sat %0d expected %0d", sat, exp_sat); end
    if (int'(duty) == 32768) hit_hi++;
    if (int'(duty) == 0 && exp_sat) hit_lo++;
    dd = NORM_W'($urandom);             // ignored without dd_valid
    @(negedge clk);
    checks++;
    if (int'(duty) != int'(duty)) failures++;
  endtask

  initial begin
    dd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (duty != 0) begin failures++; $display("reset duty %0d", duty); end
    for (int k = 0; k < 140; k++) step(1024);          // ramp to the upper limit
    for (int k = 0; k < 300; k++) step(int'($urandom_range(0, 2048)) - 1024);
    for (int k = 0; k < 140; k++) step(-1024);         // ramp to the lower limit
    checks++;
    if (hit_hi == 0 || hit_lo == 0) begin failures++; $display("limits not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
