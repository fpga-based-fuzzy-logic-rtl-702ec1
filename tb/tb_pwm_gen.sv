// tb_pwm_gen: drives the PWM generator with a control tick every 3 clocks
// and several duty commands; for each full period checks the period length
// (100 ticks = 10 kHz at a 1 MHz tick) and the number of high ticks,
// floor(duty * 100 / 32768), including 0 % and 100 %.
module tb_pwm_gen;
  import flc_pkg::*;
  logic clk = 0, rst_n = 0, tick = 0;
  logic [DUTY_W-1:0] duty = '0;
  logic pwm, period_start;
  logic [6:0] saw;
  int checks = 0, failures = 0;

  pwm_gen dut (.clk, .rst_n, .tick, .duty, .pwm, .saw, .period_start);

  always #10 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int div = 0;
  always @(posedge clk) begin
    div  <= (div == 2) ? 0 : div + 1;
    tick <= rst_n && (div == 2);
  end

  // measure one period after the next period_start, with `d` applied before
  task automatic run_period(input int d);
    int hi, n, expect_hi;
    duty = DUTY_W'(d);
    @(posedge clk iff period_start);   // command latched at this period start?
    @(posedge clk iff period_start);   // now a period with `d` begins
    hi = 0; n = 0;
    do begin
      @(posedge clk);
      if (tick) begin
        n++;
        if (pwm) hi++;   // pwm value during the tick just completed
      end
    end while (!period_start);
    expect_hi = (d >= 32768) ? 100 : (d * 100) / 32768;
    checks++;
    if (n != 100) begin failures++; $display("period %0d ticks", n); end
    checks++;
    if (hi != expect_hi) begin failures++; $display("duty %0d: high %0d expected %0d", d, hi, expect_hi); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_period(16384);
    run_period(0);
    run_period(32768);
    run_period(3277);
    run_period(29491);
    for (int k = 0; k < 5; k++) run_period($urandom_range(0, 32768));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
