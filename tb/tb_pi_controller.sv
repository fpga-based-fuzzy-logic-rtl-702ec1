// tb_pi_controller: runs the PI controller on random error sequences and
// checks each duty against a real-valued PI law with Kp = 1, Ki = 72,
// a 1 us sample period and 0.05 V per ADC code:
//   I += 72 * 1e-6 * e_V, clamped to [0, 1];  duty = clamp(e_V + I, 0, 1)
// within 0.1 % of full scale (coefficient rounding). Also checks the
// one-cycle latency and that both clamps are reached.
module tb_pi_controller;
  import flc_pkg::*;
  logic clk = 0, rst_n = 0, sample = 0;
  logic [ADC_W-1:0] vref, vmeas;
  logic [DUTY_W-1:0] duty;
  logic duty_valid, sat;
  int checks = 0, failures = 0, n_sat_hi = 0, n_sat_lo = 0, n_lin = 0;
  real integ = 0.0;

  pi_controller dut (.clk, .rst_n, .sample, .vref, .vmeas, .duty, .duty_valid, .sat);

  always #10 clk = ~clk;

  task automatic step(input int r, input int m);
    real ev, u;
    ev = (r - m) * 0.05;
    integ += 72.0e-6 * ev;
    if (integ > 1.0) integ = 1.0;
    if (integ < 0.0) integ = 0.0;
    u = ev + integ;
    if (u > 1.0) begin u = 1.0; n_sat_hi++; end
    else if (u < 0.0) begin u = 0.0; n_sat_lo++; end
    else n_lin++;
    @(negedge clk);
    vref = ADC_W'(r); vmeas = ADC_W'(m); sample = 1;
    @(negedge clk);
    sample = 0;
    checks++;
    if (!duty_valid) begin failures++; $display("duty_valid missing"); end
    checks++;
    if (duty / 32768.0 > u + 0.001 || duty / 32768.0 < u - 0.001) begin
      failures++;
      $display("e=%0d: duty %f expected %f (I=%f)", r - m, duty / 32768.0, u, integ);
    end
  endtask

  initial begin
    vref = '0; vmeas = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 50; k++)  step(2000, 2000 - $urandom_range(0, 15));   // small positive errors
    for (int k = 0; k < 3000; k++) step(2000, 1990);                          // integral builds up
    for (int k = 0; k < 20; k++)  step(2000, 2100);                           // large negative error
    for (int k = 0; k < 300; k++) step(2000, 1800);                           // large positive error
    for (int k = 0; k < 200; k++) step(2000, 2000 + $urandom_range(0, 30) - 15);
    for (int k = 0; k < 6000; k++) step(2000, 2040);                          // integral pinned at zero
    for (int k = 0; k < 200; k++) step(2000, 1995);                           // recovers from zero at once
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0 || n_lin == 0) begin
      failures++; $display("coverage hi %0d lo %0d lin %0d", n_sat_hi, n_sat_lo, n_lin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
