// tb_flc_controller: runs the complete fuzzy controller on a sequence of
// reference/measurement codes, one control step every 50 clocks, and checks
// every step against a real-valued fuzzy controller written here:
//   e = 0.05 V * (vref - vmeas), e' = e(n) - e(n-1)
//   inputs 0.4 * e and e', clamped to [-1, 1]
//   five triangular sets at -1, -0.5, 0, 0.5, 1; product of degrees;
//   rule matrix; centre of gravity; d += 0.008 * delta_d, clamped to [0, 1]
// The defuzzified change must match within 4/1024 and the duty within
// 2 LSB of the update applied to the previous duty. Also checks the
// 15-cycle latency from `sample` to `duty_valid`, that all 25 rules fire
// at some point and that the duty reaches both clamps. Finally, samples
// arriving one, two and five cycles after an accepted one (in the scaler,
// the inference stage and the divider) must be flagged on `overrun`, and
// the accepted step must still give exactly one duty update.
module tb_flc_controller;
  import flc_pkg::*;
  logic clk = 0, rst_n = 0, sample = 0;
  logic [ADC_W-1:0] vref, vmeas;
  logic [DUTY_W-1:0] duty;
  logic duty_valid, sat, overrun;
  logic signed [NORM_W-1:0] dd;
  logic [3:0] fired;
  int checks = 0, failures = 0, n_sat = 0;
  real e_prev = 0.0;
  bit  rule_seen [5][5];

  int lvl [5][5] = '{
    '{-2, -2, -2, -1,  0},
    '{-2, -2, -1,  0,  1},
    '{-2, -1,  0,  1,  1},
    '{-1,  0,  1,  2,  2},
    '{ 0,  1,  2,  2,  2}
  };

  flc_controller dut (.clk, .rst_n, .sample, .vref, .vmeas, .duty, .duty_valid, .dd, .fired, .sat, .overrun);

  always #10 clk = ~clk;

  function automatic real clamp1(input real v);
    return (v > 1.0) ? 1.0 : (v < -1.0) ? -1.0 : v;
  endfunction

  function automatic real mu(input real v, input int k);
    real c = -1.0 + 0.5 * k;
    real dst = (v > c) ? v - c : c - v;
    if (k == 0 && v <= c) return 1.0;
    if (k == 4 && v >= c) return 1.0;
    return (dst >= 0.5) ? 0.0 : 1.0 - dst / 0.5;
  endfunction

  task automatic step(input int r, input int m);
    real ev, x1, x2, num, den, ddr, dprev, dexp;
    int lat;
    ev = 0.05 * (r - m);
    x1 = clamp1(0.4 * ev);
    x2 = clamp1(ev - e_prev);
    e_prev = ev;
    num = 0.0; den = 0.0;
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++) begin
        real w = mu(x1, i) * mu(x2, j);
        num += w * 0.5 * lvl[i][j];
        den += w;
        if (w > 0.0) rule_seen[i][j] = 1;
      end
    ddr = num / den;
    dprev = duty;
    dexp = dprev + 0.008 * ddr * 32768.0;
    if (dexp > 32768.0) begin dexp = 32768.0; n_sat++; end
    if (dexp < 0.0) begin dexp = 0.0; n_sat++; end
    @(negedge clk);
    vref = ADC_W'(r); vmeas = ADC_W'(m); sample = 1;
    @(negedge clk);
    sample = 0;
    lat = 0;
    while (!duty_valid && lat < 60) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 15) begin failures++; $display("latency %0d, expected 15", lat); end
    checks++;
    if (dd / 1024.0 > ddr + 4.0 / 1024 || dd / 1024.0 < ddr - 4.0 / 1024) begin
      failures++; $display("r=%0d m=%0d: delta_d %f expected %f", r, m, dd / 1024.0, ddr);
    end
    checks++;
    if (duty > dexp + 2.0 || duty < dexp - 2.0) begin
      failures++; $display("r=%0d m=%0d: duty %0d expected %f", r, m, duty, dexp);
    end
    checks++;
    if (overrun) begin failures++; $display("unexpected overrun"); end
    repeat (48 - lat) @(negedge clk);
  endtask

  initial begin
    vref = '0; vmeas = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) step(2000, 2000 - 40);        // steady positive error, ramps up
    for (int k = 0; k < 200; k++) step(2000, 2000 + 40);        // steady negative error, ramps down
    for (int k = 0; k < 600; k++) step(2000, 2000 + int'($urandom_range(0, 120)) - 60);
    for (int k = 0; k < 400; k++) step(2000, 2000 + int'($urandom_range(0, 20)) - 10);
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++) begin
        checks++;
        if (!rule_seen[i][j]) begin failures++; $display("rule %0d,%0d never fired", i, j); end
      end
    checks++;
    if (n_sat == 0) begin failures++; $display("duty clamp never reached"); end
    // overrun: samples one, two and five cycles after an accepted one are
    // dropped and flagged; the accepted step still completes, exactly once
    for (int gap = 1; gap <= 5; gap += (gap == 2) ? 3 : 1) begin
      int n_valid;
      repeat (60) @(negedge clk);
      sample = 1; @(negedge clk); sample = 0;
      n_valid = 0;
      if (gap > 1) repeat (gap - 1) begin @(negedge clk); if (duty_valid) n_valid++; end
      sample = 1; #1;
      checks++;
      if (!overrun) begin failures++; $display("overrun not flagged %0d cycles after a sample", gap); end
      @(negedge clk); sample = 0;
      repeat (40) begin if (duty_valid) n_valid++; @(negedge clk); end
      checks++;
      if (n_valid != 1) begin failures++; $display("%0d duty updates after an overrun at gap %0d, expected 1", n_valid, gap); end
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
