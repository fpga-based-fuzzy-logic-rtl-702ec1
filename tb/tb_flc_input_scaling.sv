// tb_flc_input_scaling: drives random reference/measurement codes and checks
// e = vref - vmeas, e_norm ~ 0.4 * 0.05 V * e * 1024 and
// de_norm ~ 0.05 V * (e - e_prev) * 1024 (within 1 LSB of the real value plus the coefficient rounding,
// saturated to 16 bits), that `valid` follows `sample` by one cycle and
// that the previous error only moves on a sample.
module tb_flc_input_scaling;
  import flc_pkg::*;
  logic clk = 0, rst_n = 0, sample = 0;
  logic [ADC_W-1:0] vref, vmeas;
  logic signed [ERR_W-1:0] err;
  logic signed [NORM_W-1:0] e_norm, de_norm;
  logic valid;
  int checks = 0, failures = 0, e_prev = 0, n_sat = 0;

  flc_input_scaling dut (.clk, .rst_n, .sample, .vref, .vmeas, .err, .e_norm, .de_norm, .valid);

  always #10 clk = ~clk;

  function automatic real sat16(input real v);
    if (v > 32767.0) return 32767.0;
    if (v < -32768.0) return -32768.0;
    return v;
  endfunction

  task automatic step(input int r, input int m);
    int e;
    real en, den;
    e   = r - m;
    en  = sat16(0.4 * 0.05 * e * 1024.0);
    den = sat16(0.05 * (e - e_prev) * 1024.0);
    if (den == 32767.0 || den == -32768.0) n_sat++;
    @(negedge clk);
    vref = ADC_W'(r); vmeas = ADC_W'(m); sample = 1;
    @(negedge clk);
    sample = 0;
    checks++;
    if (!valid) begin failures++; $display("valid missing"); end
    checks++;
    if (int'(err) != e) begin failures++; $display("err %0d expected %0d", err, e); end
    checks++;
    if (e_norm < en - 1.5 - 0.001 * (e < 0 ? -e : e) || e_norm > en + 1.5 + 0.001 * (e < 0 ? -e : e)) begin failures++; $display("e %0d: e_norm %0d expected %f", e, e_norm, en); end
    checks++;
    if (de_norm < den - 1.5 || de_norm > den + 1.5) begin failures++; $display("de %0d: de_norm %0d expected %f", e - e_prev, de_norm, den); end
    e_prev = e;
    vref = ADC_W'($urandom); vmeas = ADC_W'($urandom);   // no sample: state must hold
    @(negedge clk);
  endtask

  initial begin
    vref = '0; vmeas = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    step(2000, 2000);
    step(2000, 1990);
    step(2000, 1950);
    step(4095, 0);
    step(0, 4095);
    for (int k = 0; k < 200; k++) step($urandom_range(1000, 1100), $urandom_range(1000, 1100));
    for (int k = 0; k < 100; k++) step($urandom_range(0, 4095), $urandom_range(0, 4095));
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
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
