// tb_flc_top: end-to-end closed-loop test of the controller at its default
// parameters, driving a behavioural buck converter (buck_plant_model) that
// feeds a 132 ohm resistor and a constant power load.
//
// Sequence (20 ms each): fuzzy control with the reference stepped
// 60 -> 80 -> 100 V at 150 W CPL; CPL power stepped 150 -> 100 -> 200 W;
// switch to the PI controller at 100 V, then a reference step to 80 V.
// Checks:
//   * the mean bus voltage over the last quarter of each phase lies within
//     15 V of the reference under fuzzy control and 5 V under PI control,
//     and rises with each reference step. (With the default gains the loop
//     settles into a limit cycle around the reference in this plant model,
//     so the band is deliberately wide; see the design notes.)
//   * every switching period, the number of high PWM ticks equals
//     floor(duty * 100 / 32768) for the duty in force when it began, and
//     the period is 100 control ticks;
//   * the PWM is fed by the selected controller;
//   * the FLC completes one update per control tick and never overruns;
//   * each mechanism occurs at least once: reference step, CPL step,
//     controller switch, FLC duty clamp, one-, two- and four-rule firing.
module tb_flc_top;
  import flc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [11:0] vref, vmeas;
  ctrl_sel_t ctrl_sel = CTRL_FLC;
  logic pwm, ctrl_tick, clk_1mhz, flc_duty_valid, flc_sat, pi_sat, flc_overrun, pwm_period_start;
  logic [15:0] duty, flc_duty, pi_duty;
  logic [6:0] saw;
  logic signed [15:0] flc_dd;
  logic [3:0] flc_fired;
  real r_load = 132.0, p_cpl = 150.0, v_bus, i_l;

  int checks = 0, failures = 0;
  int n_ref_step = 0, n_cpl_step = 0, n_switch = 0, n_flc_clamp = 0;
  int n_fire1 = 0, n_fire2 = 0, n_fire4 = 0;
  int n_ticks = 0, n_updates = 0, n_periods = 0;
  real prev_mean = 0.0;

  flc_top dut (.*);
  buck_plant_model plant (.clk, .gate(pwm), .vin(160.0), .i_in(), .i_ext(0.0), .r_load, .p_cpl, .v_bus, .i_l, .adc_code(vmeas));

  always #10 clk = ~clk;

  // ---- per-period PWM check and mechanism counters ----
  int hi_ticks = 0, per_ticks = 0, exp_hi = -1;
  logic flc_sat_q = 0;
  logic [15:0] duty_q = '0;   // duty one clock earlier: the value the PWM latched
  always @(posedge clk) if (rst_n) begin
    if (ctrl_tick) n_ticks++;
    if (flc_duty_valid) begin
      n_updates++;
      case ($countones(flc_fired))
        1: n_fire1++;
        2: n_fire2++;
        4: n_fire4++;
        default: ;
      endcase
    end
    flc_sat_q <= flc_sat;
    duty_q    <= duty;
    if (flc_sat && !flc_sat_q && ctrl_sel == CTRL_FLC) n_flc_clamp++;
    if (flc_overrun) begin
      checks++; failures++; $display("FLC overrun at %0t", $time);
    end
    if (ctrl_tick) begin
      per_ticks++;
      if (pwm) hi_ticks++;
    end
    if (pwm_period_start) begin
      checks++;
      if (duty != ((ctrl_sel == CTRL_PI) ? pi_duty : flc_duty)) begin
        failures++; $display("PWM fed by the wrong controller at %0t", $time);
      end
      if (exp_hi >= 0) begin
        n_periods++;
        checks++;
        if (per_ticks != 100 || hi_ticks != exp_hi) begin
          failures++;
          $display("PWM period: %0d ticks, %0d high, expected 100 and %0d", per_ticks, hi_ticks, exp_hi);
        end
      end
      exp_hi    = (int'(duty_q) >= 32768) ? 100 : int'(duty_q) * 100 / 32768;
      per_ticks = 0;
      hi_ticks  = 0;
    end
  end

  task automatic phase(input real ms, input real vr, input real tol, input bit expect_rise);
    real vmin = 1e9, vmax = -1e9, acc = 0.0, mean;
    int n = 0, cycles;
    vref = 12'($rtoi(vr / 0.05));
    cycles = $rtoi(ms * 50000.0);
    for (int k = 0; k < cycles; k++) begin
      @(posedge clk);
      if (k >= cycles * 3 / 4) begin
        if (v_bus < vmin) vmin = v_bus;
        if (v_bus > vmax) vmax = v_bus;
        acc += v_bus;
        n++;
      end
    end
    mean = acc / n;
    $display("%s ref %5.1f V, CPL %5.1f W: bus mean %6.2f V, min %6.2f, max %6.2f",
             (ctrl_sel == CTRL_FLC) ? "FLC" : "PI ", vr, p_cpl, mean, vmin, vmax);
    checks++;
    if (mean > vr + tol || mean < vr - tol) begin
      failures++; $display("  mean outside %0.1f V of the reference", tol);
    end
    if (expect_rise) begin
      checks++;
      if (mean <= prev_mean) begin failures++; $display("  mean did not rise with the reference"); end
    end
    prev_mean = mean;
  endtask

  initial begin
    vref = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    phase(20, 60.0, 15.0, 0);
    n_ref_step++;  phase(20, 80.0, 15.0, 1);
    n_ref_step++;  phase(20, 100.0, 15.0, 1);
    n_cpl_step++;  p_cpl = 100.0; phase(20, 100.0, 15.0, 0);
    n_cpl_step++;  p_cpl = 200.0; phase(20, 100.0, 15.0, 0);
    p_cpl = 150.0;
    n_switch++;    ctrl_sel = CTRL_PI; phase(20, 100.0, 5.0, 0);
    n_ref_step++;  phase(20, 80.0, 5.0, 0);

    checks++;
    if (n_updates < n_ticks - 1 || n_updates > n_ticks) begin
      failures++; $display("FLC updates %0d for %0d control ticks", n_updates, n_ticks);
    end
    checks++;
    if (n_periods < n_ticks / 100 - 2) begin failures++; $display("only %0d PWM periods", n_periods); end
    $display("mechanisms: ref steps %0d, CPL steps %0d, controller switches %0d, FLC clamps %0d, rules fired 1/2/4: %0d/%0d/%0d, PWM periods %0d",
             n_ref_step, n_cpl_step, n_switch, n_flc_clamp, n_fire1, n_fire2, n_fire4, n_periods);
    checks++; if (n_ref_step == 0)  begin failures++; $display("no reference step"); end
    checks++; if (n_cpl_step == 0)  begin failures++; $display("no CPL step"); end
    checks++; if (n_switch == 0)    begin failures++; $display("no controller switch"); end
    checks++; if (n_flc_clamp == 0) begin failures++; $display("FLC duty never clamped"); end
    checks++; if (n_fire1 == 0)     begin failures++; $display("single-rule firing never seen"); end
    checks++; if (n_fire2 == 0)     begin failures++; $display("two-rule firing never seen"); end
    checks++; if (n_fire4 == 0)     begin failures++; $display("four-rule firing never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
