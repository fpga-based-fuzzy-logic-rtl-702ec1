// tb_flc_top_loads: closed-loop load tests of the fuzzy controller at its
// default parameters, on a two-stage system of two controlled converters.
//
// The source converter (160 V input, 132 ohm class resistive load, 150 W
// constant power load) regulates the DC bus. The load converter takes its
// input from that bus and feeds a 21 ohm resistor; the current it draws
// while its switch conducts is taken from the bus capacitor. Each converter
// has its own flc_top and its own switched buck model.
//
// Sequence, 20 ms per phase:
//   start-up             bus 100 V, load converter 30 V
//   R 57 ohm, ref 40 V   resistive load step and load converter reference up
//   R 131 ohm, ref 30 V  both stepped back
//   CPL off / CPL on     150 W constant power load switched (130 ohm)
//   bus 120 V / 80 V     source reference stepped with the load converter at 40 V
// Checks, on the mean over the last quarter of each phase:
//   * both outputs lie within TOL volts of their references;
//   * the load converter follows its reference steps up and down;
//   * the bus follows its own reference steps;
//   * each load event (resistive step, CPL switching, load converter
//     reference step, bus reference step) happened at least once.
// The band is wide because, with the default gains, the loops settle into a
// limit cycle around the reference in these plant models rather than to a
// fixed duty cycle.
module tb_flc_top_loads;
  import flc_pkg::*;
  localparam real TOL = 15.0;

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;

  // source converter
  logic [11:0] s_vref, s_vmeas;
  logic s_pwm;
  real s_r = 131.0, s_p = 150.0, s_v, s_i;
  flc_top u_src (
    .clk, .rst_n, .vref(s_vref), .vmeas(s_vmeas), .ctrl_sel(CTRL_FLC),
    .pwm(s_pwm), .duty(), .saw(), .ctrl_tick(), .clk_1mhz(),
    .flc_duty(), .pi_duty(), .flc_duty_valid(), .flc_dd(), .flc_fired(),
    .flc_sat(), .pi_sat(), .flc_overrun(), .pwm_period_start()
  );

  // load converter, fed from the bus
  logic [11:0] l_vref, l_vmeas;
  logic l_pwm;
  real l_r = 21.0, l_v, l_i, l_iin;
  flc_top u_load (
    .clk, .rst_n, .vref(l_vref), .vmeas(l_vmeas), .ctrl_sel(CTRL_FLC),
    .pwm(l_pwm), .duty(), .saw(), .ctrl_tick(), .clk_1mhz(),
    .flc_duty(), .pi_duty(), .flc_duty_valid(), .flc_dd(), .flc_fired(),
    .flc_sat(), .pi_sat(), .flc_overrun(), .pwm_period_start()
  );

  buck_plant_model u_src_plant (
    .clk, .gate(s_pwm), .vin(160.0), .r_load(s_r), .p_cpl(s_p), .i_ext(l_iin),
    .v_bus(s_v), .i_l(s_i), .i_in(), .adc_code(s_vmeas)
  );
  buck_plant_model u_load_plant (
    .clk, .gate(l_pwm), .vin(s_v), .r_load(l_r), .p_cpl(0.0), .i_ext(0.0),
    .v_bus(l_v), .i_l(l_i), .i_in(l_iin), .adc_code(l_vmeas)
  );

  int checks = 0, failures = 0;
  int n_rstep = 0, n_cpl_sw = 0, n_lref = 0, n_sref = 0;
  real l_prev = 0.0, s_prev = 0.0;

  // One phase: apply the references, run 20 ms, check the means.
  // s_dir / l_dir: +1 or -1 if that reference was just stepped up or down.
  task automatic phase(input real s_ref, input real l_ref, input int s_dir, input int l_dir,
                       input string what);
    real s_acc = 0.0, l_acc = 0.0, s_mean, l_mean;
    int n = 0;
    s_vref = 12'($rtoi(s_ref / 0.05));
    l_vref = 12'($rtoi(l_ref / 0.05));
    for (int k = 0; k < 1000000; k++) begin
      @(posedge clk);
      if (k >= 750000) begin s_acc += s_v; l_acc += l_v; n++; end
    end
    s_mean = s_acc / n;
    l_mean = l_acc / n;
    $display("%-22s bus: ref %5.1f V R %5.1f ohm CPL %5.1f W mean %6.2f V | load conv: ref %4.1f V mean %6.2f V",
             what, s_ref, s_r, s_p, s_mean, l_ref, l_mean);
    checks++;
    if (s_mean > s_ref + TOL || s_mean < s_ref - TOL) begin failures++; $display("  bus mean out of band"); end
    checks++;
    if (l_mean > l_ref + TOL || l_mean < l_ref - TOL) begin failures++; $display("  load converter mean out of band"); end
    if (l_dir != 0) begin
      checks++;
      if ((l_dir > 0) ? (l_mean <= l_prev) : (l_mean >= l_prev)) begin
        failures++; $display("  load converter did not follow its reference step");
      end
    end
    if (s_dir != 0) begin
      checks++;
      if ((s_dir > 0) ? (s_mean <= s_prev) : (s_mean >= s_prev)) begin
        failures++; $display("  bus did not follow its reference step");
      end
    end
    l_prev = l_mean;
    s_prev = s_mean;
  endtask

  initial begin
    s_vref = '0; l_vref = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    phase(100.0, 30.0, 0, 0, "start-up");
    s_r = 57.0;  n_rstep++; n_lref++; phase(100.0, 40.0, 0, 1, "R 57 ohm, ref 40 V");
    s_r = 131.0; n_rstep++; n_lref++; phase(100.0, 30.0, 0, -1, "R 131 ohm, ref 30 V");
    s_r = 130.0; s_p = 0.0;  n_cpl_sw++; phase(100.0, 30.0, 0, 0, "CPL off");
    s_p = 150.0; n_cpl_sw++; n_lref++;   phase(100.0, 40.0, 0, 1, "CPL on, ref 40 V");
    n_sref++;                            phase(120.0, 40.0, 1, 0, "bus 120 V");
    n_sref++;                            phase(80.0, 40.0, -1, 0, "bus 80 V");
    checks++;
    if (n_rstep == 0 || n_cpl_sw == 0 || n_lref == 0 || n_sref == 0) begin
      failures++; $display("a load event never happened");
    end
    $display("events: resistive steps %0d, CPL switchings %0d, load converter reference steps %0d, bus reference steps %0d",
             n_rstep, n_cpl_sw, n_lref, n_sref);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: 7 phases of 1,000,000 cycles each, plus margin
  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
