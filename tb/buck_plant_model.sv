// buck_plant_model: behavioural (not synthesizable) model of a buck
// converter and its loads, for closed-loop simulation of the controller.
//
// Switched model integrated with forward Euler once per clock (dt = 20 ns
// at 50 MHz): the inductor current rises by (vin - v)/L while the gate is
// on and falls by v/L through the freewheeling diode while it is off, never
// going negative (discontinuous conduction is allowed). The output capacitor
// is charged by the inductor current and discharged by a resistive load v/R,
// a constant power load P/v and an extra current `i_ext`. Below CPL_VMIN the
// constant power load behaves as a resistor (P/CPL_VMIN^2), as a real
// converter does at start-up.
//
// Ports: `vin` is the input voltage (160 V for the source converter of the
// reference system). `i_in` is the current the converter draws from its
// input, the inductor current while the switch conducts. To cascade two
// models, feed one's `v_bus` to the other's `vin` and that one's `i_in` back
// to the first's `i_ext`. `r_load`, `p_cpl` and `i_ext` may change at any
// time. `adc_code` is the output voltage sampled by an ideal 12-bit
// converter with 0.05 V per code, updated every clock.
//
// L = 1.6 mH and C = 150 uF are the reference system's values for both
// converters; the 0.3 ohm inductor resistance RF and the 0.05 V code size
// are this model's assumptions.
module buck_plant_model #(
  parameter real L        = 1.6e-3,
  parameter real C        = 150.0e-6,
  parameter real RF       = 0.3,
  parameter real DT       = 20.0e-9,
  parameter real CPL_VMIN = 20.0,
  parameter real VLSB     = 0.05
) (
  input  logic        clk,
  input  logic        gate,
  input  real         vin,
  input  real         r_load,
  input  real         p_cpl,
  input  real         i_ext,
  output real         v_bus,
  output real         i_l,
  output real         i_in,
  output logic [11:0] adc_code
);
  initial begin
    v_bus = 0.0;
    i_l   = 0.0;
    i_in  = 0.0;
  end

  always @(posedge clk) begin
    real vl, il_n, v_n, icpl, code;
    vl   = gate ? (vin - v_bus) : -v_bus;
    il_n = i_l + DT * (vl - RF * i_l) / L;
    if (il_n < 0.0) il_n = 0.0;
    if (v_bus > CPL_VMIN) icpl = p_cpl / v_bus;
    else                  icpl = p_cpl * v_bus / (CPL_VMIN * CPL_VMIN);
    v_n  = v_bus + DT * (i_l - v_bus / r_load - icpl - i_ext) / C;
    if (v_n < 0.0) v_n = 0.0;
    i_l   <= il_n;
    v_bus <= v_n;
    i_in  <= gate ? il_n : 0.0;
    code = v_n / VLSB + 0.5;
    adc_code <= (code >= 4095.0) ? 12'd4095 : 12'($rtoi(code));
  end
endmodule
