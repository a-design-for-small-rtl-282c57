// Behavioural model of everything around the digital controller: the ladder DAC, the
// analog comparator and the synchronous buck power stage with its load.  Simulation only.
//
//   DAC:        V'ref = c(m)/256 * (V+ref - V-ref) + V-ref, V+ref = 1.7 V, V-ref = 0.75 V
//   comparator: v_comp = (e_o > V'ref), ideal, no delay or hysteresis
//   power:      v_sw = pwm ? e_in : 0 (ideal switches SW1/SW2 with dead time ignored)
//               L di/dt = v_sw - R_L i - v_C,  C dv_C/dt = i - i_load,
//               e_o = v_C + R_ESR (i - i_load)
// L = 10 uH and C = 470 uF are the experimental values; the winding resistance R_L and
// the capacitor ESR are typical values chosen for the model.  The state is integrated by
// forward Euler once per clk2x cycle, on the falling edge, so that the controller, which
// works on rising edges, always sees settled values.
module pol_plant_model #(
  parameter real L_H      = 10.0e-6,
  parameter real C_F      = 470.0e-6,
  parameter real R_L      = 0.02,
  parameter real R_ESR    = 0.05,
  parameter real DT_S     = 1.0 / 66.6e6,
  parameter real VREF_HI  = 1.7,
  parameter real VREF_LO  = 0.75
) (
  input  logic       clk2x,
  input  logic       pwm,
  input  logic [7:0] c_m,
  input  real        e_in,
  input  real        i_load,
  output logic       v_comp,
  output real        e_o,
  output real        i_l
);

  real v_c = 0.0;
  real v_ref_dac;

  initial begin
    i_l = 0.0;
    e_o = 0.0;
  end

  always @(negedge clk2x) begin
    real v_sw, di, dv;
    v_sw = pwm ? e_in : 0.0;
    di   = (v_sw - R_L * i_l - v_c) / L_H * DT_S;
    dv   = (i_l - i_load) / C_F * DT_S;
    i_l  = i_l + di;
    v_c  = v_c + dv;
    e_o  = v_c + R_ESR * (i_l - i_load);
  end

  always_comb begin
    v_ref_dac = real'(c_m) / 256.0 * (VREF_HI - VREF_LO) + VREF_LO;
    v_comp    = (e_o > v_ref_dac);
  end

endmodule
