// adc_bist_integrator: behavioural model of the linear differential
// integrator (OTA-C) that generates the test ramp. Not synthesizable: it
// stands for an analog circuit and computes with real numbers.
//
// A transconductor turns the differential control voltage V_gm into a
// current g_m * V_gm that charges the capacitor C_out while the switch Inte
// is closed; with Init closed the capacitor is tied to V_init. The ramp
// slope is therefore g_m * V_gm / C_out, and a full swing dV = V_ih - V_il in
// time T needs V_gm = C_out * dV / (g_m * T). C_out = 3 pF is the paper's
// value; g_m is not given and its default here is this design's choice.
// The model is evaluated once per tick of clk, whose period T_TICK (seconds)
// is the time step: the output rises by g_m * V_gm * T_TICK / C_out per tick.
// An ideal, perfectly linear OTA is modelled; nonlinearity and saturation of
// the real amplifier are not.
module adc_bist_integrator #(
  parameter real GM     = 1.0e-6,    // transconductance, A/V
  parameter real COUT   = 3.0e-12,   // integration capacitor, F
  parameter real T_TICK = 0.5e-6     // clk period, s
) (
  input  logic clk,
  input  logic inte,      // integrate switch closed
  input  logic init,      // capacitor tied to V_init
  input  real  v_gm_p,    // transconductor + input
  input  real  v_gm_n,    // transconductor - input
  input  real  v_init,    // initial voltage
  output real  v_out      // capacitor voltage
);

  real v_cap;

  initial v_cap = 0.0;

  always @(posedge clk) begin
    if (init)      v_cap <= v_init;
    else if (inte) v_cap <= v_cap + GM * (v_gm_p - v_gm_n) * T_TICK / COUT;
  end

  assign v_out = v_cap;

endmodule
