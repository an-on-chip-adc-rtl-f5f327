// adc_bist_itpg: the input test pattern generator (behavioural model, since
// it contains the analog integrator and window comparator).
//
// It joins the calibration control circuit (synthesizable), the linear
// differential integrator and the voltage window comparator/chopper. With
// Cali = Test = 0 the integrator is held at V_init; when either is raised,
// integration starts at the next rising edge of the counter clock. While the
// ramp is between V_il and V_ih, en_cnt is 1 and the ramp appears on v_ts.
// V_il and V_ih are parameters here; their defaults, 0 V and 5 V, are the
// range of the paper's 11-bit example.
module adc_bist_itpg #(
  parameter real VIL    = 0.0,
  parameter real VIH    = 5.0,
  parameter real GM     = 1.0e-6,
  parameter real COUT   = 3.0e-12,
  parameter real T_TICK = 0.5e-6
) (
  input  logic clk,
  input  logic rst,
  input  logic rise,      // rising edge of the counter clock
  input  logic cali,
  input  logic test,
  input  real  v_gm_p,
  input  real  v_gm_n,
  input  real  v_init,
  output logic en_cnt,
  output real  v_ts,
  output logic inte,
  output real  v_out
);

  logic init;

  adc_bist_cal_ctrl u_cal (
    .clk (clk), .rst (rst), .rise (rise), .cali (cali), .test (test),
    .inte (inte), .init (init)
  );

  adc_bist_integrator #(.GM(GM), .COUT(COUT), .T_TICK(T_TICK)) u_int (
    .clk (clk), .inte (inte), .init (init),
    .v_gm_p (v_gm_p), .v_gm_n (v_gm_n), .v_init (v_init), .v_out (v_out)
  );

  adc_bist_window_comp u_win (
    .v_out (v_out), .v_il (VIL), .v_ih (VIH),
    .en_cnt (en_cnt), .v_ts (v_ts)
  );

endmodule
