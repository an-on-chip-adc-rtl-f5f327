// adc_bist_cal_ctrl: the calibration control circuit of the ramp generator.
//
// When Test or Cali is 1, the integrate switch Inte closes at the next
// rising edge of the counter clock and the integrator starts its ramp. When
// both are 0, Init closes at once and the integration capacitor is tied to
// V_init. Inte is the flip-flop on (Cali | Test), clocked by the counter
// clock; Init is the inverse of (Cali | Test). This follows the paper;
// the counter clock's rising edge is the strobe `rise`, and reset opens Inte.
// Timing: inte changes one clk tick after a tick with rise = 1.
module adc_bist_cal_ctrl (
  input  logic clk,
  input  logic rst,
  input  logic rise,    // rising edge of the counter clock
  input  logic cali,
  input  logic test,
  output logic inte,    // integrate switch closed
  output logic init     // capacitor tied to V_init
);

  logic start;

  assign start = cali | test;

  always_ff @(posedge clk) begin
    if (rst)       inte <= 1'b0;
    else if (rise) inte <= start;
  end

  assign init = ~start;

endmodule
