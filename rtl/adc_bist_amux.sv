// adc_bist_amux: behavioural model of the analog input multiplexer. Not
// synthesizable: it stands for an analog switch pair and passes real values.
//
// The ADC's input is the chip's analog input V_Ain in normal operation
// (test = 0) and the ramp V_ts during a test (test = 1); the select signal
// Test and the input order follow the paper. Combinational.
module adc_bist_amux (
  input  logic test,
  input  real  v_ain,
  input  real  v_ts,
  output real  v_adc
);

  assign v_adc = test ? v_ts : v_ain;

endmodule
