// adc_bist_tran_detector: detects every change of the ADC's LSB.
//
// An ADC whose input is a rising ramp changes its code one step at a time,
// and every step flips the least significant bit D0. Watching D0 alone is
// therefore enough to see every transition, as the paper does. Its pulse
// Tran is the exclusive OR of D0 and a delayed copy of D0; here the delay
// unit is one clk flip-flop, so Tran is one clk tick wide and is high in the
// tick in which the new code is first present on d0 (this design's choice,
// which makes the detector synchronous).
// Interface: d0 must be synchronous to clk. tran_pulse is combinational.
module adc_bist_tran_detector (
  input  logic clk,
  input  logic d0,
  output logic tran_pulse
);

  logic d0_dly;   // the delay unit

  always_ff @(posedge clk) d0_dly <= d0;

  assign tran_pulse = d0 ^ d0_dly;

endmodule
