// adc_bist_ref_counter: the (n+1)-bit reference counter.
//
// The counter's value marks which half-LSB segment of the test ramp is being
// applied to the ADC. Reset (the paper's Reset pin on the counter's S
// input) presets it to COUNTER_INIT = 2, so that after each ADC transition
// the counter's upper n bits equal the expected ADC code. It steps by one at
// each rising edge of the counter clock (strobe `rise`) while en_cnt is 1,
// and wraps modulo 2^(n+1): after a full ramp of 2^(n+1) steps it is back at
// 2, as in the paper's calibration waveform.
// The preset value, the width and counting on EN-cnt follow the paper;
// a synchronous preset is this design's choice.
// Timing: c changes one clk tick after a tick with rise & en_cnt.
module adc_bist_ref_counter
  import adc_bist_pkg::*;
#(
  parameter int unsigned N = ADC_BITS_DEFAULT   // ADC bits; the counter has N+1
) (
  input  logic         clk,
  input  logic         rst,      // preset to COUNTER_INIT
  input  logic         rise,     // rising edge of the counter clock
  input  logic         en_cnt,   // ramp between V_il and V_ih
  output logic [N:0]   c         // counter value C_n..C_0
);

  always_ff @(posedge clk) begin
    if (rst)                c <= (N+1)'(COUNTER_INIT);
    else if (rise && en_cnt) c <= c + 1'b1;
  end

  // The counter only ever moves by one step.
  property p_step;
    @(posedge clk) disable iff (rst)
      (rise && en_cnt) |=> (c == $past(c) + 1'b1);
  endproperty
  a_step: assert property (p_step);

endmodule
