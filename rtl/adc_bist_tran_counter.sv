// adc_bist_tran_counter: counts the 0 -> 1 transitions of the ADC's LSB.
//
// A healthy n-bit ADC driven by a full ramp makes exactly 2^(n-1) rising
// transitions of D0 (into codes 1, 3, ..., 2^n - 1). This n-bit counter
// counts them; its most significant bit, ctn (the paper's C_tn), becomes
// 1 once 2^(n-1) have been seen. Missing codes or a D0 stuck at 0 or 1 leave
// ctn at 0. Reset clears the count.
// Counting D0's rising edges follows the paper; doing it with the
// synchronous strobe tran_pulse & d0 is this design's choice.
// Timing: count changes one clk tick after a tick with tran_pulse & d0.
module adc_bist_tran_counter
  import adc_bist_pkg::*;
#(
  parameter int unsigned N = ADC_BITS_DEFAULT
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         tran_pulse,
  input  logic         d0,
  output logic [N-1:0] count,
  output logic         ctn
);

  always_ff @(posedge clk) begin
    if (rst)             count <= '0;
    else if (tran_pulse && d0) count <= count + 1'b1;
  end

  assign ctn = count[N-1];

endmodule
