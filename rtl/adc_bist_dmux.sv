// adc_bist_dmux: the n-bit digital output multiplexer.
//
// In normal use and in test (cali = 0) the chip's digital output dout carries
// the ADC code. During calibration (cali = 1) it carries the reference
// counter instead, so that the moments where the counter starts and stops
// can be watched from outside while V_init and V_gm are trimmed. The select
// signal Cali follows the paper; which counter bits are shown (the n low
// bits C[n-1:0], which include C0 and so show every step) is this design's
// choice. Combinational.
module adc_bist_dmux
  import adc_bist_pkg::*;
#(
  parameter int unsigned N = ADC_BITS_DEFAULT
) (
  input  logic         cali,
  input  logic [N-1:0] d,      // ADC code
  input  logic [N:0]   c,      // reference counter
  output logic [N-1:0] dout
);

  always_comb begin
    if (cali) dout = c[N-1:0];
    else      dout = d;
  end

endmodule
