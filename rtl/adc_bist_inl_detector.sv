// adc_bist_inl_detector: checks each ADC transition against the counter.
//
// With the reference counter preset to 2, the transition into ADC code k is
// inside the +-1/2 LSB accuracy window exactly when the counter reads 2k or
// 2k+1 at that moment, i.e. when the counter's upper n bits C[n:1] equal k.
// At every Tran pulse the detector compares the new ADC code d with c[N:1]
// bit by bit and stores the result in the flip-flop FFI1: ri = 1 when they
// are equal (INL acceptable), ri = 0 otherwise. The first and last
// transitions of the ramp are the offset and gain error checks.
// The comparison and its storage at Tran follow the paper; resetting ri
// to 1 is this design's choice.
// Timing: ri changes one clk tick after a tick with tran_pulse = 1 and holds until
// the next transition.
module adc_bist_inl_detector
  import adc_bist_pkg::*;
#(
  parameter int unsigned N = ADC_BITS_DEFAULT
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         tran_pulse,
  input  logic [N-1:0] d,      // ADC code D_{n-1}..D_0
  input  logic [N:0]   c,      // reference counter C_n..C_0
  output logic         ri
);

  logic [N-1:0] mismatch;

  assign mismatch = d ^ c[N:1];

  always_ff @(posedge clk) begin
    if (rst)       ri <= 1'b1;
    else if (tran_pulse) ri <= ~|mismatch;
  end

endmodule
