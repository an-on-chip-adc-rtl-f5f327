// adc_bist_digital: the synthesizable digital part of the ADC test structure.
//
// It holds the counter clock phase generator, the (n+1)-bit reference
// counter, the test response analyzer and the output multiplexer; the analog
// ramp generator and the analog multiplexer are outside it. Inputs are the
// ADC code d and the window comparator's en_cnt; outputs are Pass, the chip's
// digital output dout and the analyzer's internal verdicts for observation.
// Everything is clocked by clk, TICKS_PER_CLOCK times the counter clock.
// Splitting the digital logic into one module is this design's choice.
module adc_bist_digital
  import adc_bist_pkg::*;
#(
  parameter int unsigned N               = ADC_BITS_DEFAULT,
  parameter int unsigned TICKS_PER_CLOCK = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         cali,
  input  logic [N-1:0] d,          // ADC code
  input  logic         en_cnt,     // from the window comparator
  output logic         rise,       // counter clock rising edge strobe
  output logic         clk_state,  // counter clock level
  output logic [N:0]   c,          // reference counter
  output logic         tran_pulse,
  output logic         ri,
  output logic         ti,
  output logic         fi,
  output logic         pass,
  output logic [N-1:0] dout
);

  adc_bist_clk_phase #(.TICKS_PER_CLOCK(TICKS_PER_CLOCK)) u_phase (
    .clk (clk), .rst (rst), .clk_state (clk_state), .rise (rise)
  );

  adc_bist_ref_counter #(.N(N)) u_cnt (
    .clk (clk), .rst (rst), .rise (rise), .en_cnt (en_cnt), .c (c)
  );

  adc_bist_tra #(.N(N)) u_tra (
    .clk (clk), .rst (rst), .d (d), .c (c), .clk_state (clk_state),
    .en_cnt (en_cnt), .tran_pulse (tran_pulse), .ri (ri), .ti (ti), .fi (fi),
    .pass (pass)
  );

  adc_bist_dmux #(.N(N)) u_dmux (
    .cali (cali), .d (d), .c (c), .dout (dout)
  );

endmodule
