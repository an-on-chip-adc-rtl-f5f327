// adc_bist_tra: the test response analyzer.
//
// It watches the ADC code during the ramp and drives Pass. Parts:
//   transition detector   Tran pulse on each change of D0
//   INL detector          ri: new code equals counter bits C[n:1]
//                         (also the offset and gain error checks)
//   DNL detector          ti: adjacent transitions not certainly closer
//                         than 1/2 LSB nor farther than 3/2 LSB
//   transition counter    ctn: 2^(n-1) rising transitions of D0 seen
//   FF1                   registers ri & ti every clk tick
//   FF2                   fi: set by reset, loads ctn when en_cnt falls at
//                         the end of the ramp
// pass = FF1 & fi. As in the paper, FF1 is a plain D flip-flop, so pass
// drops while a faulty transition is being reported and rises again when a
// later transition is good; fi, once cleared, stays 0 until reset.
// The structure follows the paper; clocking FF1 with clk, detecting the
// falling edge of en_cnt synchronously and the reset values (all checks
// passing) are this design's choices.
// Timing: pass falls two clk ticks after the Tran of a faulty transition.
module adc_bist_tra
  import adc_bist_pkg::*;
#(
  parameter int unsigned N = ADC_BITS_DEFAULT
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] d,          // ADC code
  input  logic [N:0]   c,          // reference counter
  input  logic         clk_state,  // counter clock level
  input  logic         en_cnt,     // ramp inside [V_il, V_ih]
  output logic         tran_pulse,
  output logic         ri,
  output logic         ti,
  output logic         fi,
  output logic         pass
);

  logic         ctn;
  logic [N-1:0] tcount;
  logic         ff1_q;
  logic         en_q;

  adc_bist_tran_detector u_tran (
    .clk (clk), .d0 (d[0]), .tran_pulse (tran_pulse)
  );

  adc_bist_inl_detector #(.N(N)) u_inl (
    .clk (clk), .rst (rst), .tran_pulse (tran_pulse), .d (d), .c (c), .ri (ri)
  );

  adc_bist_dnl_detector u_dnl (
    .clk (clk), .rst (rst), .tran_pulse (tran_pulse),
    .clk_state (clk_state), .c0 (c[0]), .ti (ti)
  );

  adc_bist_tran_counter #(.N(N)) u_tcnt (
    .clk (clk), .rst (rst), .tran_pulse (tran_pulse), .d0 (d[0]),
    .count (tcount), .ctn (ctn)
  );

  // FF1
  always_ff @(posedge clk) begin
    if (rst) ff1_q <= 1'b1;
    else     ff1_q <= ri & ti;
  end

  // FF2, clocked by the falling edge of en_cnt
  always_ff @(posedge clk) begin
    if (rst) begin
      en_q <= 1'b0;
      fi   <= 1'b1;
    end else begin
      en_q <= en_cnt;
      if (en_q && !en_cnt) fi <= ctn;
    end
  end

  assign pass = ff1_q & fi;

endmodule
