// adc_bist_top: on-chip built-in self-test structure for an n-bit ADC.
//
// A linear ramp from V_il to V_ih is applied to the ADC under test while an
// (n+1)-bit reference counter, preset to 2, counts in step with it: each
// counter value covers half an LSB of the ramp. Every time the ADC's LSB
// changes, the test response analyzer compares the new code with the
// counter's upper n bits (INL, offset and gain error within +-1/2 LSB),
// compares the position of this transition with the previous one using the
// counter's LSB and the counter clock level (DNL), and counts the 0 -> 1
// transitions of the LSB (missing codes, stuck LSB). pass is 1 while all
// checks hold. A full test takes 2^(n+1) counter clocks.
//
// Parts and signals (names as in the paper where it names them):
//   u_itpg  input test pattern generator: calibration control (Cali, Test,
//           Inte, Init), OTA-C integrator and window comparator/chopper
//           giving EN-cnt and V_ts (behavioural model, real-valued)
//   u_amux  analog multiplexer: ADC input is V_Ain (test = 0) or V_ts
//   u_dig   synthesizable logic: counter clock phase, reference counter,
//           test response analyzer, digital output multiplexer (Cali)
// The ADC under test is not part of the module: adc_vin is its input and
// adc_d its code.
//
// Use: hold rst for a few clk cycles with cali = test = 0 (the integrator is
// tied to V_init), then raise test. Integration starts at the next counter
// clock rising edge; the counter counts while the ramp is inside
// [V_il, V_ih]. With cali = 1 instead, dout shows the counter so that V_init
// and V_gm can be trimmed until the counter leaves 2 just after the ramp
// passes V_il and returns to 2 as it passes V_ih.
//
// Timing: clk is TICKS_PER_CLOCK times the counter clock (the paper's
// f = 2 f_oper), so the analyzer can tell the two halves of a counter clock
// period apart; this single-clock scheme is this design's own. Defaults
// follow the paper's main example: an 11-bit ADC, a 12-bit counter at
// 1 MHz (T_TICK = 0.5 us), V_il = 0 V, V_ih = 5 V, C_out = 3 pF. g_m is not
// given by the paper; 1 uA/V is assumed. ri, ti, fi and tran_pulse are
// kept as named internal signals for observation; they are not pins.
module adc_bist_top
  import adc_bist_pkg::*;
#(
  parameter int unsigned N               = ADC_BITS_DEFAULT,
  parameter int unsigned TICKS_PER_CLOCK = 2,
  parameter real         VIL             = 0.0,
  parameter real         VIH             = 5.0,
  parameter real         GM              = 1.0e-6,
  parameter real         COUT            = 3.0e-12,
  parameter real         T_TICK          = 0.5e-6
) (
  input  logic         clk,       // TICKS_PER_CLOCK x counter clock
  input  logic         rst,       // Reset
  input  logic         cali,      // Cali
  input  logic         test,      // Test
  input  real          v_ain,     // normal analog input
  input  real          v_gm_p,    // ramp slope control +
  input  real          v_gm_n,    // ramp slope control -
  input  real          v_init,    // integrator start voltage
  output real          adc_vin,   // to the ADC under test
  input  logic [N-1:0] adc_d,     // from the ADC under test
  output logic [N-1:0] dout,      // D_out
  output logic         pass,      // Pass
  output real          v_ts       // V_ts
);

  logic       clk_state, rise, en_cnt, inte;
  logic [N:0] c;
  logic       tran_pulse, ri, ti, fi;
  real        v_out;

  adc_bist_itpg #(.VIL(VIL), .VIH(VIH), .GM(GM), .COUT(COUT), .T_TICK(T_TICK)) u_itpg (
    .clk (clk), .rst (rst), .rise (rise), .cali (cali), .test (test),
    .v_gm_p (v_gm_p), .v_gm_n (v_gm_n), .v_init (v_init),
    .en_cnt (en_cnt), .v_ts (v_ts), .inte (inte), .v_out (v_out)
  );

  adc_bist_amux u_amux (
    .test (test), .v_ain (v_ain), .v_ts (v_ts), .v_adc (adc_vin)
  );

  adc_bist_digital #(.N(N), .TICKS_PER_CLOCK(TICKS_PER_CLOCK)) u_dig (
    .clk (clk), .rst (rst), .cali (cali), .d (adc_d), .en_cnt (en_cnt),
    .rise (rise), .clk_state (clk_state), .c (c), .tran_pulse (tran_pulse),
    .ri (ri), .ti (ti), .fi (fi), .pass (pass), .dout (dout)
  );

endmodule
