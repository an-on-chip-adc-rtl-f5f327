// adc_bist_window_comp: behavioural model of the voltage window comparator
// and chopper. Not synthesizable: it stands for two analog comparators and an
// analog switch and computes with real numbers.
//
// One comparator tests v_out < v_ih, the other v_out > v_il; both true gives
// EN-cnt = 1, which lets the reference counter count and closes switch S1 so
// that the ramp appears on V_ts, the ADC's test input. The comparators, their
// polarities, the AND of their outputs and S1 follow the paper. Outside
// the window the model holds V_ts at the bound the ramp is on (V_il below
// the window, V_ih above it), i.e. it trims the ramp to [V_il, V_ih]; what
// V_ts does while S1 is open is this design's choice. It makes the ADC read
// code 0 before every ramp and full scale after it. Combinational.
module adc_bist_window_comp (
  input  real  v_out,     // integrator output
  input  real  v_il,      // lower bound of the test range
  input  real  v_ih,      // upper bound of the test range
  output logic en_cnt,
  output real  v_ts       // trimmed test signal
);

  logic above_il, below_ih;

  assign below_ih = (v_out < v_ih);   // upper comparator: + is v_ih
  assign above_il = (v_out > v_il);   // lower comparator: + is v_out
  assign en_cnt   = above_il && below_ih;

  always_comb begin
    if (en_cnt)        v_ts = v_out;
    else if (below_ih) v_ts = v_il;
    else               v_ts = v_ih;
  end

endmodule
