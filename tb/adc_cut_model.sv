// adc_cut_model: behavioural model of an n-bit ADC used as the circuit under
// test in the test structure's testbenches. Not synthesizable.
//
// The code is the number of transition voltages thr[1..2^n-1] that the input
// has reached (code k once vin >= thr[k]); for a monotonic threshold list
// that is the usual staircase transfer curve. Ideal thresholds are
// V_il + (k - 1/2) LSB with LSB = (V_ih - V_il) / 2^n. A testbench moves a
// threshold with set_thr() to create offset, gain, INL and DNL errors or
// missing codes, and can force the LSB with stuck_d0 (-1 = not stuck).
// Conversion is instantaneous (combinational).
module adc_cut_model #(
  parameter int unsigned N   = 11,
  parameter real         VIL = 0.0,
  parameter real         VIH = 5.0
) (
  input  real          vin,
  output logic [N-1:0] d
);

  localparam int unsigned CODES = 1 << N;
  localparam real LSB = (VIH - VIL) / CODES;

  real thr [CODES];
  int  stuck_d0 = -1;

  function automatic real ideal_thr(int k);
    return VIL + (real'(k) - 0.5) * LSB;
  endfunction

  task automatic reset_thr();
    for (int k = 0; k < CODES; k++) thr[k] = ideal_thr(k);
    stuck_d0 = -1;
  endtask

  task automatic set_thr(int k, real v);
    thr[k] = v;
  endtask

  initial reset_thr();

  always_comb begin
    logic [N-1:0] code;
    code = '0;
    for (int k = 1; k < CODES; k++)
      if (vin >= thr[k]) code = N'(k);
    if (stuck_d0 == 0) code[0] = 1'b0;
    if (stuck_d0 == 1) code[0] = 1'b1;
    d = code;
  end

endmodule
