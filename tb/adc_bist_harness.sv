// adc_bist_harness: test harness for the ADC test structure at a chosen
// size. It holds one adc_bist_top, a behavioural ADC model and the clock,
// and offers tasks that run one ramp and check the analyzer against values
// the harness works out from the model's thresholds (see run_ramp). The
// caller reads checks and failures when done. A ramp step is 1/(2 TPC) LSB
// per tick. V_init puts the ramp TPC - 1/2 steps below V_il, so ramp samples
// fall at V_il + (m + 1/2) steps and counter value 2 + j covers the j-th
// half-LSB segment.
module adc_bist_harness #(
  parameter int  N      = 3,
  parameter real VIL    = 1.0,
  parameter real VIH    = 4.0,
  parameter real T_TICK = 1.0e-6,
  parameter real HALF   = 5.0,      // half clk period in simulation time units
  parameter int  TPC    = 2         // clk ticks per counter clock period
) (
  output int checks,
  output int failures
);
  localparam int  CODES = 1 << N;
  localparam real LSB   = (VIH - VIL) / CODES;
  localparam real DV    = LSB / (2.0 * TPC);   // ramp step per tick
  localparam real GM    = 1.0e-6;
  localparam real COUT  = 3.0e-12;

  logic         clk = 1'b0, rst = 1'b1, cali = 1'b0, test = 1'b0;
  real          v_ain = 0.0, v_gm_p, v_gm_n = 0.0, v_init, adc_vin, v_ts;
  logic [N-1:0] adc_d, dout;
  logic         pass;
  int           n_inl, n_far, n_near, n_fi;
  int           cseq[$];            // counter values seen while EN-cnt is 1

  adc_bist_top #(.N(N), .VIL(VIL), .VIH(VIH), .T_TICK(T_TICK), .TICKS_PER_CLOCK(TPC)) dut (.*);
  adc_cut_model #(.N(N), .VIL(VIL), .VIH(VIH)) u_adc (.vin(adc_vin), .d(adc_d));

  always #(HALF) clk = ~clk;

  initial begin
    checks = 0; failures = 0; n_inl = 0; n_far = 0; n_near = 0; n_fi = 0;
    // ramp of dV = V_ih - V_il in 2^(n+1) counter periods of TPC ticks
    v_gm_p = COUT * (VIH - VIL) / (GM * T_TICK * TPC * (2 * CODES));
    v_init = VIL - (real'(TPC) - 0.5) * DV;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [n=%0d] %s (t=%0t)", N, what, $time);
    end
  endtask

  function automatic int sample_of(real v);
    int m;
    m = $rtoi((v - VIL) / DV - 0.5);
    while (VIL + (real'(m) + 0.5) * DV < v) m++;
    while (m > 0 && VIL + (real'(m) - 0.5) * DV >= v) m--;
    return m;
  endfunction

  // Move transition k by `quarters` quarter-LSB steps.
  task automatic shift(int k, int quarters);
    u_adc.set_thr(k, u_adc.ideal_thr(k) + quarters * LSB / 4.0);
  endtask

  task automatic run_ramp(string name, int exp_inl, int exp_dnl, bit exp_fi);
    int s, exp_c, code, c_inl, c_dnl, ntr;
    bit prev_valid, exp_ri, exp_ti, far, near, cs, pcs, c0, pc0, p1, p1_ri, p1_ti;
    rst = 1'b1; test = 1'b0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (3) @(posedge clk);
    test = 1'b1;
    prev_valid = 0; c_inl = 0; c_dnl = 0; ntr = 0; p1 = 0; pcs = 0; pc0 = 0;
    cseq.delete();
    wait (dut.en_cnt);
    while (dut.en_cnt || dut.v_out < VIH || p1) begin
      @(posedge clk); #1;
      if (dut.en_cnt && (cseq.size() == 0 || cseq[$] != int'(dut.c))) cseq.push_back(int'(dut.c));
      if (p1) begin
        check(dut.ri == p1_ri, $sformatf("%s: ri", name));
        check(dut.ti == p1_ti, $sformatf("%s: ti", name));
      end
      p1 = 0;
      if (dut.tran_pulse) begin
        ntr++;
        code  = int'(adc_d);
        s     = sample_of(u_adc.thr[code]);
        exp_c = (2 + s / TPC) % (2 * CODES);
        cs    = (s % TPC) < TPC / 2;
        c0    = exp_c[0];
        exp_ri = (exp_c >> 1) == code;
        far    = prev_valid && pcs && !pc0 && !cs && c0;
        near   = prev_valid && !pcs && pc0 && cs && !c0;
        exp_ti = !(far || near);
        check(dut.c == (N+1)'(exp_c), $sformatf("%s: counter at code %0d", name, code));
        c_inl += !exp_ri; c_dnl += int'(far) + int'(near);
        n_far += far; n_near += near;
        p1 = 1; p1_ri = exp_ri; p1_ti = exp_ti;
        prev_valid = 1; pcs = cs; pc0 = c0;
      end
    end
    repeat (4) @(posedge clk); #1;
    n_inl += c_inl; n_fi += !exp_fi;
    check(c_inl == exp_inl, $sformatf("%s: %0d INL faults, expected %0d", name, c_inl, exp_inl));
    check(c_dnl == exp_dnl, $sformatf("%s: %0d DNL faults, expected %0d", name, c_dnl, exp_dnl));
    check(dut.fi == exp_fi, $sformatf("%s: fi", name));
    check(pass == (exp_fi && exp_ri && exp_ti), $sformatf("%s: final pass", name));
    check(dut.c == (N+1)'(2), $sformatf("%s: counter back at 2", name));
    $display("[n=%0d] %s: %0d transitions, INL %0d, DNL %0d, fi=%0b pass=%0b",
             N, name, ntr, c_inl, c_dnl, dut.fi, pass);
    test = 1'b0;
    u_adc.reset_thr();
    repeat (4) @(posedge clk);
  endtask
endmodule
