// tb_adc_bist_top: end-to-end test of the ADC test structure at its default
// size (11-bit ADC, 12-bit reference counter, 2 clk ticks per counter clock).
//
// A behavioural ADC model sits between adc_vin and adc_d. Each scenario
// resets the structure, raises Test and lets the ramp run from V_il to past
// V_ih (2^12 counter clocks). At every transition of the ADC code the
// testbench predicts ri and ti on its own: from the model's threshold for
// the new code it works out the ramp sample at which the code changes, hence
// the counter value (2 + sample / 2) and the counter clock half, and applies
// the +-1/2 LSB INL window and the two DNL patterns. Test is raised at
// alternating phases of the counter clock. It also checks fi and
// pass at the end, the test time (2^(n+1) counter clocks with EN-cnt high,
// after which the counter is back at its preset), and, in calibration mode, that dout shows the counter and that
// the ADC sees V_Ain when Test is 0.
// V_init is chosen so that the ramp passes V_il 1.5 ramp steps after it
// starts; the ramp samples then fall at V_il + (m + 1/2) steps, each step is
// 1/4 LSB, and counter value 2 + j is shown while the ramp is in its j-th
// half-LSB segment. V_gm comes from V_gm = C_out * dV / (g_m * T) with
// T = 2^12 counter periods of 1 us.
module tb_adc_bist_top;
  localparam int  N     = 11;
  localparam int  CODES = 1 << N;
  localparam real VIL   = 0.0;
  localparam real VIH   = 5.0;
  localparam real LSB   = (VIH - VIL) / CODES;
  localparam real DV    = LSB / 4.0;            // ramp step per clk tick

  logic         clk = 1'b0, rst = 1'b1, cali = 1'b0, test = 1'b0;
  real          v_ain = 2.5, v_gm_p, v_gm_n = 0.0, v_init, adc_vin, v_ts;
  logic [N-1:0] adc_d, dout;
  logic         pass;

  int checks = 0, failures = 0, run_no = 0;

  // mechanism counters
  int n_tran, n_inl_fail, n_dnl_far, n_dnl_near, n_fi_fail, n_pass_low;
  int n_offset_fail, n_gain_fail, n_cal_dout, n_amux_normal, n_wrap;

  adc_bist_top dut (.*);
  adc_cut_model #(.N(N), .VIL(VIL), .VIH(VIH)) u_adc (.vin(adc_vin), .d(adc_d));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Ramp sample (in steps above V_il) at which the ADC first reads >= v.
  function automatic int sample_of(real v);
    int m;
    m = $rtoi((v - VIL) / DV - 0.5);
    while (VIL + (real'(m) + 0.5) * DV < v) m++;
    while (m > 0 && VIL + (real'(m) - 0.5) * DV >= v) m--;
    return m;
  endfunction

  // Run one ramp; returns the number of transitions seen.
  task automatic run_ramp(string name, int exp_inl_fail, int exp_dnl_fail,
                          bit exp_fi);
    int   prev_s, s, cnt, exp_c, code, cnt_inl, cnt_dnl, ntr;
    bit   prev_valid, exp_ri, exp_ti, too_far, too_near, cs, pcs, c0, pc0;
    bit   seen_low, p1, p2, p1_ri, p1_ti, p2_fault;
    int   en_ticks;
    int   p1_code;
    rst = 1'b1; test = 1'b0; cali = 1'b0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    // raise Test at either phase of the counter clock: integration must
    // still start on a counter clock rising edge
    repeat (3 + run_no % 2) @(posedge clk);
    run_no++;
    test = 1'b1;
    prev_valid = 0; cnt_inl = 0; cnt_dnl = 0; ntr = 0; seen_low = 0;
    pcs = 0; pc0 = 0;
    // wait for the ramp to start, then until it has left the window
    wait (dut.en_cnt);
    p1 = 0; p2 = 0;
    en_ticks = 1;   // the tick in which en_cnt rose
    while (dut.en_cnt || dut.v_out < VIH || p1 || p2) begin
      @(posedge clk);
      #1;
      if (dut.en_cnt) en_ticks++;
      if (!pass) seen_low = 1;
      // pass reacts two ticks after a faulty transition
      if (p2 && p2_fault) begin
        check(pass == 1'b0, $sformatf("%s: pass low after fault", name));
        n_pass_low++;
      end
      p2 = p1; p2_fault = p1 && (!p1_ri || !p1_ti);
      // ri and ti are updated one tick after the Tran pulse
      if (p1) begin
        check(dut.ri == p1_ri, $sformatf("%s: ri at code %0h exp %0b", name, p1_code, p1_ri));
        check(dut.ti == p1_ti, $sformatf("%s: ti at code %0h exp %0b", name, p1_code, p1_ti));
      end
      p1 = 0;
      if (dut.tran_pulse) begin
        ntr++;
        code = int'(adc_d);
        s = sample_of(u_adc.thr[code]);
        exp_c = (2 + s / 2) % (2 * CODES);
        cs = (s % 2) == 0;
        c0 = exp_c[0];
        exp_ri = ((exp_c >> 1) == code);
        too_far  = prev_valid && pcs == 1 && pc0 == 0 && cs == 0 && c0 == 1;
        too_near = prev_valid && pcs == 0 && pc0 == 1 && cs == 1 && c0 == 0;
        exp_ti = !(too_far || too_near);
        // the analyzer's own view must agree with the predicted position
        check(dut.c == (N+1)'(exp_c), $sformatf("%s: counter %0d at code %0h, expected %0d", name, dut.c, code, exp_c));
        check(dut.clk_state == cs, $sformatf("%s: clock half at code %0h", name, code));
        if (!exp_ri) begin
          n_inl_fail++; cnt_inl++;
          if (code == 1)         n_offset_fail++;
          if (code == CODES - 1) n_gain_fail++;
        end
        if (too_far)  begin n_dnl_far++;  cnt_dnl++; end
        if (too_near) begin n_dnl_near++; cnt_dnl++; end
        p1 = 1; p1_ri = exp_ri; p1_ti = exp_ti; p1_code = code;
        prev_valid = 1; pcs = cs; pc0 = c0;
      end
    end
    repeat (4) @(posedge clk);
    #1;
    n_tran += ntr;
    check(cnt_inl == exp_inl_fail, $sformatf("%s: %0d INL faults, expected %0d", name, cnt_inl, exp_inl_fail));
    check(cnt_dnl == exp_dnl_fail, $sformatf("%s: %0d DNL faults, expected %0d", name, cnt_dnl, exp_dnl_fail));
    check(dut.fi == exp_fi, $sformatf("%s: fi", name));
    if (!exp_fi) n_fi_fail++;
    check(pass == (exp_fi && dut.ri && dut.ti), $sformatf("%s: final pass", name));
    check(seen_low == (exp_inl_fail + exp_dnl_fail > 0),
          $sformatf("%s: pass dropped during ramp", name));
    // the test takes 2^(n+1) counter clocks of 2 ticks each
    check(en_ticks == 2 * (2 * CODES), $sformatf("%s: ramp took %0d ticks", name, en_ticks));
    // 2^(n+1) counter steps bring the counter back to its preset
    check(dut.c == (N+1)'(2), $sformatf("%s: counter back at 2 after the ramp (%0d)", name, dut.c));
    if (dut.c == (N+1)'(2)) n_wrap++;
    $display("%s: %0d transitions, INL faults %0d, DNL faults %0d, fi=%0b pass=%0b",
             name, ntr, cnt_inl, cnt_dnl, dut.fi, pass);
    test = 1'b0;
    u_adc.reset_thr();
    repeat (4) @(posedge clk);
  endtask

  initial begin
    v_gm_p = 3.0e-12 * (VIH - VIL) / (1.0e-6 * 4096.0e-6);
    v_init = VIL - 1.5 * DV;
    {n_tran, n_inl_fail, n_dnl_far, n_dnl_near, n_fi_fail, n_pass_low} = '0;
    {n_offset_fail, n_gain_fail, n_cal_dout, n_amux_normal, n_wrap} = '0;

    // 1. ideal ADC
    run_ramp("ideal", 0, 0, 1'b1);
    check(n_tran == CODES - 1, $sformatf("ideal: %0d transitions", n_tran));

    // Threshold shifts are whole ramp steps (1/4 LSB) so that each shifted
    // threshold sits half a step away from the nearest ramp sample.
    // 2. INL fault at code 009h: transition 3/4 LSB late
    u_adc.set_thr(9, u_adc.ideal_thr(9) + 0.75 * LSB);
    run_ramp("inl_009", 1, 0, 1'b1);

    // 3. DNL fault at 7F3h: in the last quarter of its INL window, 7F4h in
    //    the first quarter of its own: code 7F3h is under 1/2 LSB wide
    u_adc.set_thr('h7F3, u_adc.ideal_thr('h7F3) + 0.25 * LSB);
    u_adc.set_thr('h7F4, u_adc.ideal_thr('h7F4) - 0.5 * LSB);
    run_ramp("dnl_narrow_7f3", 0, 1, 1'b1);

    // 4. DNL fault the other way: code 100h is over 3/2 LSB wide
    u_adc.set_thr('h100, u_adc.ideal_thr('h100) - 0.5 * LSB);
    u_adc.set_thr('h101, u_adc.ideal_thr('h101) + 0.25 * LSB);
    run_ramp("dnl_wide_100", 0, 1, 1'b1);

    // 5. offset error: first transition 3/4 LSB late
    u_adc.set_thr(1, u_adc.ideal_thr(1) + 0.75 * LSB);
    run_ramp("offset", 1, 0, 1'b1);

    // 6. gain error: last transition 3/4 LSB early
    u_adc.set_thr(CODES - 1, u_adc.ideal_thr(CODES - 1) - 0.75 * LSB);
    run_ramp("gain", 1, 0, 1'b1);

    // 7. missing code 2AAh: 2A9h -> 2ABh, one rising edge of D0 is lost
    u_adc.set_thr('h2AA, u_adc.ideal_thr('h2AB));
    run_ramp("missing_2aa", 0, 0, 1'b0);

    // 8. D0 stuck at 0: no transitions at all
    u_adc.stuck_d0 = 0;
    run_ramp("d0_stuck0", 0, 0, 1'b0);

    // 9. calibration mode: dout shows the counter while the ramp runs,
    //    and with Test = 0 the ADC sees V_Ain
    rst = 1'b1; repeat (4) @(posedge clk); rst = 1'b0;
    #1;
    check(adc_vin == v_ain, "normal mode: ADC input is V_Ain");
    n_amux_normal++;
    check(dout == adc_d, "normal mode: dout is the ADC code");
    cali = 1'b1;
    wait (dut.en_cnt);
    repeat (100) begin
      @(posedge clk); #1;
      check(dout == dut.c[N-1:0], "calibration: dout shows the counter");
      n_cal_dout++;
    end
    check(dout > (N)'(2), "calibration: counter running");
    cali = 1'b0;

    $display("mechanisms: tran=%0d inl=%0d offset=%0d gain=%0d dnl_far=%0d dnl_near=%0d fi=%0d pass_low=%0d wrap=%0d cal=%0d amux=%0d",
             n_tran, n_inl_fail, n_offset_fail, n_gain_fail, n_dnl_far, n_dnl_near,
             n_fi_fail, n_pass_low, n_wrap, n_cal_dout, n_amux_normal);
    check(n_inl_fail > 0 && n_offset_fail > 0 && n_gain_fail > 0, "mechanism: INL/offset/gain faults seen");
    check(n_dnl_far > 0 && n_dnl_near > 0, "mechanism: both DNL patterns seen");
    check(n_fi_fail > 0 && n_pass_low > 0 && n_wrap > 0, "mechanism: completion fault, pass drop, wrap seen");
    check(n_cal_dout > 0 && n_amux_normal > 0, "mechanism: calibration and normal paths used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
