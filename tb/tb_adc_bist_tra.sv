// tb_adc_bist_tra: checks the test response analyzer on the paper's
// 2-bit example (3-bit reference counter). The testbench plays the ramp
// itself, one tick per quarter LSB: tick s (0 <= s < 16) is in counter
// value 2 + s/2 with the counter clock high for even s, and en_cnt is 1
// for exactly those ticks. The ADC code at tick s is the number of
// thresholds (given in ticks) that s has reached. Scenarios: an ideal ADC;
// the two DNL patterns of the paper (TR1/TR2 and TR3/TR4); an INL error;
// an offset and a gain error; a missing code; D0 stuck at 1. For each
// transition the expected ri and ti are worked out from the thresholds,
// and pass and fi are checked during and after the ramp.
module tb_adc_bist_tra;
  localparam int N = 2;
  logic clk = 1'b0, rst = 1'b1, clk_state = 1'b0, en_cnt = 1'b0;
  logic [N-1:0] d = '0;
  logic [N:0]   c = (N+1)'(2);
  logic tran_pulse, ri, ti, fi, pass;
  int checks = 0, failures = 0;
  int n_inl = 0, n_far = 0, n_near = 0, n_fi = 0;

  adc_bist_tra #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // thr[k]: first tick at which the ADC reads >= k; stuck: -1, 0 or 1
  task automatic ramp(string name, int thr[4], int stuck, bit exp_fi, bit exp_drop);
    int code, pcode, ps, cnt;
    bit exp_ri, exp_ti, pcs, pc0, have_prev, drop, p1, p1_bad;
    rst = 1'b1; d = '0; en_cnt = 1'b0; c = (N+1)'(2); clk_state = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    have_prev = 0; drop = 0; pcode = 0; p1 = 0; p1_bad = 0;
    for (int s = -4; s < 22; s++) begin
      @(negedge clk);
      code = 0;
      for (int k = 1; k < 4; k++) if (s >= thr[k]) code = k;
      if (stuck == 0) code = code & 2;
      if (stuck == 1) code = code | 1;
      cnt = (s < 0) ? 2 : (s < 16) ? (2 + s / 2) % 8 : 2;
      c = (N+1)'(cnt);
      clk_state = (((s % 2) + 2) % 2) == 0;
      en_cnt = (s >= 0 && s < 16);
      d = N'(code);
      #1;
      check(tran_pulse == ((code & 1) != (pcode & 1)), $sformatf("%s: tran", name));
      @(posedge clk); #1;
      if (!pass) drop = 1;
      // FF1 takes ri & ti one tick after they change
      if (p1 && p1_bad) check(pass == 1'b0, $sformatf("%s: pass low", name));
      p1 = 0;
      if ((code & 1) != (pcode & 1)) begin
        exp_ri = (cnt >> 1) == code;
        exp_ti = !(have_prev && ((pcs == 1 && pc0 == 0 && clk_state == 0 && cnt[0] == 1) ||
                                 (pcs == 0 && pc0 == 1 && clk_state == 1 && cnt[0] == 0)));
        n_inl += !exp_ri;
        if (have_prev && pcs == 1 && pc0 == 0 && clk_state == 0 && cnt[0] == 1) n_far++;
        if (have_prev && pcs == 0 && pc0 == 1 && clk_state == 1 && cnt[0] == 0) n_near++;
        // ri and ti are updated by the same clk edge that ends the Tran tick
        check(ri == exp_ri, $sformatf("%s: ri", name));
        check(ti == exp_ti, $sformatf("%s: ti", name));
        p1 = 1; p1_bad = !(exp_ri && exp_ti);
        have_prev = 1; pcs = clk_state; pc0 = cnt[0];
      end
      pcode = code;
    end
    repeat (3) @(posedge clk); #1;
    check(fi == exp_fi, $sformatf("%s: fi=%0b", name, fi));
    n_fi += !exp_fi;
    check(drop == exp_drop, $sformatf("%s: pass dropped=%0b", name, drop));
    check(pass == (fi && ri && ti), $sformatf("%s: final pass", name));
  endtask

  initial begin
    // ideal: transitions at ticks 2, 6, 10 (counter 3, 5, 7, clock high)
    ramp("ideal",      '{0, 2, 6, 10}, -1, 1'b1, 1'b0);
    // TR1 (counter 4, clock 1) then TR2 (counter 7, clock 0)
    ramp("tr1_tr2",    '{0, 2, 4, 11}, -1, 1'b1, 1'b1);
    // TR3 (counter 5, clock 0) then TR4 (counter 6, clock 1)
    ramp("tr3_tr4",    '{0, 2, 7, 8},  -1, 1'b1, 1'b1);
    // INL: 1 -> 2 at counter 6 (1/2 LSB late)
    ramp("inl",        '{0, 2, 8, 10}, -1, 1'b1, 1'b1);
    // offset: 0 -> 1 at counter 4
    ramp("offset",     '{0, 4, 6, 10}, -1, 1'b1, 1'b1);
    // gain: 2 -> 3 at counter 5
    ramp("gain",       '{0, 2, 6, 7},  -1, 1'b1, 1'b1);
    // missing code 2: 1 -> 3 directly, D0 does not rise a second time
    ramp("missing",    '{0, 2, 10, 10}, -1, 1'b0, 1'b1);
    // D0 stuck at 1
    ramp("stuck1",     '{0, 2, 6, 10}, 1, 1'b0, 1'b1);
    check(n_inl >= 3 && n_far > 0 && n_near > 0 && n_fi >= 2, "all mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
