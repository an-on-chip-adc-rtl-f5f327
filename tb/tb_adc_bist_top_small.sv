// tb_adc_bist_top_small: runs the test structure on the two small examples
// that explain it: a 3-bit ADC with a 4-bit counter, V_il = 1 V,
// V_ih = 4 V and a 2 us counter clock, and a 2-bit ADC with a 3-bit counter.
// For the 3-bit case it checks that the counter runs 2, 3, ..., 15, 0, 1
// while EN-cnt is 1 and rests at 2 afterwards; for the 2-bit case it plays
// the two DNL situations (transitions 1 -> 2 and 2 -> 3 at counter 4/7 and
// 5/6) and an INL error, and for both an ideal ADC that must pass. The
// 3-bit case is also run with 4 clk ticks per counter clock.
module tb_adc_bist_top_small;
  int checks3, failures3, checks2, failures2, checks4, failures4;
  int checks = 0, failures = 0;
  bit seq_ok;

  adc_bist_harness #(.N(3), .VIL(1.0), .VIH(4.0), .T_TICK(1.0e-6)) h3 (.checks(checks3), .failures(failures3));
  adc_bist_harness #(.N(2), .VIL(0.0), .VIH(4.0), .T_TICK(1.0e-6)) h2 (.checks(checks2), .failures(failures2));
  // 3-bit case again with 4 clk ticks per counter clock (finer ramp steps)
  adc_bist_harness #(.N(3), .VIL(1.0), .VIH(4.0), .T_TICK(0.5e-6), .TPC(4)) h4 (.checks(checks4), .failures(failures4));

  initial begin
    #10ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + checks3 + checks2 + checks4, failures + failures3 + failures2 + failures4 + 1);
    $finish;
  end

  initial begin
    // 3-bit ADC, 4-bit counter
    h3.run_ramp("ideal", 0, 0, 1'b1);
    seq_ok = (h3.cseq.size() == 16);
    for (int i = 0; i < h3.cseq.size() && i < 16; i++) seq_ok &= (h3.cseq[i] == (2 + i) % 16);
    checks++; if (!seq_ok) begin failures++; $display("FAIL counter sequence %p", h3.cseq); end
    h3.shift(5, 3);                       // code 5 entered 3/4 LSB late
    h3.run_ramp("inl_5", 1, 0, 1'b1);
    h3.shift(7, -3);                      // gain error
    h3.run_ramp("gain", 1, 0, 1'b1);

    // 2-bit ADC, 3-bit counter (ideal 1->2 at counter 5, 2->3 at counter 7)
    h2.run_ramp("ideal", 0, 0, 1'b1);
    h2.shift(2, -2); h2.shift(3, 1);      // TR1 (4, clock 1) then TR2 (7, clock 0)
    h2.run_ramp("tr1_tr2", 0, 1, 1'b1);
    h2.shift(2, 1); h2.shift(3, -2);      // TR3 (5, clock 0) then TR4 (6, clock 1)
    h2.run_ramp("tr3_tr4", 0, 1, 1'b1);
    h2.shift(1, 3);                       // offset error
    h2.run_ramp("offset", 1, 0, 1'b1);
    // 4 ticks per counter clock: same judgements with a finer ramp
    h4.run_ramp("ideal", 0, 0, 1'b1);
    h4.shift(3, -2); h4.shift(4, 1);      // code 3 over 3/2 LSB wide
    h4.run_ramp("dnl_wide", 0, 1, 1'b1);
    h4.shift(6, 1); h4.shift(7, -2);      // code 6 under 1/2 LSB wide
    h4.run_ramp("dnl_narrow", 0, 1, 1'b1);
    h4.shift(2, -3);                      // INL: 3/4 LSB early
    h4.run_ramp("inl", 1, 0, 1'b1);
    checks++;
    if (h2.n_far == 0 || h2.n_near == 0 || h3.n_inl == 0 || h2.n_inl == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + checks3 + checks2 + checks4, failures + failures3 + failures2 + failures4);
    $finish;
  end
endmodule
