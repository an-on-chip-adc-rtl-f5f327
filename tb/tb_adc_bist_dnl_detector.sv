// tb_adc_bist_dnl_detector: checks the DNL detector. It first plays the
// document's two examples (1 -> 2 at counter 4 with the clock high, then
// 2 -> 3 at counter 7 with the clock low: too far apart; 1 -> 2 at counter 5
// with the clock low, then 2 -> 3 at counter 6 with the clock high: too
// close) and two acceptable pairs, then random transitions. The expected ti
// is worked out from the previous and the current (clock level, C0) pair.
module tb_adc_bist_dnl_detector;
  logic clk = 1'b0, rst = 1'b1, tran_pulse = 1'b0, clk_state = 1'b0, c0 = 1'b0, ti;
  int checks = 0, failures = 0, far_seen = 0, near_seen = 0;
  bit pcs = 0, pc0 = 0, exp_ti = 1;

  adc_bist_dnl_detector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(bit cs, bit lsb, bit t);
    bit far, near;
    @(negedge clk);
    clk_state = cs; c0 = lsb; tran_pulse = t;
    @(posedge clk); #1;
    if (t) begin
      far  = (pcs == 1 && pc0 == 0 && cs == 0 && lsb == 1);
      near = (pcs == 0 && pc0 == 1 && cs == 1 && lsb == 0);
      exp_ti = !(far || near);
      far_seen += far; near_seen += near;
      pcs = cs; pc0 = lsb;
    end
    checks++;
    if (ti != exp_ti) begin
      failures++;
      $display("FAIL cs=%0b c0=%0b t=%0b ti=%0b exp=%0b", cs, lsb, t, ti, exp_ti);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++; if (ti != 1'b1) failures++;
    rst = 1'b0;
    // first transition after reset is never judged
    apply(0, 1, 1);
    // TR1 (counter 4, clock 1) then TR2 (counter 7, clock 0): DNL > 3/2 LSB
    apply(1, 0, 1); apply(0, 1, 0); apply(0, 1, 1);
    checks++; if (ti != 1'b0) failures++;
    // TR3 (counter 5, clock 0) then TR4 (counter 6, clock 1): DNL < 1/2 LSB
    apply(0, 1, 1); apply(1, 0, 1);
    checks++; if (ti != 1'b0) failures++;
    // acceptable pairs
    apply(1, 0, 1); apply(1, 0, 1);
    apply(0, 1, 1); apply(0, 1, 1);
    checks++; if (ti != 1'b1) failures++;
    repeat (4000) apply(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
    checks++;
    if (far_seen == 0 || near_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
