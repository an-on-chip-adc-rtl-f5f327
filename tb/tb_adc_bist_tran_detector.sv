// tb_adc_bist_tran_detector: drives random values on d0 and checks that
// tran_pulse is high exactly in the ticks where d0 differs from its value in
// the previous tick, for both 0 -> 1 and 1 -> 0 changes.
module tb_adc_bist_tran_detector;
  logic clk = 1'b0, d0 = 1'b0, tran_pulse, prev;
  int checks = 0, failures = 0, rises = 0, falls = 0;

  adc_bist_tran_detector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    prev = d0;
    repeat (3000) begin
      @(negedge clk);
      d0 = ($urandom_range(0, 3) == 0) ? ~d0 : d0;
      #1;
      checks++;
      if (tran_pulse != (d0 != prev)) begin
        failures++;
        $display("FAIL d0=%0b prev=%0b tran=%0b", d0, prev, tran_pulse);
      end
      if (d0 && !prev) rises++;
      if (!d0 && prev) falls++;
      @(posedge clk);
      prev = d0;
    end
    checks++;
    if (rises == 0 || falls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
