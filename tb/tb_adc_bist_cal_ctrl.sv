// tb_adc_bist_cal_ctrl: checks the calibration control circuit. init must
// follow NOT(cali | test) at once; inte must take (cali | test) only at
// ticks with the counter clock rising-edge strobe, and be 0 after reset.
module tb_adc_bist_cal_ctrl;
  logic clk = 1'b0, rst = 1'b1, rise = 1'b0, cali = 1'b0, test = 1'b0, inte, init;
  int checks = 0, failures = 0, starts = 0;
  bit model = 0;

  adc_bist_cal_ctrl dut (.*);

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

  initial begin
    repeat (2) @(posedge clk); #1;
    check(inte == 1'b0, "reset");
    rst = 1'b0;
    repeat (2000) begin
      @(negedge clk);
      rise = 1'($urandom_range(0, 1));
      if ($urandom_range(0, 7) == 0) cali = ~cali;
      if ($urandom_range(0, 7) == 0) test = ~test;
      #1 check(init == !(cali || test), "init");
      @(posedge clk); #1;
      if (rise) begin
        if (!model && (cali || test)) starts++;
        model = cali || test;
      end
      check(inte == model, "inte");
    end
    check(starts > 0, "integration started");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
