// tb_adc_bist_tran_counter: checks the transition counter at its default
// size (11 bits). A healthy ramp gives 2^10 rising edges of D0, after which
// ctn must be 1; with one edge fewer it must still be 0. Falling edges and
// ticks without tran_pulse must not count.
module tb_adc_bist_tran_counter;
  localparam int N = 11;
  logic clk = 1'b0, rst = 1'b1, tran_pulse = 1'b0, d0 = 1'b0, ctn;
  logic [N-1:0] count;
  int checks = 0, failures = 0, model = 0;

  adc_bist_tran_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(bit t, bit v);
    @(negedge clk);
    tran_pulse = t; d0 = v;
    @(posedge clk); #1;
    if (t && v) model++;
    checks++;
    if (count != N'(model) || ctn != model[N-1]) begin
      failures++;
      $display("FAIL count=%0d model=%0d ctn=%0b", count, model, ctn);
    end
  endtask

  // one ramp: every code transition toggles D0; `rises` rising edges
  task automatic ramp(int rises);
    for (int i = 0; i < rises; i++) begin
      step(1, 1); step(0, 1); step(1, 0); step(0, 0);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    ramp((1 << (N - 1)) - 1);
    checks++; if (ctn != 1'b0) begin failures++; $display("FAIL ctn early"); end
    ramp(1);
    checks++; if (ctn != 1'b1) begin failures++; $display("FAIL ctn not set"); end
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0; model = 0;
    checks++; if (count != '0) failures++;
    repeat (500) step(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
