// tb_adc_bist_ref_counter: checks the reference counter at its default size
// (12 bits): preset to 2 by reset, one step per counter clock rising edge
// while en_cnt is 1, no step otherwise, and wrap-around modulo 2^12 back to
// 2 after a full ramp of 4096 steps.
module tb_adc_bist_ref_counter;
  localparam int N = 11;
  logic clk = 1'b0, rst = 1'b1, rise = 1'b0, en_cnt = 1'b0;
  logic [N:0] c;
  int checks = 0, failures = 0, model, steps = 0;

  adc_bist_ref_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: c=%0d model=%0d", what, c, model); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 check(c == 2, "preset");
    rst = 1'b0;
    model = 2;
    // random strobes
    repeat (2000) begin
      @(negedge clk);
      rise = 1'($urandom_range(0, 1)); en_cnt = 1'($urandom_range(0, 1));
      @(posedge clk); #1;
      if (rise && en_cnt) model = (model + 1) % (1 << (N + 1));
      check(c == (N+1)'(model), "random step");
    end
    // a full ramp: 2^(N+1) rising edges with en_cnt high, every other tick
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    en_cnt = 1'b1;
    for (int i = 0; i < 2 * (1 << (N + 1)); i++) begin
      @(negedge clk);
      rise = (i % 2 == 1);
      @(posedge clk); #1;
      if (rise) steps++;
      if (steps == 1 && rise) check(c == 3, "first step 2 -> 3");
    end
    en_cnt = 1'b0; rise = 1'b0;
    @(posedge clk); #1;
    model = 2;
    check(steps == (1 << (N + 1)), "ramp length");
    check(c == 2, "back at preset after 2^(n+1) steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
