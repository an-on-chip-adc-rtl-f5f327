// tb_adc_bist_inl_detector: checks the INL detector at its default size
// (11-bit code, 12-bit counter). It first plays the paper's 2-bit
// example in 11-bit form (each transition into code k accepted at counter
// 2k and 2k+1, rejected at 2k-1 and 2k+2), then random codes and counter
// values; ri must follow (d == c[n:1]) at each tran_pulse and hold
// otherwise, and read 1 after reset.
module tb_adc_bist_inl_detector;
  localparam int N = 11;
  logic clk = 1'b0, rst = 1'b1, tran_pulse = 1'b0, ri;
  logic [N-1:0] d = '0;
  logic [N:0]   c = '0;
  int checks = 0, failures = 0, model = 1, accepts = 0, rejects = 0;

  adc_bist_inl_detector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int code, int cnt, bit t);
    @(negedge clk);
    d = N'(code); c = (N+1)'(cnt); tran_pulse = t;
    @(posedge clk); #1;
    if (t) model = int'((cnt >> 1) == code);
    if (t && model == 1) accepts++;
    if (t && model == 0) rejects++;
    checks++;
    if (ri != model[0]) begin
      failures++;
      $display("FAIL code=%0d c=%0d t=%0b ri=%0b exp=%0d", code, cnt, t, ri, model);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++; if (ri != 1'b1) failures++;
    rst = 1'b0;
    for (int k = 1; k < 4; k++) begin
      apply(k, 2 * k, 1);       // first counter value of the window
      apply(k, 2 * k + 1, 1);   // second
      apply(k, 2 * k - 1, 1);   // 1/2 LSB early
      apply(k, 2 * k + 2, 1);   // 1/2 LSB late
      apply(k, 2 * k + 2, 0);   // no transition: ri holds
    end
    repeat (3000) begin
      int code;
      code = $urandom_range(0, (1 << N) - 1);
      if (1'($urandom_range(0, 1))) apply(code, 2 * code + 1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
      else                      apply(code, $urandom_range(0, (1 << (N + 1)) - 1), 1'($urandom_range(0, 1)));
    end
    checks++;
    if (accepts == 0 || rejects == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
