// tb_adc_bist_dmux: checks at the default size (11-bit code) that dout is
// the ADC code with cali = 0 and the low 11 counter bits with cali = 1.
module tb_adc_bist_dmux;
  localparam int N = 11;
  logic cali = 1'b0;
  logic [N-1:0] d, dout;
  logic [N:0]   c;
  int checks = 0, failures = 0;

  adc_bist_dmux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      d = N'($urandom); c = (N+1)'($urandom); cali = 1'(i % 2);
      #1;
      checks++;
      if (dout != (cali ? c[N-1:0] : d)) begin failures++; $display("FAIL cali=%0b", cali); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
