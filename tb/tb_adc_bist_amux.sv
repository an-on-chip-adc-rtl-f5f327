// tb_adc_bist_amux: checks that the ADC input is V_Ain with test = 0 and
// V_ts with test = 1.
module tb_adc_bist_amux;
  logic test = 1'b0;
  real v_ain, v_ts, v_adc;
  int checks = 0, failures = 0;

  adc_bist_amux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      v_ain = $urandom_range(0, 5000) / 1000.0;
      v_ts  = $urandom_range(0, 5000) / 1000.0 + 0.0005;
      test  = 1'(i % 2);
      #1;
      checks++;
      if (v_adc != (test ? v_ts : v_ain)) begin failures++; $display("FAIL test=%0b", test); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
