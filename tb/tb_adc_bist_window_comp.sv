// tb_adc_bist_window_comp: sweeps the input of the window comparator across
// and beyond [V_il, V_ih] = [1 V, 4 V] and checks en_cnt (1 strictly n_inside
// the window) and the trimmed output v_ts.
module tb_adc_bist_window_comp;
  real v_out, v_il = 1.0, v_ih = 4.0, v_ts, v;
  logic en_cnt;
  int checks = 0, failures = 0, n_inside = 0;

  adc_bist_window_comp dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i <= 500; i++) begin
      v = -0.5 + i * 0.01234;
      v_out = v;
      #1;
      checks += 2;
      if (en_cnt != (v > 1.0 && v < 4.0)) begin failures++; $display("FAIL en at %f", v); end
      if (v_ts != ((v <= 1.0) ? 1.0 : (v >= 4.0) ? 4.0 : v)) begin
        failures++; $display("FAIL v_ts=%f at %f", v_ts, v);
      end
      n_inside += en_cnt;
    end
    checks++;
    if (n_inside == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
