// tb_adc_bist_integrator: checks the integrator model. With Init closed the
// output equals V_init; with Inte closed it rises by g_m * V_gm * T / C_out
// per tick, so a V_gm set by V_gm = C_out * dV / (g_m * T_total) sweeps dV
// in T_total; with both open it holds.
module tb_adc_bist_integrator;
  localparam real GM = 1.0e-6, COUT = 3.0e-12, T_TICK = 0.5e-6;
  logic clk = 1'b0, inte = 1'b0, init = 1'b1;
  real v_gm_p, v_gm_n = 0.0, v_init = -0.25, v_out, v0;
  int checks = 0, failures = 0;

  adc_bist_integrator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(real a, real b);
    return (a - b < 1.0e-9) && (b - a < 1.0e-9);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: v_out=%f", what, v_out); end
  endtask

  initial begin
    // 5 V in 2^12 counter periods of 1 us = 8192 ticks of 0.5 us
    v_gm_p = COUT * 5.0 / (GM * 4096.0e-6);
    repeat (2) @(posedge clk); #1;
    check(near(v_out, -0.25), "init");
    @(negedge clk); init = 1'b0; inte = 1'b1;
    for (int i = 1; i <= 8192; i++) begin
      @(posedge clk); #1;
      if (i % 512 == 0) check(near(v_out, -0.25 + 5.0 * i / 8192.0), $sformatf("ramp tick %0d", i));
    end
    @(negedge clk); inte = 1'b0;
    v0 = v_out;
    repeat (10) @(posedge clk); #1;
    check(near(v_out, v0), "hold");
    check(near(v_out, 4.75), "full swing");
    // reversed V_gm ramps down
    @(negedge clk); inte = 1'b1; v_gm_n = 2.0 * v_gm_p;
    repeat (4) @(posedge clk); #1;
    check(near(v_out, v0 - 4.0 * 5.0 / 8192.0), "negative slope");
    @(negedge clk); init = 1'b1; v_init = 1.0;
    @(posedge clk); #1;
    check(near(v_out, 1.0), "re-init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
