// tb_lpf_attenuator: checks the model of the attenuator and RC filter against the circuit.
// The reference values come from the circuit equations, worked out here in floating point.
// The divider gain is R_SHUNT / (R_ATT + R_SHUNT) = 1/11, so the settled level is
// 3.3 V / 11 = 300 mV. The time constant is (R_ATT || R_SHUNT) * C = 4.2727 us. Checks:
//   - charging from 0 after a step of din to 1 follows 300 mV * (1 - exp(-t/tau));
//   - discharging after din returns to 0 follows exp(-t/tau);
//   - a pulse-density input of ones-fraction d settles at d * 300 mV.
// The allowed error is 1 % of full scale plus the ripple of the pulse pattern.
module tb_lpf_attenuator;

  localparam real T_CLK = 20.0e-9;
  localparam real TAU   = (10.0e3 * 1.0e3 / 11.0e3) * 4.7e-9;
  localparam real V_FS  = 3.3e6 / 11.0;   // microvolts

  logic              clk = 1'b0;
  logic              rst_n;
  logic              din;
  logic signed [31:0] vout_uv;
  int checks = 0, failures = 0;

  lpf_attenuator dut (.clk, .rst_n, .din, .vout_uv);

  always #10 clk = ~clk;

  task automatic check_near(input real got, input real expected, input real tol,
                            input string what);
    checks++;
    if (got > expected + tol || got < expected - tol) begin
      failures++;
      $display("FAIL %s: got %0.0f uV, expected %0.0f +- %0.0f", what, got, expected, tol);
    end
  endtask

  task automatic run_pattern(input int ones, input int period, input int cycles);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk) din = ((c % period) < ones);
    end
  endtask

  initial begin
    din   = 1'b0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 check_near(real'(vout_uv), 0.0, 1.0, "reset level");
    @(negedge clk) rst_n = 1'b1;
    // Charging.
    din = 1'b1;
    for (int n = 1; n <= 2000; n++) begin
      @(posedge clk); #1;
      if (n inside {50, 107, 214, 428, 642, 1070, 2000})
        check_near(real'(vout_uv), V_FS * (1.0 - $exp(-n * T_CLK / TAU)), 0.01 * V_FS,
                   $sformatf("charge after %0d cycles", n));
    end
    // Discharging from the settled level.
    @(negedge clk) din = 1'b0;
    for (int n = 1; n <= 2000; n++) begin
      @(posedge clk); #1;
      if (n inside {50, 214, 642, 2000})
        check_near(real'(vout_uv), V_FS * $exp(-(n - 0.5) * T_CLK / TAU), 0.01 * V_FS,
                   $sformatf("discharge after %0d cycles", n));
    end
    // Pulse-density inputs.
    begin
      automatic int pats[4][2] = '{'{1, 2}, '{1, 4}, '{3, 10}, '{307, 1024}};
      foreach (pats[i]) begin
        real d, ripple;
        d = real'(pats[i][0]) / real'(pats[i][1]);
        // Peak-to-peak ripple is at most one burst of ones, or one gap, into the RC.
        ripple = V_FS * (1.0 - $exp(-(pats[i][1] - pats[i][0] < pats[i][0] ?
                                      pats[i][1] - pats[i][0] : pats[i][0]) * T_CLK / TAU));
        run_pattern(pats[i][0], pats[i][1], (20 * 214 / pats[i][1] + 1) * pats[i][1]);
        for (int k = 0; k < 4; k++) begin
          automatic real acc = 0.0;
          for (int c = 0; c < pats[i][1]; c++) begin
            @(negedge clk) din = (c < pats[i][0]);
            @(posedge clk); #1;
            acc += real'(vout_uv);
          end
          check_near(acc / pats[i][1], d * V_FS, 0.01 * V_FS,
                     $sformatf("mean for density %0d/%0d", pats[i][0], pats[i][1]));
          check_near(real'(vout_uv), d * V_FS, 0.01 * V_FS + ripple,
                     $sformatf("level for density %0d/%0d", pats[i][0], pats[i][1]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
