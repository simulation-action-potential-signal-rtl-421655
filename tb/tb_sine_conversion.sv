// tb_sine_conversion: the sine-wave test of the converter, in hardware form.
// A sinusoid is the standard input for checking a sigma-delta converter. Here it is fed,
// as 10-bit samples, through the 1-bit modulator and the attenuator/RC filter model. The
// sine is centred at 512 with an amplitude of 500, and has 64 samples per period: 763 Hz at
// 48.828 kHz. One new sample comes every 1024 cycles of the 50 MHz clock, the rate of the
// action-potential generator. Over three periods the testbench checks, for every sample:
//   - the number of ones in its 1024-cycle period equals the sample value (+-4);
//   - the filter output at the end of the period is sample/1024 * 300 mV (+-1.5 mV).
// It also checks that the stream's total ones match the sum of the samples, and that the
// output covers the sine's swing: above 290 mV at the top and below 10 mV at the bottom.
module tb_sine_conversion;

  localparam int  DIV = 1024, PER = 64, PERIODS = 3;
  localparam real V_FS = 3.3e6 / 11.0;
  localparam real PI   = 3.14159265358979;

  logic               clk = 1'b0;
  logic               rst_n;
  logic [9:0]         sample;
  logic               bits;
  logic signed [31:0] vout_uv;
  int checks = 0, failures = 0;

  sigma_delta_modulator u_sdm (.clk, .rst_n, .sample, .bit_out(bits));
  lpf_attenuator        u_lpf (.clk, .rst_n, .din(bits), .vout_uv);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    automatic longint sum_x = 0, sum_ones = 0;
    automatic int vmax = 0, vmin = 1 << 30;
    sample = 10'd512;
    rst_n  = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (4 * DIV) @(posedge clk);  // settle at mid-scale
    for (int n = 0; n < PERIODS * PER; n++) begin
      automatic int x = int'($floor(512.0 + 500.0 * $sin(2.0 * PI * n / PER) + 0.5));
      automatic int ones = 0;
      @(negedge clk) sample = 10'(x);
      for (int c = 0; c < DIV; c++) begin
        @(posedge clk); #1;
        ones += int'(bits);
      end
      sum_x += longint'(x);
      sum_ones += longint'(ones);
      check(ones >= x - 4 && ones <= x + 4,
            $sformatf("sample %0d (x=%0d): %0d ones", n, x, ones));
      check(real'(vout_uv) > x * V_FS / DIV - 1500.0 && real'(vout_uv) < x * V_FS / DIV + 1500.0,
            $sformatf("sample %0d (x=%0d): output %0d uV", n, x, vout_uv));
      if (vout_uv > vmax) vmax = vout_uv;
      if (vout_uv < vmin) vmin = vout_uv;
    end
    check(sum_ones >= sum_x - 6 && sum_ones <= sum_x + 6,
          $sformatf("total ones %0d, sum of samples %0d", sum_ones, sum_x));
    check(vmax > 290000 && vmin < 10000, $sformatf("output swing %0d..%0d uV", vmin, vmax));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((PERIODS * PER + 10) * DIV) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
