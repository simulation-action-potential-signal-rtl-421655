// tb_sigma_delta_modulator: checks the density of ones in the 10-bit sigma-delta stream.
// For a sample x held steady, a first-order loop with a bounded integrator emits ones at
// the rate x / 1024. Any window of 1024 clock cycles then holds x ones, to within the
// integrator's span: +-2 once the loop has settled. The testbench holds a list of values
// for several sample periods each: both ends of the range, the action-potential peak and
// random values. It counts the ones in each 1024-cycle window after the first one and
// compares the count with x. It also checks the total over a long run of each value
// (+-3 over 8 windows), and the rest state: for x = 0 the stream must be all zeros.
module tb_sigma_delta_modulator;

  localparam int W = 10;
  localparam int FS = 1 << W;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [W-1:0] sample;
  logic         bit_out;
  int checks = 0, failures = 0;

  sigma_delta_modulator #(.WIDTH(W)) dut (.clk, .rst_n, .sample, .bit_out);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic run_value(input int x);
    int total = 0;
    @(negedge clk) sample = W'(x);
    // Let the loop settle for one period.
    repeat (FS) @(posedge clk);
    for (int w = 0; w < 8; w++) begin
      int ones = 0;
      repeat (FS) begin
        @(posedge clk); #1;
        ones += int'(bit_out);
      end
      total += ones;
      check(ones >= x - 2 && ones <= x + 2,
            $sformatf("x=%0d window %0d: %0d ones", x, w, ones));
    end
    check(total >= 8 * x - 3 && total <= 8 * x + 3,
          $sformatf("x=%0d: %0d ones in 8 windows, expected %0d", x, total, 8 * x));
  endtask

  initial begin
    int vals[$] = '{0, 1, 2, 307, 512, 1000, 1022, 1023, 0, 183, 17};
    sample = '0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(bit_out == 1'b0, "bit_out not cleared by reset");
    @(negedge clk) rst_n = 1'b1;
    // Rest level: sample 0 from reset gives no ones at all.
    repeat (2 * FS) begin
      @(posedge clk); #1;
      check(bit_out == 1'b0, "one in the stream for sample 0 after reset");
    end
    foreach (vals[i]) run_value(vals[i]);
    repeat (20) run_value($urandom_range(0, FS - 1));
    // Latency: from reset with a full-scale input, the first one leaves on the second edge
    // (integrator, then flip-flop).
    @(negedge clk) rst_n = 1'b0;
    sample = W'(FS - 1);
    @(negedge clk) rst_n = 1'b1;
    @(posedge clk); #1;
    check(bit_out == 1'b0, "one after the first edge");
    @(posedge clk); #1;
    check(bit_out == 1'b1, "no one after the second edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500 * FS) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
