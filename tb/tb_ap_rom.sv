// tb_ap_rom: checks every word of the waveform ROM and its one-cycle read latency.
// The expected words are the 32 samples of the action-potential table, written out here
// on their own. The address walks forward, then backward, then in a random order. Each
// read is checked one clock after its address is applied, and must not be visible earlier.
module tb_ap_rom;

  localparam logic [9:0] EXPECTED [32] = '{
    'h000, 'h0B7, 'h112, 'h133, 'h132, 'h11E, 'h101, 'h0E0,
    'h0C0, 'h0A1, 'h086, 'h06E, 'h05A, 'h049, 'h03B, 'h02F,
    'h026, 'h01E, 'h018, 'h013, 'h00F, 'h00C, 'h009, 'h007,
    'h006, 'h004, 'h003, 'h003, 'h002, 'h002, 'h001, 'h001
  };

  logic       clk = 1'b0;
  logic [4:0] addr;
  logic [9:0] data;
  int checks = 0, failures = 0;

  ap_rom dut (.clk, .addr, .data);

  always #5 clk = ~clk;

  task automatic read_check(input logic [4:0] a);
    @(negedge clk) addr = a;
    @(posedge clk); #1;
    checks++;
    if (data !== EXPECTED[a]) begin
      failures++;
      $display("FAIL addr %0d: got %h expected %h", a, data, EXPECTED[a]);
    end
  endtask

  initial begin
    addr = '0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 32; i++) read_check(5'(i));
    for (int i = 31; i >= 0; i--) read_check(5'(i));
    repeat (200) read_check(5'($urandom_range(0, 31)));
    // Latency: change the address and look before and after the next edge.
    @(negedge clk) addr = 5'd3;
    @(posedge clk); #1;
    @(negedge clk) addr = 5'd0;
    #1;
    checks++;
    if (data !== EXPECTED[3]) begin
      failures++;
      $display("FAIL latency: output changed before the clock edge");
    end
    @(posedge clk); #1;
    checks++;
    if (data !== EXPECTED[0]) begin
      failures++;
      $display("FAIL latency: output did not change at the clock edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
