// tb_ap_generator: checks the sample timing and the frame sequence of the AP generator.
// Two instances run side by side. One uses small sizes: 8 cycles per sample, 40 slots per
// frame, 32 ROM words. The other uses the defaults: 1024 cycles per sample (48.828 kHz at
// 50 MHz) and 512 slots. Each reads from its own ROM model, which returns the word
// 3*addr + 5 one cycle after the address. For every new sample the testbench checks:
//   - the spacing of sample strobes, SAMPLE_DIV cycles;
//   - the value: the ROM word of the slot for the first 32 slots, 0 for the rest;
//   - ap_start, which must be high exactly on slot 0;
//   - that `sample` holds its value between strobes.
// It also checks the first strobe, two cycles after reset, and the frame period.
module tb_ap_generator;

  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;  // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- small instance ----------------
  localparam int S_DIV = 8, S_FRAME = 40;
  logic [4:0] s_addr;
  logic [9:0] s_rom, s_sample;
  logic       s_stb, s_start;

  ap_generator #(.SAMPLE_DIV(S_DIV), .AP_SAMPLES(32), .FRAME_SAMPLES(S_FRAME), .WIDTH(10))
    dut_s (.clk, .rst_n, .rom_addr(s_addr), .rom_data(s_rom),
           .sample(s_sample), .sample_stb(s_stb), .ap_start(s_start));
  always_ff @(posedge clk) s_rom <= 10'(3 * s_addr + 5);

  // ---------------- default instance ----------------
  localparam int D_DIV = 1024, D_FRAME = 512;
  logic [4:0] d_addr;
  logic [9:0] d_rom, d_sample;
  logic       d_stb, d_start;

  ap_generator dut_d (.clk, .rst_n, .rom_addr(d_addr), .rom_data(d_rom),
                      .sample(d_sample), .sample_stb(d_stb), .ap_start(d_start));
  always_ff @(posedge clk) d_rom <= 10'(3 * d_addr + 5);

  // Scoreboard for one instance.
  task automatic monitor(input int div, input int frame, input int frames_to_see,
                         ref logic stb, ref logic start, ref logic [9:0] smp,
                         input string tag);
    int cyc = 0, last_stb = -1, slot = 0, first_start = -1, starts = 0;
    logic [9:0] held;
    while (starts <= frames_to_see) begin
      @(posedge clk); #1;
      cyc++;
      if (stb) begin
        logic [9:0] exp_v;
        if (last_stb < 0)
          check(cyc == 2, $sformatf("%s first strobe at cycle %0d, expected 2", tag, cyc));
        else
          check(cyc - last_stb == div,
                $sformatf("%s strobe spacing %0d, expected %0d", tag, cyc - last_stb, div));
        last_stb = cyc;
        exp_v = (slot < 32) ? 10'(3 * slot + 5) : 10'd0;
        check(smp == exp_v, $sformatf("%s slot %0d sample %0d expected %0d", tag, slot, smp, exp_v));
        check(start == (slot == 0), $sformatf("%s ap_start=%0d at slot %0d", tag, start, slot));
        if (start) begin
          if (first_start >= 0)
            check(cyc - first_start == starts * div * frame,
                  $sformatf("%s frame %0d started at cycle %0d", tag, starts, cyc));
          else first_start = cyc;
          starts++;
        end
        held = smp;
        slot = (slot + 1) % frame;
      end else if (last_stb >= 0) begin
        check(smp == held, $sformatf("%s sample changed between strobes", tag));
        check(!start, $sformatf("%s ap_start without strobe", tag));
      end
    end
  endtask

  initial begin
    rst_n = 1'b0;
    #25 rst_n = 1'b1;
    @(negedge clk);
    // Reset was released before the edge that counts as cycle 1.
  end

  initial begin
    @(posedge rst_n);
    fork
      monitor(S_DIV, S_FRAME, 3, s_stb, s_start, s_sample, "small");
      monitor(D_DIV, D_FRAME, 1, d_stb, d_start, d_sample, "default");
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * D_DIV * D_FRAME) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
