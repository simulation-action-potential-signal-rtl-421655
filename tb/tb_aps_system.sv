// tb_aps_system: end-to-end test of the action-potential generator at its default sizes.
// It runs two full frames (2 x 512 samples x 1024 cycles, about 21 ms of 50 MHz time) and
// checks each step of the chain against values worked out here:
//   - sample timing: one new sample every 1024 cycles (48.828 kHz), and one action
//     potential every 512 samples;
//   - sample values: slot k of a frame carries word k of the 32-word table, and the
//     remaining slots carry the rest level 0;
//   - the 1-bit stream: the ones counted over each sample period equal the sample value
//     (+-4: the stream lags `sample` by two cycles and the loop carries over +-2);
//   - the analog output: at the end of each sample period the filtered voltage is
//     sample/1024 * 300 mV, and the largest value of an action potential is close to
//     307/1024 * 300 mV = 89.9 mV.
// Each mechanism must happen at least once: sample updates, ROM playback, rest-level
// samples, a new frame after the last slot, and a non-empty bit stream.
module tb_aps_system;

  localparam int DIV = 1024, FRAME = 512, AP_LEN = 32;
  localparam real V_FS = 3.3e6 / 11.0;  // microvolts at a density of 1
  localparam logic [9:0] EXPECTED [AP_LEN] = '{
    'h000, 'h0B7, 'h112, 'h133, 'h132, 'h11E, 'h101, 'h0E0,
    'h0C0, 'h0A1, 'h086, 'h06E, 'h05A, 'h049, 'h03B, 'h02F,
    'h026, 'h01E, 'h018, 'h013, 'h00F, 'h00C, 'h009, 'h007,
    'h006, 'h004, 'h003, 'h003, 'h002, 'h002, 'h001, 'h001
  };

  logic               clk = 1'b0;
  logic               rst_n;
  logic               bit_stream;
  logic signed [31:0] analog_out_uv;
  logic [9:0]         sample;
  logic               sample_stb, ap_start;
  int checks = 0, failures = 0;

  // mechanisms
  int n_samples = 0, n_rom_samples = 0, n_rest_samples = 0, n_frames = 0, n_ones = 0;

  aps_system dut (.clk, .rst_n, .bit_stream, .analog_out_uv, .sample, .sample_stb, .ap_start);

  always #10 clk = ~clk;  // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    automatic int   cyc = 0, last_stb = -1, last_start = -1, slot = -1, ones = 0;
    automatic logic [9:0] cur = '0;
    automatic int   peak = 0;
    automatic bit   have_sample = 0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (n_frames < 3) begin
      @(posedge clk); #1;
      cyc++;
      ones += int'(bit_stream);
      n_ones += int'(bit_stream);
      if (analog_out_uv > peak) peak = analog_out_uv;
      if (sample_stb) begin
        // Close the period of the previous sample.
        if (have_sample) begin
          check(ones >= int'(cur) - 4 && ones <= int'(cur) + 4,
                $sformatf("slot %0d: %0d ones for sample %0d", slot, ones, cur));
          check(real'(analog_out_uv) > real'(cur) / DIV * V_FS - 5000.0 &&
                real'(analog_out_uv) < real'(cur) / DIV * V_FS + 5000.0,
                $sformatf("slot %0d: analog %0d uV for sample %0d", slot, analog_out_uv, cur));
          check(cyc - last_stb == DIV, $sformatf("sample period %0d cycles", cyc - last_stb));
        end
        if (ap_start) begin
          if (last_start >= 0) begin
            check(cyc - last_start == DIV * FRAME,
                  $sformatf("frame period %0d cycles", cyc - last_start));
            check(slot == FRAME - 1, $sformatf("frame wrapped after slot %0d", slot));
            check(peak > 85000 && peak < 92000, $sformatf("peak %0d uV", peak));
          end
          last_start = cyc;
          n_frames++;
          slot = 0;
          peak = 0;
        end else begin
          slot++;
        end
        check(slot >= 0, "samples before the first action potential");
        if (slot < AP_LEN) begin
          check(sample == EXPECTED[slot],
                $sformatf("slot %0d: sample %h expected %h", slot, sample, EXPECTED[slot]));
          n_rom_samples++;
        end else begin
          check(sample == '0, $sformatf("slot %0d: rest sample %h", slot, sample));
          n_rest_samples++;
        end
        n_samples++;
        cur = sample;
        have_sample = 1;
        last_stb = cyc;
        ones = 0;
      end
    end
    check(n_samples > 0,      "no sample updates");
    check(n_rom_samples > 0,  "no samples played from the table");
    check(n_rest_samples > 0, "no rest-level samples");
    check(n_frames >= 2,      "no new frame after the last slot");
    check(n_ones > 0,         "empty bit stream");
    $display("mechanisms: samples=%0d table=%0d rest=%0d frames=%0d ones=%0d",
             n_samples, n_rom_samples, n_rest_samples, n_frames, n_ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * DIV * FRAME + 10 * DIV) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
