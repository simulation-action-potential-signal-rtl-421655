// ap_generator: plays the stored action potential out at the sample rate, once per frame.
//
// A prescaler counts SAMPLE_DIV clock cycles per sample. With the 50 MHz board clock and
// SAMPLE_DIV = 1024, that gives the 48.828 kHz sample rate. At each sample tick a frame
// counter moves to the next sample slot. The first AP_SAMPLES slots of a frame read
// consecutive words of the waveform ROM: 32 words, 0.655 ms of signal. The remaining
// FRAME_SAMPLES - AP_SAMPLES slots give the resting level, 0, until the next action
// potential starts. The sample rate, the table length and the width follow the source
// design. The frame length, the rest level and the handshake are this design's choices.
// FRAME_SAMPLES = 512 repeats the action potential every 10.49 ms.
//
// Interface and timing: rom_addr/rom_data connect to a ROM with one cycle of read latency.
// The slot counter changes on the clock edge that ends the last prescaler cycle. The ROM
// word is read in the next cycle, and `sample` takes it one cycle after that. So `sample`
// changes two clock cycles after the slot counter, and then holds for SAMPLE_DIV cycles.
// `sample_stb` is high for one cycle when `sample` takes a new value. `ap_start` is high
// together with `sample_stb` for the first word of each action potential. After reset,
// sample is 0 and the first slot loads after two cycles.
module ap_generator
  import aps_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV    = CLK_PER_SAMPLE,      // clock cycles per sample (>= 3)
  parameter int unsigned AP_SAMPLES    = ROM_DEPTH,           // ROM words per action potential
  parameter int unsigned FRAME_SAMPLES = 512,                 // sample slots per repetition
  parameter int unsigned WIDTH         = SAMPLE_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // waveform ROM read port
  output logic [$clog2(AP_SAMPLES)-1:0] rom_addr,
  input  logic [WIDTH-1:0]              rom_data,
  // sample stream to the converter
  output logic [WIDTH-1:0]              sample,
  output logic                          sample_stb,
  output logic                          ap_start
);

  localparam int unsigned DIV_W  = $clog2(SAMPLE_DIV);
  localparam int unsigned SLOT_W = $clog2(FRAME_SAMPLES);

  logic [DIV_W-1:0]  div_cnt;
  logic [SLOT_W-1:0] slot;
  logic              tick;        // last cycle of a sample period
  logic              in_ap;       // current slot reads the ROM
  logic [1:0]        load_pipe;   // slot changed 1 / 2 cycles ago
  logic              in_ap_d;     // in_ap one cycle ago
  logic              first_d;     // slot 0 one cycle ago

  always_comb begin
    tick     = (div_cnt == DIV_W'(SAMPLE_DIV - 1));
    in_ap    = (slot < SLOT_W'(AP_SAMPLES));
    rom_addr = in_ap ? slot[$clog2(AP_SAMPLES)-1:0] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      slot    <= '0;
    end else begin
      div_cnt <= tick ? '0 : div_cnt + 1'b1;
      if (tick) slot <= (slot == SLOT_W'(FRAME_SAMPLES - 1)) ? '0 : slot + 1'b1;
    end
  end

  // A slot change at edge E puts the new address on the ROM. The ROM word is valid after
  // E+1, and `sample` takes it at E+2. in_ap_d and first_d then describe the new slot.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_pipe  <= 2'b01;        // slot 0 is current out of reset
      in_ap_d    <= 1'b0;
      first_d    <= 1'b0;
      sample     <= '0;
      sample_stb <= 1'b0;
      ap_start   <= 1'b0;
    end else begin
      load_pipe  <= {load_pipe[0], tick};
      in_ap_d    <= in_ap;
      first_d    <= (slot == '0);
      sample_stb <= load_pipe[1];
      ap_start   <= load_pipe[1] & first_d;
      if (load_pipe[1]) sample <= in_ap_d ? rom_data : '0;
      // ap_start only marks a sample update, never stands alone.
      a_start_with_stb: assert (!ap_start || sample_stb)
        else $error("ap_start without sample_stb");
    end
  end

endmodule
