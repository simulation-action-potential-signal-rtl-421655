// aps_system: action-potential signal generator with a 1-bit sigma-delta output.
//
// The whole signal chain, from the stored waveform to the analog voltage:
//   ap_generator + ap_rom    play 32 ten-bit samples of one action potential at 48.828 kHz,
//                            followed by rest-level samples up to the end of the frame;
//   sigma_delta_modulator    turns each sample into a 1-bit pulse-density stream at the full
//                            50 MHz clock rate, 1024 bits per sample;
//   bit_stream               the FPGA output pin that carries the stream off chip;
//   lpf_attenuator           model of the external 10k / 1k / 4.7 nF network that smooths
//                            the stream back into a voltage (analog_out_uv).
// The chain, its sizes and its rates follow the source design. Its block diagram also
// shows a USB interface to a PC, which is not described further and is not part of this
// RTL. The frame length (SAMPLE_DIV * FRAME_SAMPLES clock cycles, 10.49 ms by default) is
// this design's choice.
//
// Interface: clk is the 50 MHz board clock and rst_n an asynchronous active-low reset.
// `sample`, `sample_stb` and `ap_start` expose the converter input for observation. They
// are timed as described in ap_generator: `sample` changes once every SAMPLE_DIV cycles.
// `bit_stream` follows `sample` two clock edges later.
module aps_system
  import aps_pkg::*;
#(
  parameter int unsigned SAMPLE_DIV    = CLK_PER_SAMPLE,  // clock cycles per sample
  parameter int unsigned FRAME_SAMPLES = 512              // sample slots per action potential
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               bit_stream,     // 1-bit output port to the low-pass filter
  output logic signed [31:0] analog_out_uv,  // filter output, microvolts (model)
  output sample_t            sample,         // sample currently being converted
  output logic               sample_stb,     // sample just changed
  output logic               ap_start        // first sample of an action potential
);

  logic [ADDR_W-1:0] rom_addr;
  sample_t           rom_data;

  ap_generator #(
    .SAMPLE_DIV   (SAMPLE_DIV),
    .AP_SAMPLES   (ROM_DEPTH),
    .FRAME_SAMPLES(FRAME_SAMPLES),
    .WIDTH        (SAMPLE_W)
  ) u_gen (
    .clk, .rst_n,
    .rom_addr, .rom_data,
    .sample, .sample_stb, .ap_start
  );

  ap_rom #(
    .DEPTH   (ROM_DEPTH),
    .WIDTH   (SAMPLE_W),
    .CONTENTS(AP_TABLE)
  ) u_rom (
    .clk,
    .addr(rom_addr),
    .data(rom_data)
  );

  sigma_delta_modulator #(
    .WIDTH(SAMPLE_W)
  ) u_sdm (
    .clk, .rst_n,
    .sample,
    .bit_out(bit_stream)
  );

  lpf_attenuator u_lpf (
    .clk, .rst_n,
    .din    (bit_stream),
    .vout_uv(analog_out_uv)
  );

endmodule
