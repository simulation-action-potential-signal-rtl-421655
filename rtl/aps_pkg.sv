// aps_pkg: constants and types shared by the action-potential signal generator.
//
// The generator plays one action potential (AP) out of a 32-word, 10-bit table. It reads
// one word every 1024 cycles of the 50 MHz board clock, which gives 48.828 kHz. A first-order
// 1-bit sigma-delta loop turns each word into a pulse-density stream. The table size, the
// sample width, the clock and the sample rate follow the source design. The divide ratio of
// 1024 is derived here: it is 50 MHz divided by 48.828 kHz.
// AP_TABLE holds the waveform samples on a scale where 1023 means full scale. The values
// are those of the source design's memory image. They follow the action-potential model
// v(t) = A * t^n * exp(-B*t) with n = 1. Word k is
//     AP_TABLE[k] = round(244.4 * k * exp(-0.2902 * k)),   k = 0..31,
// which matches all 32 words exactly: a rise to the peak of 307 at k = 3, then an
// exponential decay to 1. The product B*Ts = 0.29 puts the peak near k = 1/(B*Ts) = 3.4.
package aps_pkg;

  localparam int unsigned SAMPLE_W   = 10;          // bits per sample
  localparam int unsigned ROM_DEPTH  = 32;          // samples per action potential
  localparam int unsigned ADDR_W     = $clog2(ROM_DEPTH);
  localparam int unsigned CLK_HZ     = 50_000_000;  // on-board clock
  localparam int unsigned SAMPLE_HZ  = 48_828;      // sample rate of the waveform
  // clock cycles per sample, rounded: 50 MHz / 48.828 kHz = 1024
  localparam int unsigned CLK_PER_SAMPLE = (CLK_HZ + SAMPLE_HZ / 2) / SAMPLE_HZ;

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef sample_t             ap_table_t [ROM_DEPTH];

  localparam ap_table_t AP_TABLE = '{
    10'h000, 10'h0B7, 10'h112, 10'h133, 10'h132, 10'h11E, 10'h101, 10'h0E0,
    10'h0C0, 10'h0A1, 10'h086, 10'h06E, 10'h05A, 10'h049, 10'h03B, 10'h02F,
    10'h026, 10'h01E, 10'h018, 10'h013, 10'h00F, 10'h00C, 10'h009, 10'h007,
    10'h006, 10'h004, 10'h003, 10'h003, 10'h002, 10'h002, 10'h001, 10'h001
  };

endpackage
