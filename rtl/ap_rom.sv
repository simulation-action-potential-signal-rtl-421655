// ap_rom: the 32 x 10-bit waveform memory of the action-potential generator.
//
// A read-only table with one registered read port. The word at `addr` appears on `data`
// on the clock edge after `addr` is presented (one cycle of latency). Without a clock the
// output would change as soon as the address does; the register matches how an FPGA block
// or distributed ROM is normally read. The depth, the width and the default contents (the
// source design's 32 samples) follow the source. CONTENTS is a parameter, so a different
// waveform, for example one computed from other A, B and n of A*t^n*exp(-B*t), can be
// loaded without editing this file. The registered read and the reset-free output
// register are this design's own choices.
module ap_rom
  import aps_pkg::*;
#(
  parameter int unsigned DEPTH = ROM_DEPTH,
  parameter int unsigned WIDTH = SAMPLE_W,
  parameter logic [WIDTH-1:0] CONTENTS [DEPTH] = AP_TABLE
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [WIDTH-1:0]         data
);

  always_ff @(posedge clk) data <= CONTENTS[addr];

endmodule
