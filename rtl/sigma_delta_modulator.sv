// sigma_delta_modulator: first-order, 1-bit sigma-delta modulator.
//
// It turns a WIDTH-bit unsigned sample x into a stream of single bits. Over any long
// stretch, the fraction of ones equals x / 2^WIDTH. The loop has the classic parts of a
// first-order converter, each written as digital logic:
//   summer      diff  = x - dac        (the input minus the fed-back bit)
//   integrator  integ <= integ + diff  (an accumulator register)
//   comparator  integ > 0
//   D flip-flop bit_out <= comparator  (the clocked output bit)
//   1-bit DAC   dac   = bit_out ? 2^WIDTH : 0
// A 1 fed back subtracts full scale from the integrator, and a 0 subtracts nothing. The
// integrator therefore stays bounded and its average input is zero, which forces the
// density of ones to equal x / 2^WIDTH. The source design gives this structure: a summer,
// an integrator, a comparator, a D flip-flop and a 1-bit DAC in the feedback path, with
// 10-bit resolution, run from the 50 MHz clock. At that rate a 10-bit sample held for 1024
// cycles (one 48.828 kHz sample period) is resolved to one part in 1024. The digital
// form, the comparator threshold of zero, the integrator width and the reset to zero are
// this design's choices.
//
// Interface and timing: `sample` is read every clock cycle. `bit_out` is the flip-flop
// output, and the feedback uses it. A change of `sample` first affects `bit_out` two
// edges later: one for the integrator and one for the flip-flop. Reset clears the
// integrator and the output bit.
module sigma_delta_modulator #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] sample,
  output logic             bit_out
);

  // The integrator stays within (-2^(WIDTH+1), 2^(WIDTH+1)]. Two bits above the sample
  // width cover that range, and the sign bit makes three.
  localparam int unsigned INT_W = WIDTH + 3;
  localparam logic signed [INT_W-1:0] FULL_SCALE = INT_W'(1) <<< WIDTH;
  localparam logic signed [INT_W-1:0] INT_LIMIT  = INT_W'(1) <<< (WIDTH + 1);

  logic signed [INT_W-1:0] dac;     // 1-bit DAC output
  logic signed [INT_W-1:0] diff;    // summer output
  logic signed [INT_W-1:0] integ;   // integrator state
  logic                    cmp;     // comparator output

  always_comb begin
    dac  = bit_out ? FULL_SCALE : '0;
    diff = $signed({3'b000, sample}) - dac;
    cmp  = (integ > 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ   <= '0;
      bit_out <= 1'b0;
    end else begin
      integ   <= integ + diff;
      bit_out <= cmp;
      // The loop must keep the integrator inside its range, or the density is wrong.
      a_integ_bounded: assert ((integ <= INT_LIMIT) && (integ > -INT_LIMIT))
        else $error("sigma-delta integrator out of range: %0d", integ);
    end
  end

endmodule
