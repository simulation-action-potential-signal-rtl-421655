// lpf_attenuator: behavioural model of the off-chip attenuator and RC low-pass filter.
// It stands for an analog circuit outside the FPGA. The model exists so that a simulation
// can show the voltage the board produces. It is written in integer arithmetic, so every
// tool that reads the design can elaborate it. It is not meant to be put in hardware.
//
// The circuit: the FPGA pin drives a 10 kOhm series attenuator into a 1.0 kOhm resistor to
// ground, in parallel with a 4.7 nF capacitor. The node across the capacitor is the analog
// output. Seen from the capacitor, this is a source of vin * R_SHUNT / (R_ATT + R_SHUNT)
// behind R_ATT || R_SHUNT (909 Ohm). The time constant is then 909 Ohm * 4.7 nF = 4.27 us:
// about 214 cycles of the 50 MHz clock, and a fifth of the 20.48 us sample period.
// The component values are the source design's. The pin's high level (VOH = 3.3 V) and the
// output-pin model (an ideal source of 0 V or VOH) are assumptions of this model.
//
// Timing: at each rising edge of `clk` the model advances the capacitor voltage by one
// clock period T:  v <= v + (v_source - v) * T / tau. This is the forward-Euler step of
// the RC equation, with T / tau held as a 24-bit fraction. With T = 20 ns and tau = 4.27 us
// it differs from the exact exponential step by 0.2 %. The state is kept in nanovolts.
// `vout_uv` is the output in microvolts.
module lpf_attenuator #(
  parameter longint unsigned CLK_PERIOD_PS = 20_000,     // clock period, picoseconds
  parameter longint unsigned VOH_UV        = 3_300_000,  // output-pin high level, microvolts
  parameter longint unsigned R_ATT_OHM     = 10_000,     // series attenuator
  parameter longint unsigned R_SHUNT_OHM   = 1_000,      // resistor across the capacitor
  parameter longint unsigned C_FILT_PF     = 4_700       // filter capacitor, picofarads
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               din,      // 1-bit stream from the FPGA pin
  output logic signed [31:0] vout_uv   // filtered analog output, microvolts
);

  localparam longint unsigned R_TH_OHM = R_ATT_OHM * R_SHUNT_OHM / (R_ATT_OHM + R_SHUNT_OHM);
  localparam longint unsigned TAU_PS   = R_TH_OHM * C_FILT_PF;          // ohm * pF = ps
  localparam longint          ALPHA_Q24 = longint'((CLK_PERIOD_PS << 24) / TAU_PS);
  localparam longint          V_SRC_NV  = longint'(VOH_UV * 1000 * R_SHUNT_OHM
                                                   / (R_ATT_OHM + R_SHUNT_OHM));

  longint v_nv;     // capacitor voltage, nanovolts
  longint v_src_nv; // Thevenin source voltage the capacitor sees

  always_comb v_src_nv = din ? V_SRC_NV : 64'sd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_nv <= 64'sd0;
    else        v_nv <= v_nv + (((v_src_nv - v_nv) * ALPHA_Q24) >>> 24);
  end

  always_comb vout_uv = 32'(v_nv / 64'sd1000);

endmodule
