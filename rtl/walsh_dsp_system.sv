// walsh_dsp_system: processes two serial signals in the Walsh domain and
// returns the result as a serial signal.
//
// Two identical forward Walsh transforms take x(t) and g(t), one sample of
// each per `enter` strobe, and turn each frame of N samples into N Walsh
// coefficients A and B (parallel). The DSP stage combines them into C
// (generation, sum, difference or product, chosen by OP at build time) and
// the inverse Walsh transform turns C back into N serial samples h, scaled so
// that h equals x (GEN), x+g (ADD), x-g (SUB) or x*g (MUL).
//
// Streaming: the inverse transform receives the same strobes delayed by
// WT_LATENCY = 2 cycles, so while the forward transforms collect frame f+1
// the inverse transform emits the result of frame f. The output of each
// sample therefore appears one frame plus 4 clock cycles after its input
// sample: the strobe of input sample k of frame f+1 (cycle c) gives
// h_valid = 1, h_count = k and h = result sample k of frame f in cycle c+4.
// The first frame after reset produces zeros. Strobes may be back to back or
// spaced by idle cycles.
//
// Word lengths (defaults N = 4, WI = 4, addition): x, g are WI bits,
// A, B are WO = WI + log2 N bits, C is WIC bits and h is WOO bits as set out
// in walsh_pkg. Inputs must lie in -(2^(WI-1)-1) .. 2^(WI-1)-1.
//
// The structure (two forward transforms, DSP stage, one inverse transform,
// serial in, parallel between, serial out) and the word lengths follow the
// source. The single clock with an enter enable, the strobe delay and the
// frame-overlapped streaming are this design's choices.
module walsh_dsp_system
  import walsh_pkg::*;
#(
  parameter int unsigned N  = 4,
  parameter int unsigned WI = 4,
  parameter dsp_op_e     OP = DSP_ADD,
  localparam int unsigned WO    = wo_bits(WI, N),
  localparam int unsigned WIC   = wic_bits(OP, WI, N),
  localparam int unsigned LOG2K = log2k_bits(OP, N),
  localparam int unsigned WOO   = WIC - LOG2K
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enter,
  input  logic signed [WI-1:0]  x,
  input  logic signed [WI-1:0]  g,
  output logic signed [WO-1:0]  a [N],
  output logic signed [WO-1:0]  b [N],
  output logic signed [WIC-1:0] c [N],
  output logic                  coef_valid,
  output logic signed [WOO-1:0] h,
  output logic                  h_valid,
  output logic [$clog2(N)-1:0]  h_count
);
  logic                  b_valid;
  logic [WT_LATENCY-1:0] enter_dly;

  walsh_transform #(.N(N), .WI(WI), .WO(WO)) u_wt_x (
    .clk, .rst_n, .enter, .x(x), .a(a), .a_valid(coef_valid)
  );

  walsh_transform #(.N(N), .WI(WI), .WO(WO)) u_wt_g (
    .clk, .rst_n, .enter, .x(g), .a(b), .a_valid(b_valid)
  );

  dsp_unit #(.OP(OP), .N(N), .WI(WI), .WO(WO), .WIC(WIC)) u_dsp (
    .a(a), .b(b), .c(c)
  );

  // Strobe delay line feeding the inverse transform.
  always_ff @(posedge clk) begin
    if (!rst_n) enter_dly <= '0;
    else        enter_dly <= {enter_dly[WT_LATENCY-2:0], enter};
  end

  inverse_walsh_transform #(.N(N), .WIC(WIC), .LOG2K(LOG2K), .WOO(WOO)) u_iwt (
    .clk, .rst_n, .enter(enter_dly[WT_LATENCY-1]), .c(c), .h, .h_valid, .h_count
  );

  // Both forward transforms see the same strobes, so they finish together.
  a_b_in_step: assert property (@(posedge clk) disable iff (!rst_n) coef_valid == b_valid);
endmodule
