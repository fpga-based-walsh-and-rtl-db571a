// dsp_unit: the signal-processing stage between the forward and inverse Walsh
// transforms, working on whole coefficient vectors.
//
// The operation is fixed when the design is built (parameter OP), because the
// source gives each operation its own word length WIC:
//   DSP_GEN  C = A                  (signal generation),  WIC = WO
//   DSP_ADD  C = A + B              (x + g),              WIC = WO + 1
//   DSP_SUB  C = A - B              (x - g),              WIC = WO + 1
//   DSP_MUL  C = dyadic conv(A, B)  (x * g),              WIC = 2(WI-1+log2 N)+1
// Purely combinational: C follows A and B in the same cycle. In DSP_GEN the B
// input is unused. The operations and widths follow the source; making the
// choice a build-time parameter is this design's.
module dsp_unit
  import walsh_pkg::*;
#(
  parameter dsp_op_e     OP  = DSP_ADD,
  parameter int unsigned N   = 4,
  parameter int unsigned WI  = 4,
  parameter int unsigned WO  = wo_bits(WI, N),
  parameter int unsigned WIC = wic_bits(OP, WI, N)
) (
  input  logic signed [WO-1:0]  a [N],
  input  logic signed [WO-1:0]  b [N],
  output logic signed [WIC-1:0] c [N]
);
  if (OP == DSP_MUL) begin : g_mul
    dyadic_convolution #(.N(N), .WA(WO), .WE(WIC)) u_conv (.a, .b, .e(c));
  end else begin : g_lin
    always_comb begin
      for (int unsigned n = 0; n < N; n++) begin
        case (OP)
          DSP_GEN: c[n] = WIC'(a[n]);
          DSP_SUB: c[n] = WIC'(a[n]) - WIC'(b[n]);
          default: c[n] = WIC'(a[n]) + WIC'(b[n]);
        endcase
      end
    end
  end
endmodule
