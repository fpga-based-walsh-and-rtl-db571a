// walsh_pkg: types and word-length rules shared by the Walsh / inverse Walsh
// signal-processing chain.
//
// The chain transforms two serial signals x(t), g(t) into Walsh coefficients
// A, B, combines them into C (generation, addition, subtraction or
// multiplication by dyadic convolution) and transforms C back into a serial
// signal. Every word length is derived from the input word length WI and the
// transform length N so that no stage can overflow:
//
//   WO  = WI + log2(N)                         coefficients A, B
//   WIC = WO            (generation)            processed coefficients C
//         WO + 1        (addition, subtraction)
//         2(WI-1+log2 N)+1 (multiplication)
//   WOC = WIC                                   inverse-transform adders
//   WOO = WOC - log2(K), K = N (gen/add/sub), K = N*N (mul)
//
// These rules follow the word-length design of the source; they hold for
// inputs in the symmetric range -(2^(WI-1)-1) .. 2^(WI-1)-1 (the WI-bit
// negative circuit cannot negate -2^(WI-1)).
package walsh_pkg;

  // Processing done between the forward and inverse transforms.
  typedef enum logic [1:0] {
    DSP_GEN = 2'd0,  // signal generation: C = A
    DSP_ADD = 2'd1,  // addition:          C = A + B
    DSP_SUB = 2'd2,  // subtraction:       C = A - B
    DSP_MUL = 2'd3   // multiplication:    C = dyadic convolution of A and B
  } dsp_op_e;

  // Delay, in clock cycles, between the forward transforms' enter strobe and
  // the inverse transform's enter strobe when the two run as one stream.
  // The forward transform's output buffers take a finished frame three edges
  // after the strobe of its last sample (data buffer, accumulator, output
  // buffer). A delay of exactly 2 makes the inverse transform read the
  // coefficients of frame f while the forward transforms collect frame f+1,
  // with no enter pattern able to make it read a half-updated frame.
  localparam int unsigned WT_LATENCY = 2;

  function automatic int unsigned log2n(input int unsigned n);
    return $clog2(n);
  endfunction

  function automatic int unsigned wo_bits(input int unsigned wi, input int unsigned n);
    return wi + $clog2(n);
  endfunction

  function automatic int unsigned wic_bits(input dsp_op_e op, input int unsigned wi,
                                           input int unsigned n);
    case (op)
      DSP_GEN: return wi + $clog2(n);
      DSP_ADD, DSP_SUB: return wi + $clog2(n) + 1;
      default: return 2 * (wi - 1 + $clog2(n)) + 1;
    endcase
  endfunction

  function automatic int unsigned log2k_bits(input dsp_op_e op, input int unsigned n);
    return (op == DSP_MUL) ? 2 * $clog2(n) : $clog2(n);
  endfunction

  function automatic int unsigned woo_bits(input dsp_op_e op, input int unsigned wi,
                                           input int unsigned n);
    return wic_bits(op, wi, n) - log2k_bits(op, n);
  endfunction

endpackage
