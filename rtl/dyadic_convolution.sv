// dyadic_convolution: Walsh-domain product of two signals.
//
// If A and B are the (unscaled) Walsh coefficients of x and g, the
// coefficients of the sample-by-sample product x*g are, up to a factor N,
//   E_n = sum_{m=0}^{N-1} A_{n XOR m} * B_m
// the dyadic convolution (XOR replaces the index subtraction of an ordinary
// convolution). This module computes all N outputs at once with N*N signed
// multipliers and an adder tree per output, in full precision, and keeps the
// low WE bits. For coefficients of inputs in the symmetric range the source's
// word length WE = 2(WI-1+log2 N)+1 holds every E exactly; the arithmetic is
// two's-complement, so an inverse transform fed with these WE bits still
// recovers the exact product.
//
// The operation (eq. of the source) and WE follow the source; the parallel,
// purely combinational realisation is this design's choice, since the source
// gives only the function.
module dyadic_convolution #(
  parameter int unsigned N  = 4,
  parameter int unsigned WA = 6,
  parameter int unsigned WE = 2 * (WA - 1) + 1
) (
  input  logic signed [WA-1:0] a [N],
  input  logic signed [WA-1:0] b [N],
  output logic signed [WE-1:0] e [N]
);
  localparam int unsigned LN = $clog2(N);
  localparam int unsigned WP = 2 * WA;        // one product
  localparam int unsigned WS = WP + LN;       // sum of N products

  always_comb begin
    for (int unsigned n = 0; n < N; n++) begin
      logic signed [WS-1:0] acc;
      logic signed [WP-1:0] prod;
      acc = '0;
      for (int unsigned m = 0; m < N; m++) begin
        prod = a[LN'(n) ^ LN'(m)] * b[m];
        acc  = acc + WS'(prod);
      end
      e[n] = WE'(acc);
    end
  end

  initial assert (WE <= WS) else $error("WE wider than the full-precision sum");
endmodule
