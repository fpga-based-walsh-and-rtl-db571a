// negative_circuit: two's-complement negation, y = -x, in the same word
// length W as its input.
//
// The forward transform needs -X to feed the sample multiplexers, and the
// inverse transform needs -C for each coefficient but C0. As in the source the
// result keeps the input word length, so the one value -2^(W-1) has no
// negative in range and maps onto itself; the chain therefore takes inputs in
// the symmetric range -(2^(W-1)-1) .. 2^(W-1)-1. Purely combinational.
module negative_circuit #(
  parameter int unsigned W = 4
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  assign y = W'(~x + 1'b1);
endmodule
