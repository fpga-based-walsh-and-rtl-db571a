// walsh_circuit: generates the Walsh functions W(1)..W(N-1), in Hadamard
// (natural) order, for the sample position inside a frame of N samples.
//
// A log2(N)-bit up counter advances once per entered sample. With +1 coded as
// 0 and -1 as 1, the product of Rademacher functions becomes an XOR, so
// W(n) = XOR of the counter bits selected by the ones in n. For N = 4 this is
// W(1) = Q(0), W(2) = Q(1), W(3) = Q(0) ^ Q(1). W(0) is always +1 ("0") and is
// output only for uniform indexing.
//
// Interface: `enter` is a one-cycle sample strobe sampled on `clk`; `w` and
// `count` describe the sample being entered in the current cycle and step to
// the next position on the clock edge where `enter` is high. `last` flags the
// final sample of a frame (count = N-1). Reset (`rst_n` low, synchronous)
// returns the counter to 0.
//
// The counter and the XOR mapping follow the source; the single synchronous
// clock with an enable (instead of clocking the counter with Enter itself) and
// the reset are this design's choices.
module walsh_circuit #(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enter,
  output logic [N-1:0]         w,
  output logic [$clog2(N)-1:0] count,
  output logic                 last
);
  localparam int unsigned LN = $clog2(N);

  initial assert (N >= 2 && (1 << LN) == N) else $error("N must be a power of two >= 2");

  always_ff @(posedge clk) begin
    if (!rst_n)     count <= '0;
    else if (enter) count <= count + 1'b1;
  end

  always_comb begin
    for (int unsigned n = 0; n < N; n++) begin
      w[n] = ^(LN'(n) & count);
    end
  end

  assign last = (count == LN'(N - 1));

endmodule
