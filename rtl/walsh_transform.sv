// walsh_transform: serial-in, parallel-out Walsh transform of length N.
//
// Samples X enter one per `enter` strobe. The Walsh circuit gives, for the
// current sample position k, the sign of Walsh function n at k; multiplexer
// M_n passes X or -X (from the negative circuit) accordingly, and data buffer
// F_n registers the choice (F_0 always takes X, since Walsh function 0 is +1).
// Accumulator AC_n sums F_n over the frame, so after N samples
//   A_n = sum_k x_k * psi(n, k)
// which is the Walsh coefficient without the 1/N factor (that factor is
// applied at the end of the inverse transform). Output buffers B_n hold the
// last finished frame while the next one accumulates. Word lengths: X is WI
// bits, A is WO = WI + log2(N) bits; inputs must lie in
// -(2^(WI-1)-1) .. 2^(WI-1)-1.
//
// Timing (single clock `clk`, synchronous active-low `rst_n`): strobe in cycle
// c -> F at edge c+1 -> AC at edge c+2 -> for the last sample of a frame,
// output buffers at edge c+3, with `a_valid` high for the one cycle after that
// edge. Strobes may come back to back or with any gaps; frame position is kept
// by the Walsh circuit's counter from reset. An assertion rejects the
// unsupported sample value -2^(WI-1).
//
// Following the source: the block list (one negative circuit, one Walsh
// circuit, N-1 muxes, N data buffers, N accumulators, N output buffers) and
// the WI/WO widths. This design's choices: `enter` is a clock enable rather
// than a clock, accumulators load (not add) on a frame's first sample, and
// output buffers load once per finished frame rather than on every clock,
// so the parallel outputs stay stable for a whole frame.
module walsh_transform #(
  parameter int unsigned N  = 4,
  parameter int unsigned WI = 4,
  parameter int unsigned WO = WI + $clog2(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enter,
  input  logic signed [WI-1:0] x,
  output logic signed [WO-1:0] a [N],
  output logic                 a_valid
);
  logic [N-1:0]         w;
  logic [$clog2(N)-1:0] count;
  logic                 last;
  logic signed [WI-1:0] x_neg;
  logic signed [WI-1:0] m  [N];   // multiplexer outputs (m[0] is X itself)
  logic signed [WI-1:0] f  [N];   // data buffers
  logic signed [WO-1:0] ac [N];   // accumulators
  logic                 f_valid, f_first, f_last, ac_done;

  walsh_circuit #(.N(N)) u_walsh (
    .clk, .rst_n, .enter, .w, .count, .last
  );

  negative_circuit #(.W(WI)) u_neg (.x(x), .y(x_neg));

  always_comb begin
    m[0] = x;
    for (int unsigned n = 1; n < N; n++) m[n] = w[n] ? x_neg : x;
  end

  // Data buffers and the position of the sample they hold.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned n = 0; n < N; n++) f[n] <= '0;
      f_valid <= 1'b0;
      f_first <= 1'b0;
      f_last  <= 1'b0;
    end else begin
      f_valid <= enter;
      if (enter) begin
        for (int unsigned n = 0; n < N; n++) f[n] <= m[n];
        f_first <= (count == '0);
        f_last  <= last;
      end
    end
  end

  for (genvar n = 0; n < N; n++) begin : g_acc
    wt_accumulator #(.WI(WI), .WO(WO)) u_acc (
      .clk, .rst_n, .en(f_valid), .first(f_first), .f(f[n]), .acc(ac[n])
    );
  end

  // Output buffers.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned n = 0; n < N; n++) a[n] <= '0;
      ac_done <= 1'b0;
      a_valid <= 1'b0;
    end else begin
      ac_done <= f_valid & f_last;
      a_valid <= ac_done;
      if (ac_done) begin
        for (int unsigned n = 0; n < N; n++) a[n] <= ac[n];
      end
    end
  end

  // The WI-bit negative circuit cannot negate -2^(WI-1).
  x_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    enter |-> x != {1'b1, {(WI - 1){1'b0}}})
    else $error("sample -2^(WI-1) is outside the supported range");

  initial assert (WO >= WI + $clog2(N)) else $error("WO must be at least WI + log2(N)");
endmodule
