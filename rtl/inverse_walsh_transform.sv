// inverse_walsh_transform: parallel-in, serial-out inverse Walsh transform of
// length N.
//
// The N coefficients C_0..C_{N-1} are presented in parallel and held stable
// for a frame. For each `enter` strobe the Walsh circuit gives the sample
// position k; multiplexer M_n passes C_n or -C_n (negative circuit n) by the
// sign of Walsh function n at k, and data buffer F_n registers it (F_0 always
// takes C_0). A chain of N-1 adders sums the buffers:
//   S_k = sum_n C_n * psi(n, k)
// and the output buffer keeps the top WOO bits of S_k, dropping the low
// log2(K) bits: this is the division by K (K = N, or N*N after a
// multiplication) that the forward transform left out. The dropped bits are
// zero for coefficients that come from the forward transforms.
//
// Word lengths: C is WIC bits; the adders are WOC = WIC bits; H is
// WOO = WIC - LOG2K bits. Partial sums may wrap in WOC bits, but the final
// sum is exact because two's-complement wrap-around cancels.
//
// Timing (single clock `clk`, synchronous active-low `rst_n`): strobe in
// cycle c -> data buffers at edge c+1 -> output buffer at edge c+2, with
// `h_valid` high and `h_count` = k for the one cycle after that edge. An
// assertion checks that `c` does not change between strobes of a frame. The
// output buffer is loaded on every clock, as in the source, so H keeps the
// last sample between strobes.
//
// Following the source: negative circuits, one Walsh circuit, N-1 muxes,
// data buffers, the N-1 adder chain, WOC = WIC and the discarded low output
// bits. This design's choices: `enter` is a clock enable, a buffer F_0 for
// C_0 (drawn in the source's figures), and the h_valid / h_count outputs.
module inverse_walsh_transform #(
  parameter int unsigned N     = 4,
  parameter int unsigned WIC   = 6,
  parameter int unsigned LOG2K = $clog2(N),
  parameter int unsigned WOO   = WIC - LOG2K
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          enter,
  input  logic signed [WIC-1:0]         c [N],
  output logic signed [WOO-1:0]         h,
  output logic                          h_valid,
  output logic        [$clog2(N)-1:0]   h_count
);
  localparam int unsigned WOC = WIC;

  logic [N-1:0]          w;
  logic [$clog2(N)-1:0]  count, f_count;
  logic signed [WIC-1:0] c_neg [N];
  logic signed [WIC-1:0] m     [N];   // multiplexer outputs (m[0] is C_0)
  logic signed [WIC-1:0] f     [N];   // data buffers
  logic signed [WOC-1:0] s     [N];   // adder chain: s[n] = F_0 + ... + F_n
  logic                  f_valid;

  walsh_circuit #(.N(N)) u_walsh (
    .clk, .rst_n, .enter, .w, .count, .last()
  );

  assign c_neg[0] = '0;  // no negative circuit for C_0
  for (genvar n = 1; n < N; n++) begin : g_neg
    negative_circuit #(.W(WIC)) u_neg (.x(c[n]), .y(c_neg[n]));
  end

  always_comb begin
    m[0] = c[0];
    for (int unsigned n = 1; n < N; n++) m[n] = w[n] ? c_neg[n] : c[n];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned n = 0; n < N; n++) f[n] <= '0;
      f_valid <= 1'b0;
      f_count <= '0;
    end else begin
      f_valid <= enter;
      if (enter) begin
        for (int unsigned n = 0; n < N; n++) f[n] <= m[n];
        f_count <= count;
      end
    end
  end

  always_comb begin
    s[0] = f[0];
    for (int unsigned n = 1; n < N; n++) s[n] = s[n-1] + f[n];
  end

  // Output buffer: top WOO bits of the full sum.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      h       <= '0;
      h_valid <= 1'b0;
      h_count <= '0;
    end else begin
      h       <= s[N-1][WOC-1 -: WOO];
      h_valid <= f_valid;
      h_count <= f_count;
    end
  end

  // Coefficients must not change between the strobes of one output frame.
  logic signed [WIC-1:0] c_seen [N];
  logic                  c_same;
  always_ff @(posedge clk) begin
    if (enter) c_seen <= c;
  end
  always_comb begin
    c_same = 1'b1;
    for (int unsigned n = 0; n < N; n++) if (c[n] != c_seen[n]) c_same = 1'b0;
  end

  c_stable_in_frame: assert property (@(posedge clk) disable iff (!rst_n)
    enter && count != '0 |-> c_same)
    else $error("coefficients changed in the middle of an output frame");

  initial assert (WOO + LOG2K == WOC) else $error("WOO must be WIC - LOG2K");
endmodule
