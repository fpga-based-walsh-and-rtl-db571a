// walsh_transform_check: drives one walsh_transform of size N / WI with
// FRAMES frames of random samples in the symmetric range, with random idle
// cycles between strobes, and checks every finished frame: coefficients
// against sum_k x_k * H[n][k] (Sylvester-Hadamard matrix built here), and
// a_valid exactly three clock edges after the edge that took the frame's
// last sample. With TABLE_FRAME set, the first frame is x = -6, -2, 3, 7,
// whose coefficients are 2, -8, -18, 0.
module walsh_transform_check #(
  parameter int N = 4,
  parameter int WI = 4,
  parameter int FRAMES = 50,
  parameter bit TABLE_FRAME = 1'b0
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   gaps,
  output int   back_to_back
);
  localparam int WO = WI + $clog2(N);

  typedef struct {
    longint    edge_no;
    int        coef [N];
  } frame_t;

  logic rst_n = 1'b0, enter = 1'b0;
  logic signed [WI-1:0] x = '0;
  logic signed [WO-1:0] a [N];
  logic a_valid;

  walsh_transform #(.N(N), .WI(WI)) dut (.clk, .rst_n, .enter, .x, .a, .a_valid);

  function automatic int had(input int n, input int k, input int size);
    if (size == 1) return 1;
    return ((n >= size / 2 && k >= size / 2) ? -1 : 1) * had(n % (size / 2), k % (size / 2), size / 2);
  endfunction

  longint edge_no = 0;
  int pos = 0;
  int sums [N];
  frame_t expq [$];
  bit prev_enter = 1'b0;

  initial begin
    done = 1'b0; checks = 0; failures = 0; gaps = 0; back_to_back = 0;
  end

  // Reference model: sees what the DUT sees at each rising edge.
  always @(posedge clk) begin
    edge_no++;
    if (rst_n && enter) begin
      if (prev_enter) back_to_back++;
      for (int n = 0; n < N; n++) sums[n] = (pos == 0 ? 0 : sums[n]) + had(n, pos, N) * int'(x);
      if (pos == N - 1) begin
        frame_t fr;
        fr.edge_no = edge_no + 2;
        fr.coef = sums;
        expq.push_back(fr);
      end
      pos = (pos + 1) % N;
    end else if (rst_n) gaps++;
    prev_enter = rst_n && enter;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      automatic bit exp_valid = expq.size() > 0 && expq[0].edge_no == edge_no;
      checks++;
      if (a_valid !== exp_valid) begin
        failures++;
        $display("FAIL N=%0d edge %0d: a_valid %0b expected %0b", N, edge_no, a_valid, exp_valid);
      end
      if (exp_valid) begin
        for (int n = 0; n < N; n++) begin
          checks++;
          if (int'(a[n]) != expq[0].coef[n]) begin
            failures++;
            $display("FAIL N=%0d A%0d = %0d expected %0d", N, n, a[n], expq[0].coef[n]);
          end
        end
        void'(expq.pop_front());
      end
      if (expq.size() > 0 && expq[0].edge_no < edge_no) begin
        failures++;
        $display("FAIL N=%0d frame never reported", N);
        void'(expq.pop_front());
      end
    end
  end

  initial begin
    int tbl [4] = '{-6, -2, 3, 7};
    int lim = (1 << (WI - 1)) - 1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int fr = 0; fr < FRAMES; fr++) begin
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        while ($urandom % 4 == 0) begin
          enter = 1'b0;
          @(negedge clk);
        end
        enter = 1'b1;
        x = (TABLE_FRAME && fr == 0 && N == 4) ? WI'(tbl[k])
                                               : WI'(int'($urandom % (2 * lim + 1)) - lim);
      end
    end
    @(negedge clk);
    enter = 1'b0;
    repeat (6) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL N=%0d %0d frames not reported", N, expq.size());
    end
    done = 1'b1;
  end
endmodule
