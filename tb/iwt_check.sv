// iwt_check: drives one inverse_walsh_transform built for operation OP on
// signals of WI bits and length N. For each of FRAMES frames it draws random
// signals x, g in the symmetric range, forms the processed coefficients in
// closed form (C = A, A+B, A-B or N * sum_k x_k g_k H[n][k]), holds them for
// the frame and strobes N samples out with random idle cycles. Every output
// sample must equal x, x+g, x-g or x*g at its position, appear with h_valid
// exactly two edges after the edge that took its strobe, and carry its
// position in h_count. With TABLE_FRAME set (addition, N = 4) the first frame
// is C = 14, 2, -6, -10, which must give h = 0, 4, 8, 2.
module iwt_check
  import walsh_pkg::*;
#(
  parameter int      N = 4,
  parameter int      WI = 4,
  parameter dsp_op_e OP = DSP_ADD,
  parameter int      FRAMES = 50,
  parameter bit      TABLE_FRAME = 1'b0
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int WIC   = wic_bits(OP, WI, N);
  localparam int LOG2K = log2k_bits(OP, N);
  localparam int WOO   = WIC - LOG2K;

  logic rst_n = 1'b0, enter = 1'b0;
  logic signed [WIC-1:0] c [N];
  logic signed [WOO-1:0] h;
  logic h_valid;
  logic [$clog2(N)-1:0] h_count;

  inverse_walsh_transform #(.N(N), .WIC(WIC), .LOG2K(LOG2K)) dut (
    .clk, .rst_n, .enter, .c, .h, .h_valid, .h_count);

  function automatic int had(input int n, input int k, input int size);
    if (size == 1) return 1;
    return ((n >= size / 2 && k >= size / 2) ? -1 : 1) * had(n % (size / 2), k % (size / 2), size / 2);
  endfunction

  longint edge_no = 0;
  int pos = 0;
  int expect_h [N];
  longint due [$];
  int due_val [$];
  int due_pos [$];

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    for (int n = 0; n < N; n++) c[n] = '0;
  end

  always @(posedge clk) begin
    edge_no++;
    if (rst_n && enter) begin
      due.push_back(edge_no + 1);
      due_val.push_back(expect_h[pos]);
      due_pos.push_back(pos);
      pos = (pos + 1) % N;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      automatic bit exp_valid = due.size() > 0 && due[0] == edge_no;
      checks++;
      if (h_valid !== exp_valid) begin
        failures++;
        $display("FAIL IWT N=%0d op=%s edge %0d: h_valid %0b expected %0b", N, OP.name(), edge_no, h_valid, exp_valid);
      end
      if (exp_valid) begin
        checks += 2;
        if (int'(h) != due_val[0] || int'(h_count) != due_pos[0]) begin
          failures++;
          $display("FAIL IWT N=%0d op=%s k=%0d: h %0d (count %0d) expected %0d", N, OP.name(),
                   due_pos[0], h, h_count, due_val[0]);
        end
        void'(due.pop_front()); void'(due_val.pop_front()); void'(due_pos.pop_front());
      end
    end
  end

  initial begin
    int lim = (1 << (WI - 1)) - 1;
    int xs [N], gs [N];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int fr = 0; fr < FRAMES; fr++) begin
      @(negedge clk);
      enter = 1'b0;
      for (int k = 0; k < N; k++) begin
        xs[k] = int'($urandom % (2 * lim + 1)) - lim;
        gs[k] = int'($urandom % (2 * lim + 1)) - lim;
        if (fr == 1) begin xs[k] = (k % 2) ? lim : -lim; gs[k] = (k < N / 2) ? lim : -lim; end
      end
      for (int n = 0; n < N; n++) begin
        automatic int sa = 0, sb = 0, sp = 0, cv;
        for (int k = 0; k < N; k++) begin
          sa += had(n, k, N) * xs[k];
          sb += had(n, k, N) * gs[k];
          sp += had(n, k, N) * xs[k] * gs[k];
        end
        case (OP)
          DSP_GEN: cv = sa;
          DSP_ADD: cv = sa + sb;
          DSP_SUB: cv = sa - sb;
          default: cv = N * sp;
        endcase
        c[n] = WIC'(cv);
      end
      for (int k = 0; k < N; k++) begin
        case (OP)
          DSP_GEN: expect_h[k] = xs[k];
          DSP_ADD: expect_h[k] = xs[k] + gs[k];
          DSP_SUB: expect_h[k] = xs[k] - gs[k];
          default: expect_h[k] = xs[k] * gs[k];
        endcase
      end
      if (TABLE_FRAME && fr == 0) begin
        int tc [4] = '{14, 2, -6, -10};
        int th [4] = '{0, 4, 8, 2};
        for (int n = 0; n < 4; n++) begin c[n] = WIC'(tc[n]); expect_h[n] = th[n]; end
      end
      for (int k = 0; k < N; k++) begin
        while ($urandom % 4 == 0) begin
          enter = 1'b0;
          @(negedge clk);
        end
        enter = 1'b1;
        @(negedge clk);
      end
      enter = 1'b0;
    end
    repeat (4) @(negedge clk);
    checks++;
    if (due.size() != 0) begin failures++; $display("FAIL IWT outputs missing"); end
    done = 1'b1;
  end
endmodule
