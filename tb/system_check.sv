// system_check: end-to-end stimulus and reference for one walsh_dsp_system
// built for operation OP. Samples of x and g are strobed in with random idle
// cycles; a model in the signal domain predicts, for input sample k of frame
// f (strobe sampled at edge E), the output sample k of frame f-1 (zero for the
// first frame) at edge E+3 with h_count = k, and the coefficient vectors A, B,
// C of every finished frame two edges after its last strobe. With TABLE_FRAME
// set (N = 4, WI = 4) the first frame is x = -6, -2, 3, 7 and
// g = 6, 6, 5, -5, and its coefficient rows and outputs are checked against
// the printed values. Counts idle cycles, back-to-back strobes, frames and
// samples where the Walsh sign negated a nonzero sample.
module system_check
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
  output int   failures,
  output int   gaps,
  output int   back_to_back,
  output int   frames_out,
  output int   negations
);
  localparam int WO  = wo_bits(WI, N);
  localparam int WIC = wic_bits(OP, WI, N);
  localparam int WOO = woo_bits(OP, WI, N);

  logic rst_n = 1'b0, enter = 1'b0;
  logic signed [WI-1:0]  x = '0, g = '0;
  logic signed [WO-1:0]  a [N], b [N];
  logic signed [WIC-1:0] c [N];
  logic                  coef_valid, h_valid;
  logic signed [WOO-1:0] h;
  logic [$clog2(N)-1:0]  h_count;

  walsh_dsp_system #(.N(N), .WI(WI), .OP(OP)) dut (
    .clk, .rst_n, .enter, .x, .g, .a, .b, .c, .coef_valid, .h, .h_valid, .h_count);

  function automatic int had(input int n, input int k, input int size);
    if (size == 1) return 1;
    return ((n >= size / 2 && k >= size / 2) ? -1 : 1) * had(n % (size / 2), k % (size / 2), size / 2);
  endfunction

  function automatic int op_result(input int xv, input int gv);
    case (OP)
      DSP_GEN: return xv;
      DSP_ADD: return xv + gv;
      DSP_SUB: return xv - gv;
      default: return xv * gv;
    endcase
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL system op=%s N=%0d %s: got %0d expected %0d", OP.name(), N, what, got, exp);
    end
  endtask

  longint edge_no = 0;
  int pos = 0, frame_in = 0;
  int cur_x [N], cur_g [N];
  int prev_h [N];
  longint h_due [$];   int h_val [$];   int h_pos [$];
  longint c_due [$];   int c_a [$];     int c_b [$];   int c_c [$];
  bit prev_enter = 1'b0;
  bit table_ok_h = 1'b0;

  initial begin
    done = 1'b0; checks = 0; failures = 0; gaps = 0; back_to_back = 0;
    frames_out = 0; negations = 0;
    for (int k = 0; k < N; k++) prev_h[k] = 0;
  end

  always @(posedge clk) begin
    edge_no++;
    if (rst_n && enter) begin
      if (prev_enter) back_to_back++;
      cur_x[pos] = int'(x);
      cur_g[pos] = int'(g);
      if (pos != 0 && x != 0) negations++;
      h_due.push_back(edge_no + 3);
      h_val.push_back(prev_h[pos]);
      h_pos.push_back(pos);
      if (pos == N - 1) begin
        for (int n = 0; n < N; n++) begin
          automatic int sa = 0, sb = 0, sp = 0, cv;
          for (int k = 0; k < N; k++) begin
            sa += had(n, k, N) * cur_x[k];
            sb += had(n, k, N) * cur_g[k];
            sp += had(n, k, N) * cur_x[k] * cur_g[k];
          end
          case (OP)
            DSP_GEN: cv = sa;
            DSP_ADD: cv = sa + sb;
            DSP_SUB: cv = sa - sb;
            default: cv = N * sp;
          endcase
          c_due.push_back(edge_no + 2);
          c_a.push_back(sa); c_b.push_back(sb); c_c.push_back(cv);
        end
        for (int k = 0; k < N; k++) prev_h[k] = op_result(cur_x[k], cur_g[k]);
        frame_in++;
      end
      pos = (pos + 1) % N;
    end else if (rst_n) gaps++;
    prev_enter = rst_n && enter;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      automatic bit hv = h_due.size() > 0 && h_due[0] == edge_no;
      automatic bit cvld = c_due.size() > 0 && c_due[0] == edge_no;
      check($sformatf("h_valid at edge %0d", edge_no), h_valid, hv);
      if (hv) begin
        check($sformatf("h sample %0d", h_pos[0]), int'(h), h_val[0]);
        check("h_count", int'(h_count), h_pos[0]);
        if (h_pos[0] == N - 1) frames_out++;
        void'(h_due.pop_front()); void'(h_val.pop_front()); void'(h_pos.pop_front());
      end
      check($sformatf("coef_valid at edge %0d", edge_no), coef_valid, cvld);
      if (cvld) begin
        for (int n = 0; n < N; n++) begin
          check($sformatf("A%0d", n), int'(a[n]), c_a[0]);
          check($sformatf("B%0d", n), int'(b[n]), c_b[0]);
          check($sformatf("C%0d", n), int'(c[n]), c_c[0]);
          void'(c_due.pop_front()); void'(c_a.pop_front()); void'(c_b.pop_front()); void'(c_c.pop_front());
        end
      end
    end
  end

  // Printed worked example: coefficient rows once the first frame is in.
  initial if (TABLE_FRAME) begin
    int ta [4] = '{2, -8, -18, 0};
    int tbv [4] = '{12, 10, 12, -10};
    int tcv [4];
    int thv [4];
    case (OP)
      DSP_GEN: begin tcv = ta;                     thv = '{-6, -2, 3, 7};     end
      DSP_ADD: begin tcv = '{14, 2, -6, -10};      thv = '{0, 4, 8, 2};       end
      DSP_SUB: begin tcv = '{-10, -18, -30, 10};   thv = '{-12, -8, -2, 12};  end
      default: begin tcv = '{-272, 104, -112, -296}; thv = '{-36, -12, 15, -35}; end
    endcase
    wait (rst_n);
    @(posedge coef_valid);
    @(negedge clk);
    for (int n = 0; n < 4; n++) begin
      check($sformatf("worked A%0d", n), int'(a[n]), ta[n]);
      check($sformatf("worked B%0d", n), int'(b[n]), tbv[n]);
      check($sformatf("worked C%0d", n), int'(c[n]), tcv[n]);
    end
    // Outputs of the worked frame come out during the second frame.
    for (int k = 0; k < 4; k++) begin
      @(negedge clk iff (h_valid && int'(h_count) == k));
      check($sformatf("worked h%0d", k), int'(h), thv[k]);
      @(posedge clk);
    end
  end

  initial begin
    int lim = (1 << (WI - 1)) - 1;
    int tx [4] = '{-6, -2, 3, 7};
    int tg [4] = '{6, 6, 5, -5};
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
        if (TABLE_FRAME && fr == 0) begin
          x = WI'(tx[k]); g = WI'(tg[k]);
        end else if (fr == 1) begin  // extremes of the symmetric range
          x = WI'((k % 2) ? lim : -lim); g = WI'((k < N / 2) ? lim : -lim);
        end else begin
          x = WI'(int'($urandom % (2 * lim + 1)) - lim);
          g = WI'(int'($urandom % (2 * lim + 1)) - lim);
        end
      end
    end
    // One more frame of zeros pushes the last result out.
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      enter = 1'b1; x = '0; g = '0;
    end
    @(negedge clk);
    enter = 1'b0;
    repeat (8) @(negedge clk);
    check("outputs outstanding", h_due.size(), 0);
    check("coefficients outstanding", c_due.size(), 0);
    check("frames out", frames_out, FRAMES + 1);
    done = 1'b1;
  end
endmodule
