// dsp_unit_tb: the four build-time operations side by side on the worked
// example (A = 2, -8, -18, 0; B = 12, 10, 12, -10) and on random coefficient
// vectors of 4-bit signals, N = 4. Expected: C = A, A + B, A - B, and the
// dyadic convolution sum_m A[n xor m] B[m], computed here with integer loops.
module dsp_unit_tb;
  import walsh_pkg::*;

  logic signed [5:0]  a [4], b [4];
  logic signed [5:0]  cg [4];
  logic signed [6:0]  ca [4], cs [4];
  logic signed [10:0] cm [4];
  int checks = 0, failures = 0;

  dsp_unit #(.OP(DSP_GEN), .N(4), .WI(4)) u_gen (.a, .b, .c(cg));
  dsp_unit #(.OP(DSP_ADD), .N(4), .WI(4)) u_add (.a, .b, .c(ca));
  dsp_unit #(.OP(DSP_SUB), .N(4), .WI(4)) u_sub (.a, .b, .c(cs));
  dsp_unit #(.OP(DSP_MUL), .N(4), .WI(4)) u_mul (.a, .b, .c(cm));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_all(input int av [4], input int bv [4]);
    for (int n = 0; n < 4; n++) begin a[n] = 6'(av[n]); b[n] = 6'(bv[n]); end
    #1;
    for (int n = 0; n < 4; n++) begin
      automatic int e = 0;
      for (int m = 0; m < 4; m++) e += av[n ^ m] * bv[m];
      check($sformatf("gen C%0d", n), int'(cg[n]), av[n]);
      check($sformatf("add C%0d", n), int'(ca[n]), av[n] + bv[n]);
      check($sformatf("sub D%0d", n), int'(cs[n]), av[n] - bv[n]);
      check($sformatf("mul E%0d", n), int'(cm[n]), e);
    end
  endtask

  initial begin
    int av [4] = '{2, -8, -18, 0};
    int bv [4] = '{12, 10, 12, -10};
    check_all(av, bv);
    // Worked-example rows C, D and E, as printed.
    check("C row", int'(ca[0]) * 1000000 + int'(ca[1]) * 10000 + int'(ca[2]) * 100 + int'(ca[3]),
          14 * 1000000 + 2 * 10000 - 6 * 100 - 10);
    check("D row", int'(cs[0]) * 1000000 + int'(cs[1]) * 10000 + int'(cs[2]) * 100 + int'(cs[3]),
          -10 * 1000000 - 18 * 10000 - 30 * 100 + 10);
    check("E0", int'(cm[0]), -272);
    check("E3", int'(cm[3]), -296);
    for (int t = 0; t < 1000; t++) begin
      int xs [4], gs [4];
      for (int k = 0; k < 4; k++) begin xs[k] = int'($urandom % 15) - 7; gs[k] = int'($urandom % 15) - 7; end
      // Forward transform in closed form (natural Hadamard order).
      for (int n = 0; n < 4; n++) begin
        av[n] = 0; bv[n] = 0;
        for (int k = 0; k < 4; k++) begin
          automatic int s = ($countones(n & k) % 2) ? -1 : 1;
          av[n] += s * xs[k]; bv[n] += s * gs[k];
        end
      end
      check_all(av, bv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
