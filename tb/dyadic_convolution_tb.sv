// dyadic_convolution_tb: checks the worked example (A = 2, -8, -18, 0 and
// B = 12, 10, 12, -10 give E = -272, 104, -112, -296 in 11 bits), then random
// coefficient vectors of real 4-bit signals (N = 4) and 5-bit signals
// (N = 8) against E_n = N * sum_k x_k g_k H[n][k], the product theorem of the
// Walsh transform, computed here in the signal domain.
module dyadic_convolution_tb;
  logic signed [5:0]  a4 [4], b4 [4];
  logic signed [10:0] e4 [4];
  logic signed [7:0]  a8 [8], b8 [8];
  logic signed [14:0] e8 [8];
  int checks = 0, failures = 0;

  dyadic_convolution #(.N(4), .WA(6), .WE(11)) dut4 (.a(a4), .b(b4), .e(e4));
  dyadic_convolution #(.N(8), .WA(8), .WE(15)) dut8 (.a(a8), .b(b8), .e(e8));

  function automatic int had(input int n, input int k, input int size);
    if (size == 1) return 1;
    return ((n >= size / 2 && k >= size / 2) ? -1 : 1) * had(n % (size / 2), k % (size / 2), size / 2);
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int ea [4] = '{-272, 104, -112, -296};
    int av [4] = '{2, -8, -18, 0};
    int bv [4] = '{12, 10, 12, -10};
    for (int n = 0; n < 4; n++) begin a4[n] = 6'(av[n]); b4[n] = 6'(bv[n]); end
    #1 for (int n = 0; n < 4; n++) check($sformatf("worked E%0d", n), int'(e4[n]), ea[n]);

    for (int t = 0; t < 500; t++) begin
      int x4 [4], g4 [4], x8 [8], g8 [8];
      for (int k = 0; k < 4; k++) begin x4[k] = int'($urandom % 15) - 7; g4[k] = int'($urandom % 15) - 7; end
      for (int k = 0; k < 8; k++) begin x8[k] = int'($urandom % 31) - 15; g8[k] = int'($urandom % 31) - 15; end
      if (t == 0) begin  // extremes
        foreach (x4[k]) begin x4[k] = 7; g4[k] = 7; end
        foreach (x8[k]) begin x8[k] = -15; g8[k] = 15; end
      end
      for (int n = 0; n < 4; n++) begin
        automatic int sa = 0, sb = 0;
        for (int k = 0; k < 4; k++) begin sa += had(n, k, 4) * x4[k]; sb += had(n, k, 4) * g4[k]; end
        a4[n] = 6'(sa); b4[n] = 6'(sb);
      end
      for (int n = 0; n < 8; n++) begin
        automatic int sa = 0, sb = 0;
        for (int k = 0; k < 8; k++) begin sa += had(n, k, 8) * x8[k]; sb += had(n, k, 8) * g8[k]; end
        a8[n] = 8'(sa); b8[n] = 8'(sb);
      end
      #1;
      for (int n = 0; n < 4; n++) begin
        automatic int s = 0;
        for (int k = 0; k < 4; k++) s += x4[k] * g4[k] * had(n, k, 4);
        check($sformatf("N4 E%0d", n), int'(e4[n]), 4 * s);
      end
      for (int n = 0; n < 8; n++) begin
        automatic int s = 0;
        for (int k = 0; k < 8; k++) s += x8[k] * g8[k] * had(n, k, 8);
        check($sformatf("N8 E%0d", n), int'(e8[n]), 8 * s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
