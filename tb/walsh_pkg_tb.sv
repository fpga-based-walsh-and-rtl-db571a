// walsh_pkg_tb: checks the word-length rules against the table of word
// lengths (N = 4, WI = 4 worked example and the WI = 8 sizes) and against
// the worst-case magnitudes of each stage, computed here from first
// principles for inputs in the symmetric range.
module walsh_pkg_tb;
  import walsh_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Smallest signed width holding every value in [-m, m].
  function automatic int sbits(input longint m);
    int b = 1;
    while ((64'sd1 <<< (b - 1)) - 1 < m) b++;
    return b;
  endfunction

  initial begin
    // Worked example: N = 4, WI = 4.
    check("WO", wo_bits(4, 4), 6);
    check("WIC gen", wic_bits(DSP_GEN, 4, 4), 6);
    check("WIC add", wic_bits(DSP_ADD, 4, 4), 7);
    check("WIC sub", wic_bits(DSP_SUB, 4, 4), 7);
    check("WIC mul", wic_bits(DSP_MUL, 4, 4), 11);
    check("WOO gen", woo_bits(DSP_GEN, 4, 4), 4);
    check("WOO add", woo_bits(DSP_ADD, 4, 4), 5);
    check("WOO mul", woo_bits(DSP_MUL, 4, 4), 7);
    check("log2K add", log2k_bits(DSP_ADD, 4), 2);
    check("log2K mul", log2k_bits(DSP_MUL, 4), 4);
    check("log2n 16", log2n(16), 4);
    // Worst-case magnitudes for several sizes: M = 2^(WI-1)-1.
    foreach (int_sizes[i]) begin
      automatic int n = int_sizes[i][0], wi = int_sizes[i][1];
      automatic longint m = (64'sd1 <<< (wi - 1)) - 1;
      check($sformatf("WO N=%0d WI=%0d", n, wi), wo_bits(wi, n), sbits(n * m));
      check($sformatf("WIC add N=%0d WI=%0d", n, wi), wic_bits(DSP_ADD, wi, n), sbits(2 * n * m));
      check($sformatf("WIC mul N=%0d WI=%0d", n, wi), wic_bits(DSP_MUL, wi, n), sbits(n * n * m * m));
      check($sformatf("WOO add N=%0d WI=%0d", n, wi), woo_bits(DSP_ADD, wi, n), sbits(2 * m));
      check($sformatf("WOO mul N=%0d WI=%0d", n, wi), woo_bits(DSP_MUL, wi, n), sbits(m * m));
      check($sformatf("WOO gen N=%0d WI=%0d", n, wi), woo_bits(DSP_GEN, wi, n), wi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int int_sizes [6][2] = '{'{4, 4}, '{4, 8}, '{8, 8}, '{16, 8}, '{8, 5}, '{2, 3}};
endmodule
