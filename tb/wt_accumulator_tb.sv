// wt_accumulator_tb: feeds a 4-bit-in, 6-bit accumulator random values with
// random enable and first-of-frame flags and compares its register with a
// running integer total, wrapped to 6 bits.
module wt_accumulator_tb;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, first = 1'b0;
  logic signed [3:0] f = '0;
  logic signed [5:0] acc;
  int checks = 0, failures = 0;
  int model = 0;
  int firsts = 0;

  wt_accumulator #(.WI(4), .WO(6)) dut (.clk, .rst_n, .en, .first, .f, .acc);

  always #5 clk = ~clk;

  function automatic int wrap6(input int v);
    return int'($signed(6'(v)));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;
    checks++; if (acc != 0) begin failures++; $display("FAIL reset value %0d", acc); end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en    = ($urandom % 4) != 0;
      first = ($urandom % 5) == 0;
      f     = 4'(int'($urandom % 15) - 7);
      @(posedge clk);
      if (en) begin
        model = wrap6((first ? 0 : model) + int'(f));
        if (first) firsts++;
      end
      #1;
      checks++;
      if (int'(acc) != model) begin
        failures++;
        $display("FAIL step %0d: acc %0d expected %0d", i, acc, model);
      end
    end
    checks++; if (firsts == 0) begin failures++; $display("FAIL no frame start seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
