// walsh_circuit_tb: drives random enter strobes into Walsh circuits of
// length 4 and 8 and compares every output bit with the sign of the
// Sylvester-Hadamard matrix entry H[n][k] (built recursively here), where k is
// the sample position counted by the testbench.
module walsh_circuit_tb;
  logic clk = 1'b0, rst_n = 1'b0, enter = 1'b0;
  logic [3:0] w4;  logic [1:0] cnt4; logic last4;
  logic [7:0] w8;  logic [2:0] cnt8; logic last8;
  int checks = 0, failures = 0;
  int k4 = 0, k8 = 0;

  walsh_circuit #(.N(4)) dut4 (.clk, .rst_n, .enter, .w(w4), .count(cnt4), .last(last4));
  walsh_circuit #(.N(8)) dut8 (.clk, .rst_n, .enter, .w(w8), .count(cnt8), .last(last8));

  always #5 clk = ~clk;

  // Sylvester construction: H_2n = [[H, H], [H, -H]].
  function automatic int had(input int n, input int k, input int size);
    if (size == 1) return 1;
    return ((n >= size / 2 && k >= size / 2) ? -1 : 1) * had(n % (size / 2), k % (size / 2), size / 2);
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      for (int n = 0; n < 4; n++) check($sformatf("N4 W(%0d) k=%0d", n, k4), w4[n], had(n, k4, 4) < 0);
      for (int n = 0; n < 8; n++) check($sformatf("N8 W(%0d) k=%0d", n, k8), w8[n], had(n, k8, 8) < 0);
      check("N4 count", cnt4, k4);
      check("N8 count", cnt8, k8);
      check("N4 last", last4, k4 == 3);
      check("N8 last", last8, k8 == 7);
      enter = ($urandom % 3) != 0;
      @(posedge clk);
      if (enter) begin
        k4 = (k4 + 1) % 4;
        k8 = (k8 + 1) % 8;
      end
    end
    // Reset mid-frame returns to position 0.
    @(negedge clk); enter = 1'b1; rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1; enter = 1'b0;
    check("count after reset", cnt8, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
