// negative_circuit_tb: exhaustive check of a 4-bit negative circuit and a
// random check of an 11-bit one against integer negation, over the symmetric
// range; also confirms the documented wrap of -2^(W-1) onto itself.
module negative_circuit_tb;
  logic signed [3:0]  x4, y4;
  logic signed [10:0] x11, y11;
  int checks = 0, failures = 0;

  negative_circuit #(.W(4))  dut4  (.x(x4), .y(y4));
  negative_circuit #(.W(11)) dut11 (.x(x11), .y(y11));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int v = -7; v <= 7; v++) begin
      x4 = 4'(v);
      #1 check($sformatf("neg4 %0d", v), int'(y4), -v);
    end
    x4 = -4'sd8;
    #1 check("neg4 -8 wraps", int'(y4), -8);
    for (int i = 0; i < 2000; i++) begin
      automatic int v = int'($urandom % 2047) - 1023;
      x11 = 11'(v);
      #1 check($sformatf("neg11 %0d", v), int'(y11), -v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
