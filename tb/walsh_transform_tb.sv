// walsh_transform_tb: Walsh transform of length 4 with 4-bit samples (first
// frame x = -6, -2, 3, 7 -> A = 2, -8, -18, 0) and of length 8 with 5-bit
// samples, random frames with idle gaps and back-to-back strobes.
module walsh_transform_tb;
  logic clk = 1'b0;
  logic d4, d8;
  int c4, f4, g4, b4, c8, f8, g8, b8;

  always #5 clk = ~clk;

  walsh_transform_check #(.N(4), .WI(4), .FRAMES(300), .TABLE_FRAME(1'b1)) u4 (
    .clk, .done(d4), .checks(c4), .failures(f4), .gaps(g4), .back_to_back(b4));
  walsh_transform_check #(.N(8), .WI(5), .FRAMES(200)) u8 (
    .clk, .done(d8), .checks(c8), .failures(f8), .gaps(g8), .back_to_back(b8));

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c8, f4 + f8 + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (2) @(posedge clk);
    wait (d4 && d8);
    checks = c4 + c8 + 2;
    failures = f4 + f8;
    if (g4 == 0 || g8 == 0) begin failures++; $display("FAIL no idle gaps"); end
    if (b4 == 0 || b8 == 0) begin failures++; $display("FAIL no back-to-back strobes"); end
    $display("idle cycles %0d/%0d, back-to-back strobes %0d/%0d", g4, g8, b4, b8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
