// walsh_sizes_tb: the transform sizes used for the area and speed figures:
// forward transforms of length 4, 8 and 16 with 8-bit samples, and inverse
// transforms of length 4, 8 and 16 with 8-bit input coefficients (generation
// mode, so the signals are 6, 5 and 4 bits wide), on random frames.
module walsh_sizes_tb;
  import walsh_pkg::*;

  logic clk = 1'b0;
  logic d [6];
  int c [6], f [6], unused_g [3], unused_b [3];

  always #5 clk = ~clk;

  walsh_transform_check #(.N(4),  .WI(8), .FRAMES(100)) u_wt4  (.clk, .done(d[0]), .checks(c[0]), .failures(f[0]), .gaps(unused_g[0]), .back_to_back(unused_b[0]));
  walsh_transform_check #(.N(8),  .WI(8), .FRAMES(60))  u_wt8  (.clk, .done(d[1]), .checks(c[1]), .failures(f[1]), .gaps(unused_g[1]), .back_to_back(unused_b[1]));
  walsh_transform_check #(.N(16), .WI(8), .FRAMES(30))  u_wt16 (.clk, .done(d[2]), .checks(c[2]), .failures(f[2]), .gaps(unused_g[2]), .back_to_back(unused_b[2]));
  iwt_check #(.N(4),  .WI(6), .OP(DSP_GEN), .FRAMES(100)) u_iwt4  (.clk, .done(d[3]), .checks(c[3]), .failures(f[3]));
  iwt_check #(.N(8),  .WI(5), .OP(DSP_GEN), .FRAMES(60))  u_iwt8  (.clk, .done(d[4]), .checks(c[4]), .failures(f[4]));
  iwt_check #(.N(16), .WI(4), .OP(DSP_GEN), .FRAMES(30))  u_iwt16 (.clk, .done(d[5]), .checks(c[5]), .failures(f[5]));

  int checks, failures;

  initial begin
    repeat (100000) @(posedge clk);
    checks = 0; failures = 1;
    foreach (c[i]) begin checks += c[i]; failures += f[i]; end
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
    checks = 0; failures = 0;
    foreach (c[i]) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
