// walsh_dsp_system_tb: the whole chain end to end, once for each build-time
// operation (generation, addition, subtraction, multiplication) at N = 4 with
// 4-bit samples, starting with the worked frame, plus addition at N = 8 with
// 5-bit samples. Every mechanism must be seen: idle cycles between strobes,
// back-to-back strobes, sign negation in the Walsh multiplexers, and frames
// streamed out by every operation.
module walsh_dsp_system_tb;
  import walsh_pkg::*;

  localparam int K = 5;
  logic clk = 1'b0;
  logic d [K];
  int c [K], f [K], gp [K], bb [K], fo [K], ng [K];

  always #5 clk = ~clk;

  system_check #(.N(4), .WI(4), .OP(DSP_GEN), .FRAMES(150), .TABLE_FRAME(1'b1)) u_gen (
    .clk, .done(d[0]), .checks(c[0]), .failures(f[0]), .gaps(gp[0]), .back_to_back(bb[0]), .frames_out(fo[0]), .negations(ng[0]));
  system_check #(.N(4), .WI(4), .OP(DSP_ADD), .FRAMES(150), .TABLE_FRAME(1'b1)) u_add (
    .clk, .done(d[1]), .checks(c[1]), .failures(f[1]), .gaps(gp[1]), .back_to_back(bb[1]), .frames_out(fo[1]), .negations(ng[1]));
  system_check #(.N(4), .WI(4), .OP(DSP_SUB), .FRAMES(150), .TABLE_FRAME(1'b1)) u_sub (
    .clk, .done(d[2]), .checks(c[2]), .failures(f[2]), .gaps(gp[2]), .back_to_back(bb[2]), .frames_out(fo[2]), .negations(ng[2]));
  system_check #(.N(4), .WI(4), .OP(DSP_MUL), .FRAMES(150), .TABLE_FRAME(1'b1)) u_mul (
    .clk, .done(d[3]), .checks(c[3]), .failures(f[3]), .gaps(gp[3]), .back_to_back(bb[3]), .frames_out(fo[3]), .negations(ng[3]));
  system_check #(.N(8), .WI(5), .OP(DSP_ADD), .FRAMES(80)) u_add8 (
    .clk, .done(d[4]), .checks(c[4]), .failures(f[4]), .gaps(gp[4]), .back_to_back(bb[4]), .frames_out(fo[4]), .negations(ng[4]));

  int checks, failures;

  initial begin
    repeat (200000) @(posedge clk);
    checks = 0; failures = 1;
    foreach (c[i]) begin checks += c[i]; failures += f[i]; end
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    checks = 0; failures = 0;
    foreach (c[i]) begin
      checks += c[i] + 4;
      failures += f[i];
      $display("run %0d: frames %0d, idle cycles %0d, back-to-back %0d, negated samples %0d",
               i, fo[i], gp[i], bb[i], ng[i]);
      if (fo[i] == 0) begin failures++; $display("FAIL run %0d streamed no frame", i); end
      if (gp[i] == 0) begin failures++; $display("FAIL run %0d saw no idle cycle", i); end
      if (bb[i] == 0) begin failures++; $display("FAIL run %0d saw no back-to-back strobes", i); end
      if (ng[i] == 0) begin failures++; $display("FAIL run %0d negated nothing", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
