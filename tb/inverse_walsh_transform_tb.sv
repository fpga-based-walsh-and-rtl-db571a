// inverse_walsh_transform_tb: inverse transforms for generation (6-bit
// coefficients, 4-bit output), addition (the worked frame C = 14, 2, -6, -10
// -> h = 0, 4, 8, 2 first), subtraction and multiplication (11-bit
// coefficients, division by 16) at N = 4, and addition at N = 8.
module inverse_walsh_transform_tb;
  import walsh_pkg::*;

  logic clk = 1'b0;
  logic d [5];
  int   c [5], f [5];

  always #5 clk = ~clk;

  iwt_check #(.N(4), .WI(4), .OP(DSP_GEN), .FRAMES(200)) u_gen (.clk, .done(d[0]), .checks(c[0]), .failures(f[0]));
  iwt_check #(.N(4), .WI(4), .OP(DSP_ADD), .FRAMES(200), .TABLE_FRAME(1'b1)) u_add (.clk, .done(d[1]), .checks(c[1]), .failures(f[1]));
  iwt_check #(.N(4), .WI(4), .OP(DSP_SUB), .FRAMES(200)) u_sub (.clk, .done(d[2]), .checks(c[2]), .failures(f[2]));
  iwt_check #(.N(4), .WI(4), .OP(DSP_MUL), .FRAMES(200)) u_mul (.clk, .done(d[3]), .checks(c[3]), .failures(f[3]));
  iwt_check #(.N(8), .WI(5), .OP(DSP_ADD), .FRAMES(100)) u_add8 (.clk, .done(d[4]), .checks(c[4]), .failures(f[4]));

  function automatic int total(input int v [5]);
    return v[0] + v[1] + v[2] + v[3] + v[4];
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f));
    $finish;
  end
endmodule
