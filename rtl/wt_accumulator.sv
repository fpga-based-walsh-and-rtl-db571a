// wt_accumulator: one accumulator of the Walsh transform (AC_i).
//
// An adder sums the registered total with the WI-bit data-buffer value F_i,
// sign-extended to WO bits by repeating F_i's sign bit into the WO-WI extra
// adder inputs (for WI = 4, WO = 6: F(3) drives three inputs). The sum is
// registered. This adder-plus-register structure and the sign extension follow
// the source.
//
// Interface and timing: on a rising `clk` edge with `en` high the register
// takes acc + sext(f), or just sext(f) when `first` is also high (start of a
// new frame, so no separate clear is needed). `acc` is the register output.
// Synchronous active-low reset clears it. The `first` load and the reset are
// this design's choices; the source leaves clearing unstated.
module wt_accumulator #(
  parameter int unsigned WI = 4,
  parameter int unsigned WO = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 first,
  input  logic signed [WI-1:0] f,
  output logic signed [WO-1:0] acc
);
  logic signed [WO-1:0] f_ext;
  logic signed [WO-1:0] sum;

  assign f_ext = {{(WO - WI){f[WI-1]}}, f};
  assign sum   = (first ? '0 : acc) + f_ext;

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= sum;
  end

  initial assert (WO > WI) else $error("WO must exceed WI");
endmodule
