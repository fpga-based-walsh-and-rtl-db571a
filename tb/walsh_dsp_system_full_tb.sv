// walsh_dsp_system_full_tb: the system at its default build (N = 4, 4-bit
// samples, addition). Streams the worked frame x = -6, -2, 3, 7,
// g = 6, 6, 5, -5 and then random frames, back to back and with idle
// cycles, and checks every output sample against x + g of the previous frame,
// plus the printed coefficient rows A = 2, -8, -18, 0, B = 12, 10, 12, -10,
// C = 14, 2, -6, -10 and outputs h = 0, 4, 8, 2.
module walsh_dsp_system_full_tb;
  logic clk = 1'b0, rst_n = 1'b0, enter = 1'b0;
  logic signed [3:0] x = '0, g = '0;
  logic signed [5:0] a [4], b [4];
  logic signed [6:0] c [4];
  logic coef_valid, h_valid;
  logic signed [4:0] h;
  logic [1:0] h_count;
  int checks = 0, failures = 0;

  walsh_dsp_system dut (.clk, .rst_n, .enter, .x, .g, .a, .b, .c, .coef_valid, .h, .h_valid, .h_count);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int frames [$][2][4];   // queued input frames, x then g
  int out_frame = 0, out_pos = 0;

  // Output side: frame f's results appear while frame f+1 is entered.
  always @(negedge clk) begin
    if (rst_n && h_valid) begin
      automatic int exp = 0;
      if (out_frame > 0) exp = frames[out_frame - 1][0][out_pos] + frames[out_frame - 1][1][out_pos];
      check($sformatf("frame %0d h%0d", out_frame - 1, out_pos), int'(h), exp);
      check("h_count", int'(h_count), out_pos);
      if (out_pos == 3) out_frame++;
      out_pos = (out_pos + 1) % 4;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fx [2][4];
    int ta [4] = '{2, -8, -18, 0};
    int tbv [4] = '{12, 10, 12, -10};
    int tcv [4] = '{14, 2, -6, -10};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int fr = 0; fr < 60; fr++) begin
      if (fr == 0) fx = '{'{-6, -2, 3, 7}, '{6, 6, 5, -5}};
      else if (fr == 59) fx = '{'{0, 0, 0, 0}, '{0, 0, 0, 0}};
      else for (int k = 0; k < 4; k++) begin
        fx[0][k] = int'($urandom % 15) - 7;
        fx[1][k] = int'($urandom % 15) - 7;
      end
      frames.push_back(fx);
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        while (fr % 2 == 1 && $urandom % 3 == 0) begin
          enter = 1'b0;
          @(negedge clk);
        end
        enter = 1'b1; x = 4'(fx[0][k]); g = 4'(fx[1][k]);
      end
      if (fr == 0) begin
        @(negedge clk);
        enter = 1'b0;
        @(negedge clk iff coef_valid);
        for (int n = 0; n < 4; n++) begin
          check($sformatf("A%0d", n), int'(a[n]), ta[n]);
          check($sformatf("B%0d", n), int'(b[n]), tbv[n]);
          check($sformatf("C%0d", n), int'(c[n]), tcv[n]);
        end
      end
    end
    @(negedge clk);
    enter = 1'b0;
    repeat (6) @(negedge clk);
    check("frames streamed out", out_frame, 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
