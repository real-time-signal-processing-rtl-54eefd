// tb_fir_bwd_array: self-checking test of the backward systolic FIR array.
// Part 1 replays the published 3-tap example (coefficients 1, samples 1..6
// each followed by a zero) and compares every line of the pipe with the
// expected table, cycle by cycle; it checks that a result appears 2 cycles
// after its sample and only every second cycle. Part 2 uses random
// coefficients and a random zero-interleaved stream and checks each result
// against y(n) = sum_i b_i x(n-i+1), and the zero slots against 0.
module tb_fir_bwd_array;
  localparam int W = 16;
  localparam int M = 3;
  localparam int NS = 150;   // samples in part 2

  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] x_in, y;
  logic signed [W-1:0] b [M];
  logic signed [W-1:0] x_tap [M], bx_tap [M], s_tap [M];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fir_bwd_array #(.W(W), .M(M)) dut (.*);

  initial begin : watchdog
    repeat (2 * NS + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected pipe contents, columns x0 x1 x2 x3 b1x1 b2x2 b3x3 s0 s1 s2 s3.
  // Column x1/b1x1/s1 belongs to the PE at the far end, x3/b3x3/s3 to the PE
  // at the input/output end (s3 is the filter output).
  int tab [12][11] = '{
    '{1,0,0,0, 0,0,0, 0,0,0,0},
    '{0,0,0,1, 0,0,1, 0,0,0,0},
    '{2,0,1,0, 0,1,0, 0,0,0,1},
    '{0,1,0,2, 1,0,2, 0,0,1,0},
    '{3,0,2,0, 0,2,0, 0,1,0,3},
    '{0,2,0,3, 2,0,3, 0,0,3,0},
    '{4,0,3,0, 0,3,0, 0,2,0,6},
    '{0,3,0,4, 3,0,4, 0,0,5,0},
    '{5,0,4,0, 0,4,0, 0,3,0,9},
    '{0,4,0,5, 4,0,5, 0,0,7,0},
    '{6,0,5,0, 0,5,0, 0,4,0,12},
    '{0,5,0,6, 5,0,6, 0,0,9,0}
  };

  task automatic chk(input string what, input int t, input logic signed [W-1:0] got,
                     input logic signed [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("cycle %0d %s = %0d, expected %0d", t, what, got, exp);
    end
  endtask

  logic signed [W-1:0] xs [NS];

  initial begin
    x_in = 0;
    for (int i = 0; i < M; i++) b[i] = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // ---------------- part 1 ----------------
    for (int t = 0; t < 12; t++) begin
      x_in = W'(tab[t][0]);
      #2;
      for (int c = 1; c <= M; c++) begin
        int pe;
        pe = M - c;   // column c belongs to PE M-c
        chk($sformatf("x%0d", c), t+1, x_tap[pe], W'(tab[t][c]));
        chk($sformatf("b%0dx%0d", c, c), t+1, bx_tap[pe], W'(tab[t][3+c]));
        chk($sformatf("s%0d", c), t+1, s_tap[pe], W'(tab[t][7+c]));
      end
      chk("y", t+1, y, W'(tab[t][10]));
      @(negedge clk);
    end
    // ---------------- part 2 ----------------
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < M; i++) b[i] = W'($urandom_range(0, 20)) - W'(10);
    for (int t = 0; t < 2 * NS; t++) begin
      int n;
      n = t / 2;
      if (t % 2 == 0) begin
        xs[n] = W'($urandom_range(0, 200)) - W'(100);
        x_in = xs[n];
      end else begin
        x_in = 0;
      end
      #2;
      // result for sample n-1 is on y two cycles after that sample
      if (t % 2 == 0 && n >= 1) begin
        logic signed [W-1:0] ey;
        ey = 0;
        for (int i = 1; i <= M; i++)
          if (n - i >= 0) ey = W'(ey + W'(b[i-1] * xs[n-i]));
        chk("y(n)", t, y, ey);
      end else if (t % 2 == 1) begin
        chk("zero slot", t, y, '0);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
