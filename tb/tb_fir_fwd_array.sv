// tb_fir_fwd_array: self-checking test of the forward systolic FIR array.
// Part 1 replays the published 3-tap example (all coefficients 1, samples
// 1..9,0,1,2 one per cycle from reset) and compares every line of the pipe,
// cycle by cycle, with the expected table (x taps, products, partial sums).
// It also checks the 4-cycle latency from a sample to its first contribution
// at the output. Part 2 drives random samples and coefficients with random
// bypass (fault) masks and compares y with the closed form
//   y(t) = sum over healthy PEs i of b_i * x(t - (M-i) - Dx(i)),
// Dx(i) being the sample-line delay up to PE i (2 per healthy, 1 per bypassed PE).
module tb_fir_fwd_array;
  localparam int W = 16;
  localparam int M = 3;
  localparam int NRAND = 400;

  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] x_in, y;
  logic signed [W-1:0] b [M];
  logic [M-1:0] fault;
  logic signed [W-1:0] x_tap [M], bx_tap [M], s_tap [M];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fir_fwd_array #(.W(W), .M(M)) dut (.*);

  initial begin : watchdog
    repeat (NRAND + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected pipe contents: x0 x1 x2 x3 b1x1 b2x2 b3x3 s0 s1 s2 s3
  int tab [12][11] = '{
    '{1,0,0,0, 0,0,0, 0,0,0,0},
    '{2,0,0,0, 0,0,0, 0,0,0,0},
    '{3,1,0,0, 1,0,0, 0,1,0,0},
    '{4,2,0,0, 2,0,0, 0,2,1,0},
    '{5,3,1,0, 3,1,0, 0,3,3,1},
    '{6,4,2,0, 4,2,0, 0,4,5,3},
    '{7,5,3,1, 5,3,1, 0,5,7,6},
    '{8,6,4,2, 6,4,2, 0,6,9,9},
    '{9,7,5,3, 7,5,3, 0,7,11,12},
    '{0,8,6,4, 8,6,4, 0,8,13,15},
    '{1,9,7,5, 9,7,5, 0,9,15,18},
    '{2,0,8,6, 0,8,6, 0,0,17,21}
  };

  task automatic chk(input string what, input int t, input logic signed [W-1:0] got,
                     input logic signed [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("cycle %0d %s = %0d, expected %0d", t, what, got, exp);
    end
  endtask

  logic signed [W-1:0] xh [NRAND];
  int first_y;

  initial begin
    // ---------------- part 1: published example ----------------
    x_in = 0; fault = '0;
    for (int i = 0; i < M; i++) b[i] = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    first_y = -1;
    for (int t = 0; t < 12; t++) begin
      x_in = W'(tab[t][0]);
      #2;
      for (int i = 0; i < M; i++) begin
        chk($sformatf("x%0d", i+1), t+1, x_tap[i], W'(tab[t][1+i]));
        chk($sformatf("b%0dx%0d", i+1, i+1), t+1, bx_tap[i], W'(tab[t][4+i]));
        chk($sformatf("s%0d", i+1), t+1, s_tap[i], W'(tab[t][8+i]));
      end
      chk("y", t+1, y, W'(tab[t][10]));
      if (first_y < 0 && y != 0) first_y = t;
      @(negedge clk);
    end
    // first sample enters in cycle 1 and first reaches y in cycle 5
    chk("latency", 0, W'(first_y), W'(4));

    // ---------------- part 2: random coefficients and faults ----------------
    for (int run = 0; run < 4; run++) begin
      rst_n = 0;
      @(negedge clk);
      rst_n = 1;
      fault = (run == 0) ? '0 : M'($urandom_range(1, (1 << M) - 1));
      for (int i = 0; i < M; i++) b[i] = W'($urandom_range(0, 30)) - W'(15);
      for (int t = 0; t < NRAND / 4; t++) begin
        logic signed [W-1:0] ey;
        int dx;
        x_in = W'($urandom_range(0, 200)) - W'(100);
        xh[t] = x_in;
        #2;
        ey = 0;
        dx = 0;
        for (int i = 1; i <= M; i++) begin
          int lag;
          dx += fault[i-1] ? 1 : 2;
          lag = (M - i) + dx;
          if (!fault[i-1] && t - lag >= 0) ey = W'(ey + W'(b[i-1] * xh[t-lag]));
        end
        chk($sformatf("y(fault=%b)", fault), t, y, ey);
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
