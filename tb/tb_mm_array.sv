// tb_mm_array: self-checking test of the 4x4 systolic matrix multiplier.
// Part 1 replays the published example A = B = [1..16] row by row, with the
// skewed leading-zero inputs, and compares all 16 accumulators in every one
// of the 11 cycles with the published table of C; C must be complete in
// cycle 11 and C11 final in cycle 5. Part 2 multiplies random signed
// matrices (after a clear) and compares with a product computed here.
module tb_mm_array;
  localparam int W = 16;
  localparam int N = 4;

  logic clk = 0, rst_n = 0, clr;
  logic signed [W-1:0] a_in [N], b_in [N], a_out [N], b_out [N];
  logic signed [W-1:0] c [N][N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mm_array #(.W(W), .N(N)) dut (.*);

  initial begin : watchdog
    repeat (400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Published accumulator contents c1..c16 (row-major) for cycles 1..11.
  int ctab [11][16] = '{
    '{ 0,  0,  0,  0,   0,  0,  0,  0,   0,  0,  0,  0,   0,  0,  0,  0},
    '{ 1,  0,  0,  0,   0,  0,  0,  0,   0,  0,  0,  0,   0,  0,  0,  0},
    '{11,  2,  0,  0,   5,  0,  0,  0,   0,  0,  0,  0,   0,  0,  0,  0},
    '{38, 14,  3,  0,  35, 10,  0,  0,   9,  0,  0,  0,   0,  0,  0,  0},
    '{90, 44, 17,  4,  98, 46, 15,  0,  59, 18,  0,  0,  13,  0,  0,  0},
    '{90,100, 50, 20, 202,116, 57, 20, 158, 78, 27,  0,  83, 26,  0,  0},
    '{90,100,110, 56, 202,228,134, 68, 314,188, 97, 36, 218,110, 39,  0},
    '{90,100,110,120, 202,228,254,152, 314,356,218,116, 426,260,137, 52},
    '{90,100,110,120, 202,228,254,280, 314,356,398,248, 426,484,302,164},
    '{90,100,110,120, 202,228,254,280, 314,356,398,440, 426,484,542,344},
    '{90,100,110,120, 202,228,254,280, 314,356,398,440, 426,484,542,600}
  };

  logic signed [W-1:0] A [N][N], B [N][N];

  task automatic chk(input string what, input int t, input logic signed [W-1:0] got,
                     input logic signed [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("cycle %0d %s = %0d, expected %0d", t, what, got, exp);
    end
  endtask

  // Skewed feed: in cycle t (0-based) row i gets A[i][t-i], column j gets B[t-j][j].
  task automatic drive(input int t);
    for (int i = 0; i < N; i++) begin
      a_in[i] = (t - i >= 0 && t - i < N) ? A[i][t-i] : '0;
      b_in[i] = (t - i >= 0 && t - i < N) ? B[t-i][i] : '0;
    end
  endtask

  initial begin
    int done_cycle;
    clr = 0;
    for (int i = 0; i < N; i++) begin a_in[i] = 0; b_in[i] = 0; end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        A[i][j] = W'(N * i + j + 1);
        B[i][j] = W'(N * i + j + 1);
      end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // ---------------- part 1: published example ----------------
    done_cycle = -1;
    for (int t = 0; t < 11; t++) begin
      bit all_done;
      drive(t);
      #2;
      all_done = 1;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          chk($sformatf("c%0d%0d", i+1, j+1), t+1, c[i][j], W'(ctab[t][N*i+j]));
          if (c[i][j] != W'(ctab[10][N*i+j])) all_done = 0;
        end
      if (all_done && done_cycle < 0) done_cycle = t + 1;
      if (t == 4) chk("c11 final by cycle 5", t+1, c[0][0], W'(90));
      if (t == 3) chk("c11 not final before cycle 5", t+1, W'(c[0][0] != 90), W'(1));
      @(negedge clk);
    end
    chk("cycles to complete C", 0, W'(done_cycle), W'(3 * N - 1));
    // ---------------- part 2: random matrices ----------------
    for (int run = 0; run < 3; run++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          A[i][j] = W'($urandom_range(0, 40)) - W'(20);
          B[i][j] = W'($urandom_range(0, 40)) - W'(20);
        end
      for (int i = 0; i < N; i++) begin a_in[i] = 0; b_in[i] = 0; end
      clr = 1;
      @(negedge clk);
      clr = 0;
      for (int t = 0; t < 3 * N - 1; t++) begin
        drive(t);
        @(negedge clk);
      end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          logic signed [W-1:0] e;
          e = 0;
          for (int k = 0; k < N; k++) e = W'(e + W'(A[i][k] * B[k][j]));
          chk($sformatf("run %0d c%0d%0d", run, i+1, j+1), 0, c[i][j], e);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
