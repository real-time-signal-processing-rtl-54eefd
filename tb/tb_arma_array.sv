// tb_arma_array: self-checking test of the systolic ARMA filter.
// Samples are fed every other cycle with a zero in between, as the
// time-rescaled array requires. Each output is compared with the direct-form-1
// difference equation
//     y(n) = sum_{k=1..N} b_k x(n-k) + sum_{k=1..N} a_k y(n-k)
// evaluated here (16-bit wrap-around, like the array), and every in-between
// cycle must read 0. Runs: an impulse through a pure-feedback filter, then
// random coefficients and samples. Counts the results in which the feedback
// path contributed.
module tb_arma_array;
  localparam int W = 16;
  localparam int N = 3;
  localparam int NS = 120;

  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] x_in, y_out, w_in;
  logic signed [W-1:0] a [N], b [N];
  int checks = 0, failures = 0, n_feedback = 0;

  always #5 clk = ~clk;

  arma_array #(.W(W), .N(N)) dut (.*);

  initial begin : watchdog
    repeat (4 * 2 * NS + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input int t, input logic signed [W-1:0] got,
                     input logic signed [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("cycle %0d %s = %0d, expected %0d", t, what, got, exp);
    end
  endtask

  logic signed [W-1:0] xs [NS], ys [NS];

  task automatic run(input int kind);
    rst_n = 0;
    x_in = 0;
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2 * NS; t++) begin
      int n;
      n = t / 2;
      if (t % 2 == 0) begin
        if (kind == 0) xs[n] = (n == 0) ? W'(1) : W'(0);
        else           xs[n] = W'($urandom_range(0, 200)) - W'(100);
        x_in = xs[n];
      end else begin
        x_in = 0;
      end
      #2;
      if (t % 2 == 0) begin
        logic signed [W-1:0] e, fb;
        e = 0; fb = 0;
        for (int k = 1; k <= N; k++)
          if (n - k >= 0) begin
            e  = W'(e + W'(b[k-1] * xs[n-k]));
            fb = W'(fb + W'(a[k-1] * ys[n-k]));
          end
        ys[n] = W'(e + fb);
        if (fb != 0) n_feedback++;
        chk($sformatf("y(%0d)", n), t, y_out, ys[n]);
      end else begin
        chk("zero slot", t, y_out, '0);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    x_in = 0;
    repeat (3) @(posedge clk);
    // impulse through y(n) = x(n-1) + 2 x(n-3) + y(n-1) - y(n-2)
    a[0] = 1; a[1] = -1; a[2] = 0;
    b[0] = 1; b[1] = 0;  b[2] = 2;
    run(0);
    for (int r = 0; r < 3; r++) begin
      for (int k = 0; k < N; k++) begin
        a[k] = W'($urandom_range(0, 6)) - W'(3);
        b[k] = W'($urandom_range(0, 10)) - W'(5);
      end
      run(1);
    end
    checks++;
    if (n_feedback == 0) begin failures++; $display("feedback never contributed"); end
    $display("feedback contributed to %0d results", n_feedback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
