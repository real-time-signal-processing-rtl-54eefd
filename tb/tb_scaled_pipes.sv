// tb_scaled_pipes: self-checking test of the arrays grown beyond their
// default sizes. Every array is written for any pipe length, and the
// algorithms are meant to scale with it; this bench checks that the timing
// rules hold at other sizes, not only at the default one.
//   * forward FIR with 10 taps: first output M+1 cycles after the first
//     sample, then one result per cycle; a run with random bypassed PEs is
//     checked against the bypass closed form
//       y(t) = sum over healthy i of b_i x(t - (M-i) - Dx(i)),
//       Dx(i) = sum_{j<=i} (2 if PE j healthy else 1).
//   * backward FIR with 10 taps, zero-interleaved input: the result for
//     sample n is on y two cycles after x(n), zero slots read 0.
//   * matrix multiplier at N = 3 and N = 6: random signed matrices with the
//     skewed feed, C complete in cycle 3N-1 and not before.
// The sizes 10, 3 and 6 are this bench's own choice; the references are
// computed here from the formulas above.
module tb_scaled_pipes;
  localparam int W   = 16;
  localparam int MF  = 10;   // taps of the forward and backward FIR
  localparam int NS  = 120;  // samples per FIR run
  localparam int NA  = 3;    // small matrix size
  localparam int NB  = 6;    // large matrix size

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // ---------------- devices under test ----------------
  logic signed [W-1:0] f_x, f_y;
  logic signed [W-1:0] f_b [MF];
  logic        [MF-1:0] f_fault;
  logic signed [W-1:0] f_xt [MF], f_bxt [MF], f_st [MF];
  fir_fwd_array #(.W(W), .M(MF)) u_fwd (
    .clk, .rst_n, .x_in(f_x), .b(f_b), .fault(f_fault), .y(f_y),
    .x_tap(f_xt), .bx_tap(f_bxt), .s_tap(f_st));

  logic signed [W-1:0] k_x, k_y;
  logic signed [W-1:0] k_b [MF];
  logic signed [W-1:0] k_xt [MF], k_bxt [MF], k_st [MF];
  fir_bwd_array #(.W(W), .M(MF)) u_bwd (
    .clk, .rst_n, .x_in(k_x), .b(k_b), .y(k_y),
    .x_tap(k_xt), .bx_tap(k_bxt), .s_tap(k_st));

  logic                a_clr;
  logic signed [W-1:0] a_ain [NA], a_bin [NA], a_aout [NA], a_bout [NA];
  logic signed [W-1:0] a_c [NA][NA];
  mm_array #(.W(W), .N(NA)) u_mm_a (
    .clk, .rst_n, .clr(a_clr), .a_in(a_ain), .b_in(a_bin), .c(a_c),
    .a_out(a_aout), .b_out(a_bout));

  logic                m_clr;
  logic signed [W-1:0] m_ain [NB], m_bin [NB], m_aout [NB], m_bout [NB];
  logic signed [W-1:0] m_c [NB][NB];
  mm_array #(.W(W), .N(NB)) u_mm_b (
    .clk, .rst_n, .clr(m_clr), .a_in(m_ain), .b_in(m_bin), .c(m_c),
    .a_out(m_aout), .b_out(m_bout));

  initial begin : watchdog
    repeat (3000) @(posedge clk);
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
      $display("step %0d %s = %0d, expected %0d", t, what, got, exp);
    end
  endtask

  logic signed [W-1:0] xh [NS];
  logic signed [W-1:0] A  [NB][NB], B [NB][NB];

  // Forward FIR run with the given bypass pattern; checks y in every cycle.
  task automatic run_fwd(input logic [MF-1:0] flt);
    int first_y;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    f_fault = flt;
    for (int i = 0; i < MF; i++) begin
      f_b[i] = W'($urandom_range(1, 15));
      if ($urandom_range(0, 1) == 1) f_b[i] = -f_b[i];
    end
    first_y = -1;
    for (int t = 0; t < NS; t++) begin
      logic signed [W-1:0] ey;
      int dx;
      // first sample is nonzero so that the latency can be seen on y
      f_x = (t == 0) ? W'(1) : W'($urandom_range(0, 200)) - W'(100);
      xh[t] = f_x;
      #2;
      ey = 0;
      dx = 0;
      for (int i = 1; i <= MF; i++) begin
        int lag;
        dx += flt[i-1] ? 1 : 2;
        lag = (MF - i) + dx;
        if (!flt[i-1] && t - lag >= 0) ey = W'(ey + W'(f_b[i-1] * xh[t-lag]));
      end
      chk($sformatf("fwd y (fault=%b)", flt), t, f_y, ey);
      if (first_y < 0 && f_y != 0) first_y = t;
      @(negedge clk);
    end
    if (flt == '0) chk("fwd latency M+1", 0, W'(first_y), W'(MF + 1));
  endtask

  // Backward FIR run with a zero after every sample.
  task automatic run_bwd();
    int first_y;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < MF; i++) k_b[i] = W'($urandom_range(0, 20)) - W'(10);
    k_b[0] = 3;   // nonzero first tap, so the latency can be seen on y
    first_y = -1;
    for (int t = 0; t < 2 * (NS / 2); t++) begin
      int n;
      n = t / 2;
      if (t % 2 == 0) begin
        xh[n] = (n == 0) ? W'(1) : W'($urandom_range(0, 200)) - W'(100);
        k_x = xh[n];
      end else begin
        k_x = 0;
      end
      #2;
      if (t % 2 == 0 && n >= 1) begin
        logic signed [W-1:0] ey;
        ey = 0;
        for (int i = 1; i <= MF; i++)
          if (n - i >= 0) ey = W'(ey + W'(k_b[i-1] * xh[n-i]));
        chk("bwd y(n)", t, k_y, ey);
      end else if (t % 2 == 1) begin
        chk("bwd zero slot", t, k_y, '0);
      end
      if (first_y < 0 && k_y != 0) first_y = t;
      @(negedge clk);
    end
    chk("bwd latency 2", 0, W'(first_y), W'(2));
  endtask

  // Matrix product at size n on one of the two arrays (sel 0: NA, 1: NB).
  task automatic run_mm(input int sel);
    int n, done_cycle;
    n = (sel == 0) ? NA : NB;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        A[i][j] = W'($urandom_range(0, 40)) - W'(20);
        B[i][j] = W'($urandom_range(0, 40)) - W'(20);
      end
    // the last product to arrive, a_nn * b_nn into c_nn, is nonzero, so C
    // cannot look complete before it
    A[n-1][n-1] = 9;
    B[n-1][n-1] = 5;
    if (sel == 0) a_clr = 1; else m_clr = 1;
    @(negedge clk);
    a_clr = 0;
    m_clr = 0;
    done_cycle = -1;
    for (int t = 0; t < 3 * n; t++) begin
      bit all_done;
      for (int i = 0; i < n; i++) begin
        logic signed [W-1:0] av, bv;
        av = (t - i >= 0 && t - i < n) ? A[i][t-i] : '0;
        bv = (t - i >= 0 && t - i < n) ? B[t-i][i] : '0;
        if (sel == 0) begin a_ain[i] = av; a_bin[i] = bv; end
        else          begin m_ain[i] = av; m_bin[i] = bv; end
      end
      #2;
      all_done = 1;
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          logic signed [W-1:0] e, got;
          e = 0;
          for (int k = 0; k < n; k++) e = W'(e + W'(A[i][k] * B[k][j]));
          got = (sel == 0) ? a_c[i][j] : m_c[i][j];
          if (got != e) all_done = 0;
          if (t == 3 * n - 2) chk($sformatf("mm N=%0d c%0d%0d", n, i+1, j+1), t+1, got, e);
        end
      if (all_done && done_cycle < 0) done_cycle = t + 1;
      @(negedge clk);
    end
    chk($sformatf("mm N=%0d cycles to complete C", n), 0, W'(done_cycle), W'(3 * n - 1));
    for (int i = 0; i < n; i++) begin
      if (sel == 0) begin a_ain[i] = 0; a_bin[i] = 0; end
      else          begin m_ain[i] = 0; m_bin[i] = 0; end
    end
  endtask

  initial begin
    f_x = 0; k_x = 0; f_fault = '0; a_clr = 0; m_clr = 0;
    for (int i = 0; i < MF; i++) begin f_b[i] = 0; k_b[i] = 0; end
    for (int i = 0; i < NA; i++) begin a_ain[i] = 0; a_bin[i] = 0; end
    for (int i = 0; i < NB; i++) begin m_ain[i] = 0; m_bin[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run_fwd('0);
    for (int r = 0; r < 3; r++) run_fwd(MF'($urandom_range(1, (1 << MF) - 1)));
    run_bwd();
    for (int r = 0; r < 3; r++) begin
      run_mm(0);
      run_mm(1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
