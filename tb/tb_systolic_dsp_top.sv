// tb_systolic_dsp_top: end-to-end test of the top level at its default sizes.
// All five arrays run at the same time, each on its own workload:
//   forward FIR  - the published 3-tap example (coefficients 1, samples
//                  1..9,0,1,2), then random data with one PE bypassed;
//   backward FIR - the published zero-interleaved example, samples 1..6;
//   matrix       - the published 4x4 example A = B = [1..16], then a
//                  random product after a clear;
//   ARMA         - random zero-interleaved samples through a random filter;
//   wavefront    - a random stream with a slow consumer.
// Each output is compared with a reference computed here. The mechanisms of
// the design are counted and each must occur: PE bypass, zero-slot outputs
// of the interleaved arrays, accumulator clear, ARMA feedback, wavefront
// back-pressure and wavefront firing of every PE.
module tb_systolic_dsp_top;
  import systolic_pkg::*;
  localparam int W = DATA_W;
  localparam int MF = FIR_TAPS, MB = FIR_TAPS, N = MM_N, NA = ARMA_SECT, MW = FIR_TAPS;

  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] fwd_x, fwd_y, fwd_b [MF], fwd_x_tap [MF], fwd_bx_tap [MF], fwd_s_tap [MF];
  logic [MF-1:0] fwd_fault;
  logic signed [W-1:0] bwd_x, bwd_y, bwd_b [MB], bwd_x_tap [MB], bwd_bx_tap [MB], bwd_s_tap [MB];
  logic mm_clr;
  logic signed [W-1:0] mm_a_in [N], mm_b_in [N], mm_a_out [N], mm_b_out [N];
  logic signed [W-1:0] mm_c [N][N];
  logic signed [W-1:0] arma_x, arma_y, arma_w, arma_a [NA], arma_b [NA];
  logic signed [W-1:0] wf_b [MW], wf_x_data, wf_y_data;
  logic wf_x_rdy, wf_x_ack, wf_y_rdy, wf_y_ack;
  logic [MW-1:0] wf_fire;

  int checks = 0, failures = 0;
  int n_bypass = 0, n_zero_slot = 0, n_clear = 0, n_feedback = 0, n_backpressure = 0;
  int n_fire [MW];

  always #5 clk = ~clk;

  systolic_dsp_top dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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
      $display("%s step %0d: got %0d, expected %0d", what, t, got, exp);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && wf_x_rdy && !wf_x_ack && wf_y_rdy && !wf_y_ack) n_backpressure++;
    for (int i = 0; i < MW; i++) if (rst_n && wf_fire[i]) n_fire[i]++;
  end

  // ------------------------------------------------------------ forward FIR
  int fwd_y_tab [12] = '{0,0,0,0,1,3,6,9,12,15,18,21};
  logic signed [W-1:0] fxh [200];
  task automatic run_fwd();
    for (int i = 0; i < MF; i++) fwd_b[i] = 1;
    fwd_fault = '0;
    for (int t = 0; t < 12; t++) begin
      fwd_x = W'((t < 9) ? t + 1 : t - 9);
      #2 chk("fwd y (published example)", t + 1, fwd_y, W'(fwd_y_tab[t]));
      @(negedge clk);
    end
    // one PE bypassed: the remaining PEs act as a shorter filter
    fwd_fault = MF'(1) << 1;
    for (int i = 0; i < MF; i++) fwd_b[i] = W'(i + 2);
    for (int t = 0; t < 200; t++) begin
      logic signed [W-1:0] e;
      int dx;
      fwd_x = W'($urandom_range(0, 100)) - W'(50);
      fxh[t] = fwd_x;
      #2;
      e = 0; dx = 0;
      for (int i = 1; i <= MF; i++) begin
        dx += fwd_fault[i-1] ? 1 : 2;
        if (!fwd_fault[i-1] && t - (MF - i) - dx >= 0)
          e = W'(e + W'(fwd_b[i-1] * fxh[t - (MF - i) - dx]));
      end
      // allow the pipe to refill after the switch-over
      if (t >= 3 * MF) begin
        chk("fwd y (bypass)", t, fwd_y, e);
        n_bypass++;
      end
      @(negedge clk);
    end
  endtask

  // ----------------------------------------------------------- backward FIR
  int bwd_y_tab [12] = '{0,0,1,0,3,0,6,0,9,0,12,0};
  task automatic run_bwd();
    for (int i = 0; i < MB; i++) bwd_b[i] = 1;
    for (int t = 0; t < 12; t++) begin
      bwd_x = (t % 2 == 0) ? W'(t / 2 + 1) : W'(0);
      #2 chk("bwd y (published example)", t + 1, bwd_y, W'(bwd_y_tab[t]));
      if (t % 2 == 1) n_zero_slot++;
      @(negedge clk);
    end
    bwd_x = 0;
  endtask

  // ----------------------------------------------------------------- matrix
  logic signed [W-1:0] A [N][N], B [N][N];
  task automatic mm_feed();
    for (int t = 0; t < 3 * N - 1; t++) begin
      for (int i = 0; i < N; i++) begin
        mm_a_in[i] = (t - i >= 0 && t - i < N) ? A[i][t-i] : '0;
        mm_b_in[i] = (t - i >= 0 && t - i < N) ? B[t-i][i] : '0;
      end
      @(negedge clk);
    end
  endtask
  task automatic mm_check(input string what);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        logic signed [W-1:0] e;
        e = 0;
        for (int k = 0; k < N; k++) e = W'(e + W'(A[i][k] * B[k][j]));
        chk(what, N * i + j, mm_c[i][j], e);
      end
  endtask
  task automatic run_mm();
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        A[i][j] = W'(N * i + j + 1);
        B[i][j] = W'(N * i + j + 1);
      end
    mm_feed();
    mm_check("mm C (published example)");
    if (N == 4) begin
      chk("mm c11", 0, mm_c[0][0], W'(90));
      chk("mm c44", 0, mm_c[N-1][N-1], W'(600));
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        A[i][j] = W'($urandom_range(0, 40)) - W'(20);
        B[i][j] = W'($urandom_range(0, 40)) - W'(20);
      end
    mm_clr = 1;
    @(negedge clk);
    mm_clr = 0;
    n_clear++;
    mm_feed();
    mm_check("mm C (random)");
  endtask

  // ------------------------------------------------------------------- ARMA
  logic signed [W-1:0] axs [100], ays [100];
  task automatic run_arma();
    for (int k = 0; k < NA; k++) begin
      arma_a[k] = W'($urandom_range(0, 4)) - W'(2);
      arma_b[k] = W'($urandom_range(0, 6)) - W'(3);
    end
    arma_a[0] = 1;
    for (int t = 0; t < 200; t++) begin
      int n;
      n = t / 2;
      if (t % 2 == 0) begin
        axs[n] = W'($urandom_range(0, 100)) - W'(50);
        arma_x = axs[n];
      end else arma_x = 0;
      #2;
      if (t % 2 == 0) begin
        logic signed [W-1:0] e, fb;
        e = 0; fb = 0;
        for (int k = 1; k <= NA; k++)
          if (n - k >= 0) begin
            e  = W'(e + W'(arma_b[k-1] * axs[n-k]));
            fb = W'(fb + W'(arma_a[k-1] * ays[n-k]));
          end
        ays[n] = W'(e + fb);
        if (fb != 0) n_feedback++;
        chk("arma y", n, arma_y, ays[n]);
      end else begin
        chk("arma zero slot", t, arma_y, '0);
        n_zero_slot++;
      end
      @(negedge clk);
    end
  endtask

  // -------------------------------------------------------------- wavefront
  localparam int KW = 60;
  logic signed [W-1:0] wxs [KW], wys [KW];
  task automatic run_wf();
    for (int i = 0; i < MW; i++) wf_b[i] = W'(i) - W'(1);
    for (int k = 0; k < KW; k++) wxs[k] = W'($urandom_range(0, 100)) - W'(50);
    fork
      for (int k = 0; k < KW; k++) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        wf_x_data = wxs[k]; wf_x_rdy = 1;
        do @(negedge clk); while (!wf_x_ack);
        wf_x_rdy = 0;
        do @(negedge clk); while (wf_x_ack);
      end
      for (int k = 0; k < KW; k++) begin
        do @(negedge clk); while (!wf_y_rdy);
        repeat ($urandom_range(0, (k > KW / 2) ? 30 : 2)) @(negedge clk);
        wys[k] = wf_y_data;
        wf_y_ack = 1;
        do @(negedge clk); while (wf_y_rdy);
        wf_y_ack = 0;
      end
    join
    for (int k = 0; k < KW; k++) begin
      logic signed [W-1:0] e;
      e = 0;
      for (int i = 1; i <= MW; i++) if (k - i >= 0) e = W'(e + W'(wf_b[i-1] * wxs[k-i]));
      chk("wf y", k, wys[k], e);
    end
  endtask

  initial begin
    fwd_x = 0; fwd_fault = '0; bwd_x = 0; mm_clr = 0; arma_x = 0;
    wf_x_data = 0; wf_x_rdy = 0; wf_y_ack = 0;
    for (int i = 0; i < MF; i++) fwd_b[i] = 0;
    for (int i = 0; i < MB; i++) bwd_b[i] = 0;
    for (int i = 0; i < N; i++) begin mm_a_in[i] = 0; mm_b_in[i] = 0; end
    for (int i = 0; i < NA; i++) begin arma_a[i] = 0; arma_b[i] = 0; end
    for (int i = 0; i < MW; i++) begin wf_b[i] = 0; n_fire[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    fork
      run_fwd();
      run_bwd();
      run_mm();
      run_arma();
      run_wf();
    join
    checks++; if (n_bypass == 0)       begin failures++; $display("bypass never used"); end
    checks++; if (n_zero_slot == 0)    begin failures++; $display("no zero slot seen"); end
    checks++; if (n_clear == 0)        begin failures++; $display("accumulators never cleared"); end
    checks++; if (n_feedback == 0)     begin failures++; $display("ARMA feedback never contributed"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("no wavefront back-pressure"); end
    for (int i = 0; i < MW; i++) begin
      checks++;
      if (n_fire[i] != KW) begin failures++; $display("wf PE %0d fired %0d times", i, n_fire[i]); end
    end
    $display("mechanisms: bypass=%0d zero_slots=%0d clears=%0d feedback=%0d backpressure=%0d",
             n_bypass, n_zero_slot, n_clear, n_feedback, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
