// tb_wf_fir_array: self-checking test of the wavefront FIR array.
// A four-phase source offers samples and a four-phase sink takes results,
// both with random response times; in the second half the sink holds off for
// long stretches so the array fills and stops accepting samples
// (back-pressure), which is counted and must happen. Every result is checked,
// in order, against y(k) = sum_i b_i x(k-i). A first phase with an
// immediate source and sink measures the sustained rate (cycles per sample).
module tb_wf_fir_array;
  localparam int W = 16;
  localparam int M = 3;
  localparam int K = 200;

  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] b [M];
  logic signed [W-1:0] x_data, y_data;
  logic x_rdy, x_ack, y_rdy, y_ack;
  logic [M-1:0] fire;
  int checks = 0, failures = 0, n_stall = 0;
  bit slow_sink = 0;

  always #5 clk = ~clk;

  wf_fir_array #(.W(W), .M(M)) dut (.*);

  initial begin : watchdog
    repeat (K * 120 + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // back-pressure: sample offered and not taken while a result waits unread
  always @(posedge clk)
    if (rst_n && x_rdy && !x_ack && y_rdy && !y_ack) n_stall++;

  logic signed [W-1:0] xs [K], ys [K];

  task automatic chk(input string what, input int k, input logic signed [W-1:0] got,
                     input logic signed [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("token %0d %s = %0d, expected %0d", k, what, got, exp);
    end
  endtask

  task automatic stream(input int k0, input int k1, input int maxsrc, input int maxsnk);
    fork
      for (int k = k0; k < k1; k++) begin
        repeat ($urandom_range(0, maxsrc)) @(negedge clk);
        x_data = xs[k]; x_rdy = 1;
        do @(negedge clk); while (!x_ack);
        x_rdy = 0; x_data = W'($urandom);
        do @(negedge clk); while (x_ack);
      end
      for (int k = k0; k < k1; k++) begin
        do @(negedge clk); while (!y_rdy);
        repeat ($urandom_range(0, maxsnk)) @(negedge clk);
        ys[k] = y_data;
        y_ack = 1;
        do @(negedge clk); while (y_rdy);
        y_ack = 0;
      end
    join
  endtask

  initial begin
    longint t0, t1;
    x_rdy = 0; y_ack = 0; x_data = 0;
    for (int i = 0; i < M; i++) b[i] = W'($urandom_range(0, 20)) - W'(10);
    for (int k = 0; k < K; k++) xs[k] = W'($urandom_range(0, 200)) - W'(100);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // phase 1: immediate agents, rate measurement
    t0 = $time;
    stream(0, K / 4, 0, 0);
    t1 = $time;
    $display("sustained rate: %0d cycles for %0d samples", (t1 - t0) / 10, K / 4);
    // phase 2: random agents
    stream(K / 4, K / 2, 5, 5);
    // phase 3: slow sink, back-pressure
    stream(K / 2, K, 1, 40);
    for (int k = 0; k < K; k++) begin
      logic signed [W-1:0] e;
      e = 0;
      for (int i = 1; i <= M; i++)
        if (k - i >= 0) e = W'(e + W'(b[i-1] * xs[k-i]));
      chk("y", k, ys[k], e);
    end
    checks++;
    if (n_stall == 0) begin failures++; $display("back-pressure never happened"); end
    $display("back-pressure cycles: %0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
