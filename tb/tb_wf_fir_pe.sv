// tb_wf_fir_pe: self-checking test of the wavefront FIR PE.
// Four independent four-phase agents with random response times drive the
// x and sum inputs and absorb the x and sum outputs. For the k-th transfer
// the PE must deliver x_out(k) = x_in(k-1) and s_out(k) = s_in(k) + b*x_in(k-1)
// (x_in(-1) = 0), in order, with nothing lost or duplicated. The handshake
// rules on the PE's outputs are checked by its assertions; the agents also
// check that every input transfer was acknowledged. Also checks that the PE
// fired exactly once per pair.
module tb_wf_fir_pe;
  localparam int W = 16;
  localparam int K = 150;

  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] b;
  logic signed [W-1:0] xi_data, si_data, xo_data, so_data;
  logic xi_rdy, xi_ack, si_rdy, si_ack, xo_rdy, xo_ack, so_rdy, so_ack, fire;
  int checks = 0, failures = 0, n_fire = 0;

  always #5 clk = ~clk;

  wf_fir_pe #(.W(W)) dut (.*);

  initial begin : watchdog
    repeat (K * 60 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && fire) n_fire++;

  logic signed [W-1:0] xs [K], ss [K];
  logic signed [W-1:0] gx [K], gs [K];
  int nx = 0, ns = 0;

  task automatic chk(input string what, input int k, input logic signed [W-1:0] got,
                     input logic signed [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("token %0d %s = %0d, expected %0d", k, what, got, exp);
    end
  endtask

  initial begin
    b = -7;
    xi_rdy = 0; si_rdy = 0; xo_ack = 0; so_ack = 0; xi_data = 0; si_data = 0;
    for (int k = 0; k < K; k++) begin
      xs[k] = W'($urandom_range(0, 2000)) - W'(1000);
      ss[k] = W'($urandom);
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    fork
      // x source
      for (int k = 0; k < K; k++) begin
        repeat ($urandom_range(0, 4)) @(negedge clk);
        xi_data = xs[k]; xi_rdy = 1;
        do @(negedge clk); while (!xi_ack);
        xi_rdy = 0; xi_data = W'($urandom);
        do @(negedge clk); while (xi_ack);
      end
      // sum source
      for (int k = 0; k < K; k++) begin
        repeat ($urandom_range(0, 6)) @(negedge clk);
        si_data = ss[k]; si_rdy = 1;
        do @(negedge clk); while (!si_ack);
        si_rdy = 0; si_data = W'($urandom);
        do @(negedge clk); while (si_ack);
      end
      // x sink
      for (int k = 0; k < K; k++) begin
        do @(negedge clk); while (!xo_rdy);
        repeat ($urandom_range(0, 5)) @(negedge clk);
        gx[k] = xo_data; nx++;
        xo_ack = 1;
        do @(negedge clk); while (xo_rdy);
        xo_ack = 0;
      end
      // sum sink
      for (int k = 0; k < K; k++) begin
        do @(negedge clk); while (!so_rdy);
        repeat ($urandom_range(0, 3)) @(negedge clk);
        gs[k] = so_data; ns++;
        so_ack = 1;
        do @(negedge clk); while (so_rdy);
        so_ack = 0;
      end
    join
    repeat (5) @(negedge clk);
    for (int k = 0; k < K; k++) begin
      logic signed [W-1:0] xp;
      xp = (k == 0) ? W'(0) : xs[k-1];
      chk("x_out", k, gx[k], xp);
      chk("s_out", k, gs[k], W'(ss[k] + W'(b * xp)));
    end
    chk("fire count", 0, W'(n_fire), W'(K));
    chk("no stray x output", 0, W'(xo_rdy), W'(0));
    chk("no stray s output", 0, W'(so_rdy), W'(0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
