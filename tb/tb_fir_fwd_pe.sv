// tb_fir_fwd_pe: self-checking test of the forward systolic FIR PE.
// Random samples, partial sums and coefficients are applied; a reference
// model keeps the input history and predicts x_out = x_in two cycles earlier,
// bx = b*x_out and s_out = s_in one cycle earlier + bx, checked every cycle.
module tb_fir_fwd_pe;
  localparam int W = 16;
  localparam int NCYC = 200;

  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] x_in, s_in, b, x_out, s_out, bx;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fir_fwd_pe #(.W(W)) dut (.*);

  initial begin : watchdog
    repeat (NCYC + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [W-1:0] xh [NCYC];
  logic signed [W-1:0] sh [NCYC];

  initial begin
    x_in = 0; s_in = 0; b = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < NCYC; t++) begin
      logic signed [W-1:0] ex, es, eb;
      x_in  = W'($urandom_range(0, 2000)) - W'(1000);
      s_in  = W'($urandom);
      if (t % 50 == 0) b = W'($urandom_range(0, 40)) - W'(20);
      xh[t] = x_in;
      sh[t] = s_in;
      #2;
      ex = (t >= 2) ? xh[t-2] : '0;
      eb = W'(b * ex);
      es = W'(((t >= 1) ? sh[t-1] : W'(0)) + eb);
      checks += 3;
      if (x_out !== ex) begin failures++; $display("t=%0d x_out %0d exp %0d", t, x_out, ex); end
      if (bx    !== eb) begin failures++; $display("t=%0d bx %0d exp %0d", t, bx, eb); end
      if (s_out !== es) begin failures++; $display("t=%0d s_out %0d exp %0d", t, s_out, es); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
