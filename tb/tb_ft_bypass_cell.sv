// tb_ft_bypass_cell: self-checking test of the bypass wrapper of a forward
// FIR PE. With faulty=0 the cell must behave as the PE (x delayed 2 cycles,
// s_out = s_in one cycle earlier + b*x_out); with faulty=1 both lines must
// come out of the bypass registers, delayed exactly one cycle, with bx=0.
// The fault flag is switched several times during the run.
module tb_ft_bypass_cell;
  localparam int W = 16;
  localparam int NCYC = 300;

  logic clk = 0, rst_n = 0, faulty;
  logic signed [W-1:0] x_in, s_in, b, x_out, s_out, bx;
  int checks = 0, failures = 0, n_byp = 0;

  always #5 clk = ~clk;

  ft_bypass_cell #(.W(W)) dut (.*);

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
    x_in = 0; s_in = 0; b = 7; faulty = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < NCYC; t++) begin
      logic signed [W-1:0] ex, es, eb;
      if (t % 37 == 36) faulty = ~faulty;
      x_in  = W'($urandom_range(0, 2000)) - W'(1000);
      s_in  = W'($urandom);
      xh[t] = x_in;
      sh[t] = s_in;
      #2;
      if (faulty) begin
        n_byp++;
        ex = (t >= 1) ? xh[t-1] : '0;
        eb = '0;
        es = (t >= 1) ? sh[t-1] : '0;
      end else begin
        ex = (t >= 2) ? xh[t-2] : '0;
        eb = W'(b * ex);
        es = W'(((t >= 1) ? sh[t-1] : W'(0)) + eb);
      end
      checks += 3;
      if (x_out !== ex) begin failures++; $display("t=%0d f=%0b x_out %0d exp %0d", t, faulty, x_out, ex); end
      if (bx    !== eb) begin failures++; $display("t=%0d f=%0b bx %0d exp %0d", t, faulty, bx, eb); end
      if (s_out !== es) begin failures++; $display("t=%0d f=%0b s_out %0d exp %0d", t, faulty, s_out, es); end
      @(negedge clk);
    end
    checks++;
    if (n_byp == 0) begin failures++; $display("bypass never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
