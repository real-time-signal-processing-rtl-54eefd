// tb_arma_cell: self-checking test of one systolic ARMA section.
// Reference: w_out(t) = w_in(t-1); f_out(t) = f_in(t-1) + a*w_in(t-2);
// y_out(t) = y_in(t-1) + b*w_in(t-2). Random stimulus, checked every cycle.
module tb_arma_cell;
  localparam int W = 16;
  localparam int NCYC = 300;

  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] w_in, f_in, y_in, a, b, w_out, f_out, y_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  arma_cell #(.W(W)) dut (.*);

  initial begin : watchdog
    repeat (NCYC + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [W-1:0] wh [NCYC], fh [NCYC], yh [NCYC];

  task automatic chk(input string what, input int t, input logic signed [W-1:0] got,
                     input logic signed [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("cycle %0d %s = %0d, expected %0d", t, what, got, exp);
    end
  endtask

  initial begin
    w_in = 0; f_in = 0; y_in = 0; a = -3; b = 5;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < NCYC; t++) begin
      logic signed [W-1:0] w2;
      w_in = W'($urandom_range(0, 2000)) - W'(1000);
      f_in = W'($urandom);
      y_in = W'($urandom);
      wh[t] = w_in; fh[t] = f_in; yh[t] = y_in;
      #2;
      w2 = (t >= 2) ? wh[t-2] : '0;
      chk("w_out", t, w_out, (t >= 1) ? wh[t-1] : W'(0));
      chk("f_out", t, f_out, (t >= 1) ? W'(fh[t-1] + W'(a * w2)) : W'(0));
      chk("y_out", t, y_out, (t >= 1) ? W'(yh[t-1] + W'(b * w2)) : W'(0));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
