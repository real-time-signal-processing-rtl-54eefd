// tb_mm_pe: self-checking test of the matrix-multiply PE.
// Random a/b streams: a_out and b_out must be a_in/b_in one cycle late, the
// accumulator must hold the running sum of a_in*b_in since the last load,
// c_out must equal acc + a_in*b_in, and c_load must load c_in.
module tb_mm_pe;
  localparam int W = 16;
  localparam int NCYC = 300;

  logic clk = 0, rst_n = 0, c_load;
  logic signed [W-1:0] a_in, b_in, c_in, a_out, b_out, c_out, acc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mm_pe #(.W(W)) dut (.*);

  initial begin : watchdog
    repeat (NCYC + 50) @(posedge clk);
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

  initial begin
    logic signed [W-1:0] pa, pb, sum;
    a_in = 0; b_in = 0; c_in = 0; c_load = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    pa = 0; pb = 0; sum = 0;
    for (int t = 0; t < NCYC; t++) begin
      a_in   = W'($urandom_range(0, 60)) - W'(30);
      b_in   = W'($urandom_range(0, 60)) - W'(30);
      c_load = ($urandom_range(0, 19) == 0);
      c_in   = W'($urandom);
      #2;
      chk("a_out", t, a_out, pa);
      chk("b_out", t, b_out, pb);
      chk("acc", t, acc, sum);
      chk("c_out", t, c_out, W'(sum + W'(a_in * b_in)));
      pa = a_in;
      pb = b_in;
      sum = c_load ? c_in : W'(sum + W'(a_in * b_in));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
