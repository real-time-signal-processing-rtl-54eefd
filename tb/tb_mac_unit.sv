// tb_mac_unit: self-checking test of the multiply-add unit.
// Corner values (0, 1, -1, largest and smallest words) in all combinations,
// then random operands; y_out must equal y_in + a*b and p must equal a*b,
// both reduced to W bits, computed here with 64-bit integers.
module tb_mac_unit;
  localparam int W = 16;

  logic clk = 0;
  logic signed [W-1:0] a, b, y_in, p, y_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mac_unit #(.W(W)) dut (.*);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input longint av, input longint bv, input longint yv);
    longint ep, ey;
    a = W'(av); b = W'(bv); y_in = W'(yv);
    #1;
    ep = longint'(a) * longint'(b);
    ey = longint'(y_in) + ep;
    checks += 2;
    if (p !== W'(ep)) begin failures++; $display("a=%0d b=%0d p=%0d", a, b, p); end
    if (y_out !== W'(ey)) begin failures++; $display("a=%0d b=%0d y_in=%0d y_out=%0d", a, b, y_in, y_out); end
  endtask

  longint corner [6] = '{0, 1, -1, 2, 32767, -32768};

  initial begin
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++)
        for (int k = 0; k < 6; k++) try(corner[i], corner[j], corner[k]);
    for (int n = 0; n < 2000; n++) try($urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
