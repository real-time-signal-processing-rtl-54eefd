// mac_unit: the multiply-add step Y <- Y + A*B shared by all the PEs.
//
// The common processing element of a systolic array executes the short
// computation y_out = y_in + a * b. This unit is that operation alone,
// purely combinational; the PEs around it add the registers that make the
// array systolic (and, in the wavefront PE, the handshake control).
//
// Interface: a, b (operands), y_in (partial result), y_out = y_in + a*b and
// p = a*b (the product alone, used where a PE shows its product).
// Arithmetic is W-bit two's complement with wrap-around. Timing: no
// registers, zero latency.
//
// The operation and its port names follow the function-level PE; the word
// width and wrap-around are this design's choices.
module mac_unit
  import systolic_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic signed [W-1:0] y_in,
  output logic signed [W-1:0] p,
  output logic signed [W-1:0] y_out
);

  always_comb begin
    p     = W'(a * b);
    y_out = W'(y_in + p);
  end

endmodule
