// mm_pe: processing element of the systolic matrix multiplier.
//
// Each PE owns one element c_ij of the product C = A*B and accumulates it in
// place. Every cycle it multiplies the a value arriving from the left by the b
// value arriving from above, adds the product to its accumulator Dc, and passes
// a to the right and b downward through one register each:
//     a_out <= a_in ; b_out <= b_in ; Dc <= Dc + a_in * b_in
// The accumulator can be loaded from the c_in line (c_load=1), which is how it
// is initialised to zero before a new product; c_out is the adder output
// Dc + a_in * b_in. The c_in/c_out lines are not used for the in-place
// accumulation itself and are kept so that the PE can also be used with a
// moving partial sum.
//
// Interface: a_in/a_out horizontal, b_in/b_out vertical, c_in/c_load/c_out,
// acc = Dc (the element c_ij so far). Timing: a_out, b_out, acc are registered
// (1 cycle); c_out is combinational.
//
// The registers on a and b, the in-place accumulator Dc with its feedback, and
// the c_in/c_out lines follow the matrix PE. The multiplexer that loads Dc from
// c_in, the c_load control and the word width are this design's choices.
module mm_pe
  import systolic_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] a_in,
  input  logic signed [W-1:0] b_in,
  input  logic signed [W-1:0] c_in,
  input  logic                c_load,
  output logic signed [W-1:0] a_out,
  output logic signed [W-1:0] b_out,
  output logic signed [W-1:0] c_out,
  output logic signed [W-1:0] acc
);

  logic signed [W-1:0] a_q, b_q, dc;

  mac_unit #(.W(W)) u_mac (
    .a     (a_in),
    .b     (b_in),
    .y_in  (dc),
    .p     (),
    .y_out (c_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
      dc  <= '0;
    end else begin
      a_q <= a_in;
      b_q <= b_in;
      dc  <= c_load ? c_in : c_out;
    end
  end

  assign a_out = a_q;
  assign b_out = b_q;
  assign acc   = dc;

endmodule
