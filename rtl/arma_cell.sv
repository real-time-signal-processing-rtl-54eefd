// arma_cell: one section of the systolic ARMA (IIR) filter array.
//
// The systolic ARMA array has three lines: the state line w running right,
// and two accumulation lines running left, the feedback line f (coefficient a)
// and the output line y (coefficient b). A section holds one register on each
// line and adds its two taps into the left-going lines:
//     w_q <= w_in
//     f_q <= f_in + a * w_q
//     y_q <= y_in + b * w_q
// Lines running in opposite directions need one register each per section
// after time rescaling, which is why the array runs at one sample every two
// cycles (see arma_array).
//
// Interface: w_in from the left, w_out to the right; f_in/y_in from the right,
// f_out/y_out to the left. a and b are the section's coefficients.
// Timing: all outputs are registered, one cycle after their inputs.
//
// The three lines, their directions, the tap positions and one delay per line
// per section follow the systolized ARMA array. Placing the f and y registers
// after the adders (as in the backward FIR PE), the word width and the reset
// are this design's choices.
module arma_cell
  import systolic_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] w_in,
  input  logic signed [W-1:0] f_in,
  input  logic signed [W-1:0] y_in,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] w_out,
  output logic signed [W-1:0] f_out,
  output logic signed [W-1:0] y_out
);

  logic signed [W-1:0] w_q, f_q, y_q, f_next, y_next;

  mac_unit #(.W(W)) u_mac_a (
    .a     (a),
    .b     (w_q),
    .y_in  (f_in),
    .p     (),
    .y_out (f_next)
  );

  mac_unit #(.W(W)) u_mac_b (
    .a     (b),
    .b     (w_q),
    .y_in  (y_in),
    .p     (),
    .y_out (y_next)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w_q <= '0;
      f_q <= '0;
      y_q <= '0;
    end else begin
      w_q <= w_in;
      f_q <= f_next;
      y_q <= y_next;
    end
  end

  assign w_out = w_q;
  assign f_out = f_q;
  assign y_out = y_q;

endmodule
