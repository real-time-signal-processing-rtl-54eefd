// arma_array: systolic ARMA (IIR) filter, direct form 2.
//
// Realises
//     y(n) = sum_{k=1..N} b_k x(n-k) + sum_{k=1..N} a_k y(n-k)
// in direct form 2: an internal state w(n) = x(n) + sum_k a_k w(n-k) feeds the
// output sum y(n) = sum_k b_k w(n-k). N arma_cell sections form a line; the
// state w runs right, the feedback sum f and the output sum y run left, and at
// the left end an adder closes the loop: w = x + f. With one register per line
// per section, the contribution of a state value to the left end of the f and
// y lines comes back 2k cycles after it was formed in section k. The array is
// therefore time-rescaled: one sample period is two clock cycles, and the
// input stream carries a zero after every sample.
//
// Interface: x_in (samples on even cycles after reset, zeros on odd cycles),
// a[k]/b[k] coefficients of section k (k=0 at the input end; section k
// applies lag k+1). y_out is the filter output: the value on y_out in the
// cycle in which x(n) is presented is y(n). The odd cycles then carry
// zeros. w_in is the state entering the first section (w(n) on even cycles).
//
// Lines, directions, the input adder, the time rescaling and the zero
// interleaving follow the systolized ARMA array. Which coefficient sits in
// which section (lag k+1 in section k) was derived from the delays of the
// unsystolized flow graph. Word width and reset are this design's choices.
module arma_array
  import systolic_pkg::*;
#(
  parameter int unsigned W = DATA_W,
  parameter int unsigned N = ARMA_SECT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] a [N],
  input  logic signed [W-1:0] b [N],
  output logic signed [W-1:0] y_out,
  output logic signed [W-1:0] w_in
);

  logic signed [W-1:0] w_line [N+1];
  logic signed [W-1:0] f_line [N+1];
  logic signed [W-1:0] y_line [N+1];

  // Input adder: the feedback sum arriving at the left end closes the loop.
  assign w_line[0] = W'(x_in + f_line[0]);
  assign f_line[N] = '0;
  assign y_line[N] = '0;

  for (genvar k = 0; k < N; k++) begin : g_sec
    arma_cell #(.W(W)) u_cell (
      .clk   (clk),
      .rst_n (rst_n),
      .w_in  (w_line[k]),
      .f_in  (f_line[k+1]),
      .y_in  (y_line[k+1]),
      .a     (a[k]),
      .b     (b[k]),
      .w_out (w_line[k+1]),
      .f_out (f_line[k]),
      .y_out (y_line[k])
    );
  end

  assign y_out = y_line[0];
  assign w_in  = w_line[0];

endmodule
