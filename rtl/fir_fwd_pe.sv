// fir_fwd_pe: processing element of the forward systolic FIR filter.
//
// One PE performs one iteration of the systolized FIR recurrence
//     x_i(k) = x_{i-1}(k-2)
//     s_i(k) = s_{i-1}(k-1) + b_i * x_i(k)
// The sample line passes through two registers (x_out is x_in two cycles late),
// the partial-sum line through one (dsin), and the multiply-add that forms s_out
// is combinational from those registers: s_out = dsin + b * x_out. The product
// b * x_out is also brought out as bx. Samples and sums both move left to right.
//
// Interface: x_in/s_in come from the left neighbour (x_in = new sample, s_in = 0
// at the first PE), x_out/s_out go to the right neighbour. b is the tap
// coefficient, held constant while the filter runs.
// Timing: x_out follows x_in by 2 cycles, s_out follows s_in by 1 cycle; s_out
// and bx are valid in the same cycle as x_out.
//
// The register placement, the 2:1 delay ratio and the combinational
// multiply-add are those of the forward systolized FIR. The word width, the
// wrap-around arithmetic and the synchronous active-low reset that empties the
// pipe are this design's choices.
module fir_fwd_pe
  import systolic_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] s_in,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] s_out,
  output logic signed [W-1:0] bx
);

  logic signed [W-1:0] x_d1, x_d2, dsin;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_d1 <= '0;
      x_d2 <= '0;
      dsin <= '0;
    end else begin
      x_d1 <= x_in;
      x_d2 <= x_d1;
      dsin <= s_in;
    end
  end

  assign x_out = x_d2;

  mac_unit #(.W(W)) u_mac (
    .a     (b),
    .b     (x_d2),
    .y_in  (dsin),
    .p     (bx),
    .y_out (s_out)
  );

endmodule
