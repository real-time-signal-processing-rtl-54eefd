// fir_bwd_pe: processing element of the backward systolic FIR filter.
//
// Samples move right and partial sums move left, one register each per PE:
//     x_q   <= x_in              (sample line, one delay)
//     s_out <= s_in + b * x_q    (sum line, one delay, accumulates the tap)
// Because the two lines run in opposite directions, the delays had to be
// time-rescaled (one original delay = two beats) and the array only works with
// one zero interleaved after every input sample; see fir_bwd_array.
//
// Interface: x_in from the left neighbour, x_out to the right neighbour; s_in
// from the right neighbour (0 at the right end), s_out to the left neighbour.
// bx = b * x_q is the PE's current product. Timing: x_out and s_out are
// registered, one cycle after x_in and s_in.
//
// The register placement follows the systolized backward FIR. Word width,
// wrap-around arithmetic and the synchronous reset are this design's choices.
module fir_bwd_pe
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

  logic signed [W-1:0] x_q, s_q, s_next;

  mac_unit #(.W(W)) u_mac (
    .a     (b),
    .b     (x_q),
    .y_in  (s_in),
    .p     (bx),
    .y_out (s_next)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_q <= '0;
      s_q <= '0;
    end else begin
      x_q <= x_in;
      s_q <= s_next;
    end
  end

  assign x_out = x_q;
  assign s_out = s_q;

endmodule
