// wf_fir_array: linear wavefront FIR filter of M data-driven PEs.
//
// Computes y(k) = sum_{i=1..M} b_i * x(k-i) with M wf_fir_pe cells connected
// by four-phase rdy/ack channels: no PE waits for a clock phase of the array,
// each fires when its two operands have arrived, and the computation ripples
// through the array as a wavefront. A source of zero partial sums feeds the
// sum line of the first PE, and the sample line leaving the last PE ends in a
// sink that acknowledges every transfer. If the consumer of y holds off its
// acknowledge the array fills up and then stops accepting samples
// (back-pressure); nothing is lost.
//
// Interface: x_* is the sample input channel (x_data/x_rdy in, x_ack out),
// y_* the output channel (y_data/y_rdy out, y_ack in), both four-phase. b[i]
// is the coefficient of PE i (PE 0 at the input end, lag i+1). fire[i] pulses
// when PE i computes. Each input sample yields exactly one output, in order.
//
// The chain of handshaking FIR PEs follows the wavefront FIR; the zero-sum
// source at the head of the sum line and the always-accepting sink at the end
// of the sample line are this design's way of terminating the two lines.
module wf_fir_array
  import systolic_pkg::*;
#(
  parameter int unsigned W = DATA_W,
  parameter int unsigned M = FIR_TAPS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] b [M],
  input  logic signed [W-1:0] x_data,
  input  logic                x_rdy,
  output logic                x_ack,
  output logic signed [W-1:0] y_data,
  output logic                y_rdy,
  input  logic                y_ack,
  output logic        [M-1:0] fire
);

  logic signed [W-1:0] xd [M+1];
  logic signed [W-1:0] sd [M+1];
  logic                xr [M+1];
  logic                xa [M+1];
  logic                sr [M+1];
  logic                sa [M+1];

  // Head of the sample line: the external source.
  assign xd[0] = x_data;
  assign xr[0] = x_rdy;
  assign x_ack = xa[0];

  // Head of the sum line: a source that always offers a zero partial sum.
  logic s0_rdy;
  always_ff @(posedge clk) begin
    if (!rst_n)                s0_rdy <= 1'b0;
    else if (!s0_rdy && !sa[0]) s0_rdy <= 1'b1;
    else if (s0_rdy && sa[0])   s0_rdy <= 1'b0;
  end
  assign sd[0] = '0;
  assign sr[0] = s0_rdy;

  for (genvar i = 0; i < M; i++) begin : g_pe
    wf_fir_pe #(.W(W)) u_pe (
      .clk     (clk),
      .rst_n   (rst_n),
      .b       (b[i]),
      .xi_data (xd[i]),
      .xi_rdy  (xr[i]),
      .xi_ack  (xa[i]),
      .si_data (sd[i]),
      .si_rdy  (sr[i]),
      .si_ack  (sa[i]),
      .xo_data (xd[i+1]),
      .xo_rdy  (xr[i+1]),
      .xo_ack  (xa[i+1]),
      .so_data (sd[i+1]),
      .so_rdy  (sr[i+1]),
      .so_ack  (sa[i+1]),
      .fire    (fire[i])
    );
  end

  // Tail of the sample line: a sink that acknowledges every transfer.
  always_ff @(posedge clk) begin
    if (!rst_n) xa[M] <= 1'b0;
    else        xa[M] <= xr[M];
  end

  // Tail of the sum line: the filter output channel.
  assign y_data = sd[M];
  assign y_rdy  = sr[M];
  assign sa[M]  = y_ack;

endmodule
