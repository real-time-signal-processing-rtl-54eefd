// fir_fwd_array: forward systolic FIR filter with bypass fault tolerance.
//
// Computes y(k) = sum_{i=1..M} b_i * x(k-i) with M cascaded PEs (ft_bypass_cell,
// i.e. fir_fwd_pe plus bypass registers). Samples enter at the left, the
// partial sum starts at 0 at the left and grows to the right, and the filter
// output is the sum line leaving the last PE. Because the sample line has two
// registers per PE and the sum line one, every PE sees the sample that matches
// the sum arriving with it, so one new sample is taken and one result is
// produced every clock cycle with all M PEs busy.
//
// Interface: x_in (one sample per cycle), b[i] (coefficient of PE i, PE 0 at the
// input end), fault[i] (bypass PE i). y is the filter output. The per-PE lines
// x_tap, bx_tap and s_tap are brought out for observation.
// Timing (no faults): a sample presented in cycle t first contributes to y in
// cycle t+M+1 through b_1 (M=3: 4 cycles of latency), and y(k) is complete one
// result per cycle after the pipe has filled. Each bypassed PE removes its
// coefficient and shortens the sample path by one cycle, so the remaining
// coefficients move up one tap.
//
// Structure, register counts, rates and latency follow the forward systolized
// FIR; the per-PE bypass follows the fault-tolerance scheme for unidirectional
// arrays. Word width and reset are this design's choices.
module fir_fwd_array
  import systolic_pkg::*;
#(
  parameter int unsigned W = DATA_W,
  parameter int unsigned M = FIR_TAPS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] b      [M],
  input  logic        [M-1:0] fault,
  output logic signed [W-1:0] y,
  output logic signed [W-1:0] x_tap  [M],
  output logic signed [W-1:0] bx_tap [M],
  output logic signed [W-1:0] s_tap  [M]
);

  // x_line[i] / s_line[i] enter PE i; index M is the right end.
  logic signed [W-1:0] x_line [M+1];
  logic signed [W-1:0] s_line [M+1];

  assign x_line[0] = x_in;
  assign s_line[0] = '0;

  for (genvar i = 0; i < M; i++) begin : g_pe
    ft_bypass_cell #(.W(W)) u_cell (
      .clk    (clk),
      .rst_n  (rst_n),
      .faulty (fault[i]),
      .x_in   (x_line[i]),
      .s_in   (s_line[i]),
      .b      (b[i]),
      .x_out  (x_line[i+1]),
      .s_out  (s_line[i+1]),
      .bx     (bx_tap[i])
    );
    assign x_tap[i] = x_line[i+1];
    assign s_tap[i] = s_line[i+1];
  end

  assign y = s_line[M];

endmodule
