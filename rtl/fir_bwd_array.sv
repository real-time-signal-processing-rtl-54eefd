// fir_bwd_array: backward systolic FIR filter (input and output at one end).
//
// M fir_bwd_pe cells: samples travel right along the x line, the partial sum
// starts at 0 at the far (right) end and travels left, and the filter output
// leaves at the left end next to the input. With one register per line per PE,
// the sum leaving PE i picks up b_i * x from 2*i cycles earlier, so with a
// sample presented every other cycle and a zero in between,
//     y(n) = sum_{i=1..M} b_i * x(n-i+1)
// appears 2 cycles after sample x(n) was presented (the b_1 tap sees the
// newest sample). Half of the PE slots carry zeros: 50% utilisation, one
// result every 2 cycles.
//
// Interface: x_in (samples interleaved with zeros, supplied by the source),
// b[i] (coefficient of PE i, PE 0 at the input/output end), y (valid 2 cycles
// after each sample; the cycles in between read the sum of the zero slots,
// which is 0 for a zero-interleaved stream started from reset). The per-PE
// lines are brought out for observation: x_tap[i] = x register of PE i,
// bx_tap[i] its product, s_tap[i] its sum output.
//
// Structure, interleaving factor, rate and latency follow the systolic
// backward FIR. The zero interleaving is left to the source, as in the
// original arrangement; word width and reset are this design's choices.
module fir_bwd_array
  import systolic_pkg::*;
#(
  parameter int unsigned W = DATA_W,
  parameter int unsigned M = FIR_TAPS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] b      [M],
  output logic signed [W-1:0] y,
  output logic signed [W-1:0] x_tap  [M],
  output logic signed [W-1:0] bx_tap [M],
  output logic signed [W-1:0] s_tap  [M]
);

  // x_line[i] enters PE i from the left. s_line[i] is the sum PE i sends to
  // the left, so PE i reads s_line[i+1]; s_line[M] is the grounded far end.
  logic signed [W-1:0] x_line [M+1];
  logic signed [W-1:0] s_line [M+1];

  assign x_line[0] = x_in;
  assign s_line[M] = '0;

  for (genvar i = 0; i < M; i++) begin : g_pe
    fir_bwd_pe #(.W(W)) u_pe (
      .clk   (clk),
      .rst_n (rst_n),
      .x_in  (x_line[i]),
      .s_in  (s_line[i+1]),
      .b     (b[i]),
      .x_out (x_line[i+1]),
      .s_out (s_line[i]),
      .bx    (bx_tap[i])
    );
    assign x_tap[i] = x_line[i+1];
    assign s_tap[i] = s_line[i];
  end

  assign y = s_line[0];

endmodule
