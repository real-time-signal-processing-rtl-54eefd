// systolic_dsp_top: the five example arrays side by side.
//
// The arrays are independent designs that share only the clock and reset:
//   * fwd_*  forward systolic FIR with per-PE bypass (fault tolerance),
//            one sample and one result per cycle;
//   * bwd_*  backward systolic FIR, input and output at one end, samples
//            interleaved with zeros, one result every 2 cycles;
//   * mm_*   N x N systolic matrix multiplier, skewed row/column inputs, C
//            complete 3N-1 cycles after the first input;
//   * arma_* systolic ARMA (IIR) filter, zero-interleaved, one result every
//            2 cycles;
//   * wf_*   wavefront (data-driven) FIR with four-phase rdy/ack channels.
// Each array's ports are brought out unchanged with its prefix; see the
// array modules for the protocol and timing of each. Coefficients are
// inputs and are expected to stay constant while an array runs.
//
// Which arrays are grouped here follows the examples; the grouping into one
// top with a shared clock and reset is this design's choice.
module systolic_dsp_top
  import systolic_pkg::*;
#(
  parameter int unsigned W      = DATA_W,
  parameter int unsigned M_FWD  = FIR_TAPS,
  parameter int unsigned M_BWD  = FIR_TAPS,
  parameter int unsigned N_MM   = MM_N,
  parameter int unsigned N_ARMA = ARMA_SECT,
  parameter int unsigned M_WF   = FIR_TAPS
) (
  input  logic                clk,
  input  logic                rst_n,
  // forward FIR
  input  logic signed [W-1:0] fwd_x,
  input  logic signed [W-1:0] fwd_b      [M_FWD],
  input  logic    [M_FWD-1:0] fwd_fault,
  output logic signed [W-1:0] fwd_y,
  output logic signed [W-1:0] fwd_x_tap  [M_FWD],
  output logic signed [W-1:0] fwd_bx_tap [M_FWD],
  output logic signed [W-1:0] fwd_s_tap  [M_FWD],
  // backward FIR
  input  logic signed [W-1:0] bwd_x,
  input  logic signed [W-1:0] bwd_b      [M_BWD],
  output logic signed [W-1:0] bwd_y,
  output logic signed [W-1:0] bwd_x_tap  [M_BWD],
  output logic signed [W-1:0] bwd_bx_tap [M_BWD],
  output logic signed [W-1:0] bwd_s_tap  [M_BWD],
  // matrix multiplier
  input  logic                mm_clr,
  input  logic signed [W-1:0] mm_a_in    [N_MM],
  input  logic signed [W-1:0] mm_b_in    [N_MM],
  output logic signed [W-1:0] mm_c       [N_MM][N_MM],
  output logic signed [W-1:0] mm_a_out   [N_MM],
  output logic signed [W-1:0] mm_b_out   [N_MM],
  // ARMA filter
  input  logic signed [W-1:0] arma_x,
  input  logic signed [W-1:0] arma_a     [N_ARMA],
  input  logic signed [W-1:0] arma_b     [N_ARMA],
  output logic signed [W-1:0] arma_y,
  output logic signed [W-1:0] arma_w,
  // wavefront FIR
  input  logic signed [W-1:0] wf_b       [M_WF],
  input  logic signed [W-1:0] wf_x_data,
  input  logic                wf_x_rdy,
  output logic                wf_x_ack,
  output logic signed [W-1:0] wf_y_data,
  output logic                wf_y_rdy,
  input  logic                wf_y_ack,
  output logic     [M_WF-1:0] wf_fire
);

  fir_fwd_array #(.W(W), .M(M_FWD)) u_fwd (
    .clk    (clk),
    .rst_n  (rst_n),
    .x_in   (fwd_x),
    .b      (fwd_b),
    .fault  (fwd_fault),
    .y      (fwd_y),
    .x_tap  (fwd_x_tap),
    .bx_tap (fwd_bx_tap),
    .s_tap  (fwd_s_tap)
  );

  fir_bwd_array #(.W(W), .M(M_BWD)) u_bwd (
    .clk    (clk),
    .rst_n  (rst_n),
    .x_in   (bwd_x),
    .b      (bwd_b),
    .y      (bwd_y),
    .x_tap  (bwd_x_tap),
    .bx_tap (bwd_bx_tap),
    .s_tap  (bwd_s_tap)
  );

  mm_array #(.W(W), .N(N_MM)) u_mm (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (mm_clr),
    .a_in  (mm_a_in),
    .b_in  (mm_b_in),
    .c     (mm_c),
    .a_out (mm_a_out),
    .b_out (mm_b_out)
  );

  arma_array #(.W(W), .N(N_ARMA)) u_arma (
    .clk   (clk),
    .rst_n (rst_n),
    .x_in  (arma_x),
    .a     (arma_a),
    .b     (arma_b),
    .y_out (arma_y),
    .w_in  (arma_w)
  );

  wf_fir_array #(.W(W), .M(M_WF)) u_wf (
    .clk    (clk),
    .rst_n  (rst_n),
    .b      (wf_b),
    .x_data (wf_x_data),
    .x_rdy  (wf_x_rdy),
    .x_ack  (wf_x_ack),
    .y_data (wf_y_data),
    .y_rdy  (wf_y_rdy),
    .y_ack  (wf_y_ack),
    .fire   (wf_fire)
  );

endmodule
