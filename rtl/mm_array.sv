// mm_array: N x N orthogonally connected systolic matrix multiplier.
//
// Computes C = A*B for N x N matrices with one mm_pe per element of C; PE (i,j)
// accumulates c_ij in place. Row i of A enters row i of the array from the
// left, one element per cycle (a_i1 first), delayed by i leading zeros; column
// j of B enters column j from the top (b_1j first), delayed by j leading
// zeros. a moves right and b moves down one PE per cycle, so a_ik and b_kj meet
// in PE (i,j) in cycle i+j+k (0-based) and the products of one element arrive
// on consecutive cycles. The whole product takes 3N-2 cycles of input; C is
// complete 3N-1 cycles after the first input cycle (11 cycles for N=4).
//
// Interface: a_in[i] is the left input of row i, b_in[j] the top input of
// column j (both already skewed with leading zeros by the source). clr loads
// every accumulator with 0 (the start-up initialisation of Dc); it may be
// asserted in the cycle before the first input. c[i][j] is the accumulator of
// PE (i,j); a_out/b_out are the right and bottom edges.
//
// Array shape, dataflow, skewing by leading zeros and the cycle counts follow
// the systolic matrix multiplier; the clr control (distributed to every PE's
// c_load with c_in tied to 0) and the word width are this design's choices.
module mm_array
  import systolic_pkg::*;
#(
  parameter int unsigned W = DATA_W,
  parameter int unsigned N = MM_N
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic signed [W-1:0] a_in  [N],
  input  logic signed [W-1:0] b_in  [N],
  output logic signed [W-1:0] c     [N][N],
  output logic signed [W-1:0] a_out [N],
  output logic signed [W-1:0] b_out [N]
);

  // a_h[i][j] enters PE (i,j) from the left; b_v[i][j] enters it from above.
  logic signed [W-1:0] a_h [N][N+1];
  logic signed [W-1:0] b_v [N+1][N];

  for (genvar i = 0; i < N; i++) begin : g_row
    assign a_h[i][0] = a_in[i];
    assign a_out[i]  = a_h[i][N];
  end
  for (genvar j = 0; j < N; j++) begin : g_col
    assign b_v[0][j] = b_in[j];
    assign b_out[j]  = b_v[N][j];
  end

  for (genvar i = 0; i < N; i++) begin : g_i
    for (genvar j = 0; j < N; j++) begin : g_j
      logic signed [W-1:0] c_unused;
      mm_pe #(.W(W)) u_pe (
        .clk    (clk),
        .rst_n  (rst_n),
        .a_in   (a_h[i][j]),
        .b_in   (b_v[i][j]),
        .c_in   ('0),
        .c_load (clr),
        .a_out  (a_h[i][j+1]),
        .b_out  (b_v[i+1][j]),
        .c_out  (c_unused),
        .acc    (c[i][j])
      );
    end
  end

endmodule
