// ft_bypass_cell: forward FIR PE with bypass registers for fault tolerance.
//
// Each of the two lines through the PE (the sample line and the partial-sum
// line) has a bypass register beside the PE. When `faulty` is high the cell
// outputs are taken from the bypass registers instead of from the PE, so the
// data crosses the cell with a single cycle of delay on both lines and the
// cell's iteration is simply not performed: to the rest of the array the
// faulty PE has disappeared. With `faulty` low the cell is exactly a
// fir_fwd_pe.
//
// Interface: as fir_fwd_pe, plus `faulty` (static, set when the PE is found
// bad). Timing with faulty=0: x 2 cycles, s 1 cycle. With faulty=1: x 1 cycle,
// s 1 cycle; bx reads 0.
//
// The bypass register on each line and its one-cycle delay follow the
// unidirectional-array fault-tolerance scheme; the output multiplexer that
// selects between the PE and the bypass path, and the `faulty` control input,
// are this design's way of realising the switch-over.
module ft_bypass_cell
  import systolic_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                faulty,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] s_in,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] s_out,
  output logic signed [W-1:0] bx
);

  logic signed [W-1:0] pe_x, pe_s, pe_bx;
  logic signed [W-1:0] byp_x, byp_s;

  fir_fwd_pe #(.W(W)) u_pe (
    .clk   (clk),
    .rst_n (rst_n),
    .x_in  (x_in),
    .s_in  (s_in),
    .b     (b),
    .x_out (pe_x),
    .s_out (pe_s),
    .bx    (pe_bx)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      byp_x <= '0;
      byp_s <= '0;
    end else begin
      byp_x <= x_in;
      byp_s <= s_in;
    end
  end

  always_comb begin
    x_out = faulty ? byp_x : pe_x;
    s_out = faulty ? byp_s : pe_s;
    bx    = faulty ? '0    : pe_bx;
  end

endmodule
