// wf_fir_pe: data-driven (wavefront) FIR processing element.
//
// A wavefront PE has no global timing reference: it computes as soon as both
// of its operands have arrived and passes its results on as soon as its
// neighbours can take them. Each line between PEs is a two-wire four-phase
// handshake: the source puts data on the line and raises rdy; the target
// latches the data and raises ack; the source then lowers rdy and the target
// lowers ack. The PE implements one iteration of the FIR recurrence
//     x_i(k) = x_{i-1}(k-1)          (the delay is a storage register, x_reg)
//     s_i(k) = s_{i-1}(k) + b * x_i(k)
// Controller: on the x line and on the sum line independently, when rdy is
// high and no operand of that line is held, the data is latched and ack
// raised; ack is lowered once rdy falls. When both operands are held and both
// output lines are idle, the PE fires: it offers x_reg on the x output and
// s_in + b*x_reg on the sum output, then stores the new x in x_reg. Each output
// line lowers rdy when its ack is seen and becomes idle when ack falls.
//
// Interface: xi_* / si_* input channels from the left neighbour, xo_* / so_*
// output channels to the right neighbour (data, rdy, ack). b is the
// coefficient. The PE is built with a clock for its storage elements; the
// handshake itself never depends on how many cycles a neighbour takes, so
// PEs of different speeds can be chained. A PE latches an offered operand in
// the cycle after rdy rises and offers its results in the cycle after its
// second operand was latched; a full four-phase transfer costs several
// cycles, so with neighbours that answer in the next cycle a chain of these
// PEs takes about one sample every 5 cycles.
//
// The two-line ready/acknowledge handshake per line, latching an operand
// before acknowledging it, polling both lines, and firing only when both
// operands are present follow the wavefront FIR controller. Checking the two
// lines in the same cycle rather than alternately, the clocked implementation,
// the reset and the output side of the protocol are this design's choices.
module wf_fir_pe
  import systolic_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] b,
  // x line from the left neighbour
  input  logic signed [W-1:0] xi_data,
  input  logic                xi_rdy,
  output logic                xi_ack,
  // sum line from the left neighbour
  input  logic signed [W-1:0] si_data,
  input  logic                si_rdy,
  output logic                si_ack,
  // x line to the right neighbour
  output logic signed [W-1:0] xo_data,
  output logic                xo_rdy,
  input  logic                xo_ack,
  // sum line to the right neighbour
  output logic signed [W-1:0] so_data,
  output logic                so_rdy,
  input  logic                so_ack,
  // pulses once each time the PE fires
  output logic                fire
);

  logic signed [W-1:0] x_reg, x_new, s_new, s_res;

  mac_unit #(.W(W)) u_mac (
    .a     (b),
    .b     (x_reg),
    .y_in  (s_new),
    .p     (),
    .y_out (s_res)
  );
  logic                have_x, have_s;
  logic                xo_busy, so_busy;   // output transfer not yet finished

  assign fire = have_x && have_s && !xo_busy && !so_busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_reg   <= '0;
      x_new   <= '0;
      s_new   <= '0;
      have_x  <= 1'b0;
      have_s  <= 1'b0;
      xi_ack  <= 1'b0;
      si_ack  <= 1'b0;
      xo_data <= '0;
      so_data <= '0;
      xo_rdy  <= 1'b0;
      so_rdy  <= 1'b0;
      xo_busy <= 1'b0;
      so_busy <= 1'b0;
    end else begin
      // ---- input side: x line ----
      if (xi_rdy && !xi_ack && !have_x) begin
        x_new  <= xi_data;
        have_x <= 1'b1;
        xi_ack <= 1'b1;
      end else if (xi_ack && !xi_rdy) begin
        xi_ack <= 1'b0;
      end
      // ---- input side: sum line ----
      if (si_rdy && !si_ack && !have_s) begin
        s_new  <= si_data;
        have_s <= 1'b1;
        si_ack <= 1'b1;
      end else if (si_ack && !si_rdy) begin
        si_ack <= 1'b0;
      end
      // ---- output side ----
      if (xo_rdy && xo_ack) xo_rdy <= 1'b0;
      if (so_rdy && so_ack) so_rdy <= 1'b0;
      if (xo_busy && !xo_rdy && !xo_ack) xo_busy <= 1'b0;
      if (so_busy && !so_rdy && !so_ack) so_busy <= 1'b0;
      // ---- fire ----
      if (fire) begin
        xo_data <= x_reg;
        so_data <= s_res;
        x_reg   <= x_new;
        xo_rdy  <= 1'b1;
        so_rdy  <= 1'b1;
        xo_busy <= 1'b1;
        so_busy <= 1'b1;
        have_x  <= 1'b0;
        have_s  <= 1'b0;
      end
    end
  end

  // Handshake rules on the lines this PE drives: once raised, rdy stays high
  // with stable data until acknowledged.
  a_xo_hold: assert property (@(posedge clk) disable iff (!rst_n)
    xo_rdy && !xo_ack |=> xo_rdy && $stable(xo_data));
  a_so_hold: assert property (@(posedge clk) disable iff (!rst_n)
    so_rdy && !so_ack |=> so_rdy && $stable(so_data));
  // ack is only raised in answer to rdy.
  a_xi_ack: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(xi_ack) |-> $past(xi_rdy));
  a_si_ack: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(si_ack) |-> $past(si_rdy));

endmodule
