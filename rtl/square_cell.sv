// square_cell: non-diagonal cell of the dual mode array.
//
// The cell keeps one entry X of the row currently held by its array row and
// applies the modification factor M arriving from the west to the column
// stream arriving from the north:
//   * c3_in = 1 (row interchange): x_out = X + M * x_in, then X <= x_in
//   * c3_in = 0:                   x_out = x_in + M * X, X unchanged
// If c4_in = 1 the stored X is cleared before x_in is used, which starts a
// new matrix (mode switch). The cell behaves the same in T and S mode.
//
// Interface: x_in/c4_in from the north; m_in, c1_in, c2_in, c3_in from the
// west. Outputs: m_out/c3_out to the east; x_out, c4_out, c1_out, c2_out
// to the south (the C1/C2 path lets the mode bits reach the next diagonal
// cell). All outputs are registered: one cycle per cell.
//
// The microprogram and the port placement follow the source design; the
// forwarding of M (m_out = m_in) is this design's reading of the figure,
// which shows the port but not the assignment.
module square_cell
  import faddeev_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  fx_t   x_in,
  input  logic  c4_in,
  input  fx_t   m_in,
  input  logic  c1_in,
  input  logic  c2_in,
  input  logic  c3_in,
  output fx_t   x_out,
  output logic  c4_out,
  output logic  c1_out,
  output logic  c2_out,
  output fx_t   m_out,
  output logic  c3_out
);

  fx_t x_q, x_eff, x_d, xo_d;

  always_comb begin
    x_eff = c4_in ? FX_ZERO : x_q;
    if (c3_in) begin
      xo_d = x_eff + fx_mul(m_in, x_in);
      x_d  = x_in;
    end else begin
      xo_d = x_in + fx_mul(m_in, x_eff);
      x_d  = x_eff;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q    <= FX_ZERO;
      x_out  <= FX_ZERO;
      m_out  <= FX_ZERO;
      c1_out <= 1'b0;
      c2_out <= 1'b0;
      c3_out <= 1'b0;
      c4_out <= 1'b0;
    end else begin
      x_q    <= x_d;
      x_out  <= xo_d;
      m_out  <= m_in;
      c3_out <= c3_in;
      c1_out <= c1_in;
      c2_out <= c2_in;
      c4_out <= c4_in;
    end
  end

endmodule
