// circular_cell: diagonal cell of the dual mode array.
//
// The cell runs one of two microprograms, chosen every cycle by the mode
// bit C1 that travels with the data:
//   * T mode (c1_in = 1): a boundary cell for Gaussian elimination with
//     neighbour pivoting. When pivoting is allowed (c2_in = 1) and the
//     incoming |x_in| is at least the stored |X|, the rows are interchanged:
//     C3 = 1, M = -X / x_in (0 if x_in = 0) and x_in is stored. Otherwise
//     C3 = 0 and M = -x_in / X, and X is kept.
//   * S mode (c1_in = 0): the cell behaves exactly like a square cell and
//     applies the (m_in, c3_in) pair arriving from the west.
// If c4_in = 1 the stored X is taken as zero for this cycle (the register
// is cleared before x_in is used), which starts a new matrix.
// C1, C2 and C4 are forwarded unchanged: C1, C2 and M/C3 to the east
// neighbour, C4 and X to the south neighbour.
//
// Interface: x_in/c1_in/c2_in/c4_in arrive from the north, m_in/c3_in
// from the west. All outputs are registers, so each cell adds one cycle
// (one array cycle) in both directions.
//
// The microprogram follows the source design. This design's own choices:
// in T mode x_out is 0 (the microprogram leaves it unassigned); in S mode
// m_out repeats m_in (needed to pass factors along the row, as the
// internal cell of the classical triangular array does); a division by a
// stored X of zero in the non-pivoting branch gives M = 0.
module circular_cell
  import faddeev_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  fx_t   x_in,
  input  logic  c1_in,
  input  logic  c2_in,
  input  logic  c4_in,
  input  fx_t   m_in,
  input  logic  c3_in,
  output fx_t   x_out,
  output logic  c4_out,
  output fx_t   m_out,
  output logic  c1_out,
  output logic  c2_out,
  output logic  c3_out
);

  fx_t  x_q, x_eff, x_d;
  fx_t  xo_d, mo_d;
  logic c3_d;

  always_comb begin
    x_eff = c4_in ? FX_ZERO : x_q;
    x_d   = x_eff;
    xo_d  = FX_ZERO;
    mo_d  = FX_ZERO;
    c3_d  = 1'b0;
    if (c1_in) begin
      // T mode: boundary cell, pivoting when allowed by C2
      if (c2_in && (fx_abs(x_in) >= fx_abs(x_eff))) begin
        c3_d = 1'b1;
        mo_d = (x_in != FX_ZERO) ? -fx_div(x_eff, x_in) : FX_ZERO;
        x_d  = x_in;
      end else begin
        c3_d = 1'b0;
        mo_d = (x_eff != FX_ZERO) ? -fx_div(x_in, x_eff) : FX_ZERO;
      end
    end else begin
      // S mode: acts as a square cell
      if (c3_in) begin
        xo_d = x_eff + fx_mul(m_in, x_in);
        x_d  = x_in;
      end else begin
        xo_d = x_in + fx_mul(m_in, x_eff);
      end
      mo_d = m_in;
      c3_d = c3_in;
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
      m_out  <= mo_d;
      c3_out <= c3_d;
      c1_out <= c1_in;
      c2_out <= c2_in;
      c4_out <= c4_in;
    end
  end

endmodule
