// dual_mode_array: W x W dual mode systolic array for Faddeev's algorithm.
//
// Diagonal positions hold circular cells, all others square cells, joined
// orthogonally: X and C4 flow north to south, M and C3 flow west to east.
// The mode bits C1 (T/S mode) and C2 (pivoting allowed) enter only at the
// top-left cell and reach diagonal cell (i,i) through the east output of
// diagonal cell (i-1,i-1) and the south output of square cell (i-1,i), two
// cycles per step down the diagonal, which is exactly the skew of the data.
// So the switch from T to S mode sweeps across the array together with the
// first row of the new matrix.
//
// In T mode the upper triangle (cells with column >= row) triangularises
// the incoming left half of the Faddeev matrix with neighbour pivoting
// (C2 = 1) or annuls it without pivoting (C2 = 0); each diagonal cell
// sends its factors east along its row and out of m_east. In S mode every
// cell is a square cell and the factors fed back into m_west are applied
// to the right half of the matrix, whose transformed rows leave at x_bot.
//
// Interface (all skewed: column j sees a given data row j cycles after
// column 0, and array row i one cycle after row i-1):
//   x_top/c4_top  column streams and clear bits entering the top row
//   c1_in/c2_in   mode and pivot bits for the top-left cell
//   m_west        factor/pivot pairs entering each row from the west (B_q)
//   x_bot/c4_bot  column streams leaving the bottom row
//   m_east        factor/pivot pairs leaving each row to the east (to B_q)
// Latency: one cycle per cell crossed.
//
// Structure, cell programs and signal routing follow the source design.
// C1/C2 inputs of square cells that have no diagonal neighbour to their
// west are tied low (square cells do not use them).
module dual_mode_array
  import faddeev_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  fx_t   x_top  [W],
  input  logic  c4_top [W],
  input  logic  c1_in,
  input  logic  c2_in,
  input  mfac_t m_west [W],
  output fx_t   x_bot  [W],
  output logic  c4_bot [W],
  output mfac_t m_east [W]
);

  // outputs of every cell
  fx_t  xo  [W][W];
  logic c4o [W][W];
  fx_t  mo  [W][W];
  logic c3o [W][W];
  logic c1o [W][W];  // east output of a diagonal cell, south output of a square cell
  logic c2o [W][W];

  for (genvar i = 0; i < W; i++) begin : g_row
    for (genvar j = 0; j < W; j++) begin : g_col
      fx_t  x_n;
      logic c4_n;
      fx_t  m_w;
      logic c3_w;

      if (i == 0) begin : g_top
        assign x_n  = x_top[j];
        assign c4_n = c4_top[j];
      end else begin : g_inner
        assign x_n  = xo[i-1][j];
        assign c4_n = c4o[i-1][j];
      end

      if (j == 0) begin : g_west
        assign m_w  = m_west[i].m;
        assign c3_w = m_west[i].c3;
      end else begin : g_link
        assign m_w  = mo[i][j-1];
        assign c3_w = c3o[i][j-1];
      end

      if (i == j) begin : g_circ
        logic c1_n, c2_n;
        if (i == 0) begin : g_first
          assign c1_n = c1_in;
          assign c2_n = c2_in;
        end else begin : g_next
          assign c1_n = c1o[i-1][j];
          assign c2_n = c2o[i-1][j];
        end
        circular_cell u_cell (
          .clk, .rst_n,
          .x_in (x_n),  .c1_in(c1_n), .c2_in(c2_n), .c4_in(c4_n),
          .m_in (m_w),  .c3_in(c3_w),
          .x_out(xo[i][j]), .c4_out(c4o[i][j]),
          .m_out(mo[i][j]), .c1_out(c1o[i][j]), .c2_out(c2o[i][j]), .c3_out(c3o[i][j])
        );
      end else begin : g_sq
        logic c1_w, c2_w;
        if (j > 0 && j - 1 == i) begin : g_from_diag
          assign c1_w = c1o[i][j-1];
          assign c2_w = c2o[i][j-1];
        end else begin : g_none
          assign c1_w = 1'b0;
          assign c2_w = 1'b0;
        end
        square_cell u_cell (
          .clk, .rst_n,
          .x_in (x_n), .c4_in(c4_n),
          .m_in (m_w), .c1_in(c1_w), .c2_in(c2_w), .c3_in(c3_w),
          .x_out(xo[i][j]), .c4_out(c4o[i][j]),
          .c1_out(c1o[i][j]), .c2_out(c2o[i][j]),
          .m_out(mo[i][j]), .c3_out(c3o[i][j])
        );
      end
    end
  end

  for (genvar k = 0; k < W; k++) begin : g_edge
    assign x_bot[k]    = xo[W-1][k];
    assign c4_bot[k]   = c4o[W-1][k];
    assign m_east[k].m  = mo[k][W-1];
    assign m_east[k].c3 = c3o[k][W-1];
  end

endmodule
