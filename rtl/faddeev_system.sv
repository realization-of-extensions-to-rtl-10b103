// faddeev_system: L-tuple arrays system computing C A^-1 B + D (Faddeev's
// algorithm) and its horizontal, vertical and two-dimensional extensions.
//
// L dual mode arrays of W x W cells are stacked: the bottom output of one
// array is the top input of the next, so together they act as an n x W
// slice (n = L*W) of an n x n array whose columns are time-multiplexed in
// strips of W columns. Each array owns a B_q queue that feeds the factors
// leaving its east edge back into its west edge one strip later. Array l
// runs in T mode only while strip l passes (it triangularises its diagonal
// block, with pivoting over the top block rows and without over the rest)
// and in S mode otherwise, when it applies the stored factors to the strip.
//
// Problem format (order n = L*W, m = L blocks, one iteration):
//   strips 0..L-1            left side: columns of [A; -C1; -C2; ...]
//   strips L..(x+1)L-1       right side: x groups of L strips, each the
//                            columns of [B_h; D_1h; D_2h; ...]
//   each strip               (y+1)*n rows, one row of W words per cycle
// Result row r of vertical problem v and horizontal problem h leaves on
// out_data when out_strip = L*(h+1)+b (column block b) and
// out_row = n*(v+1)+r; out_valid marks exactly these rows. It equals
// D_vh + C_v A^-1 B_h, in the fixed-point format of faddeev_pkg.
//
// Timing: after start, in_req is high for (x+1)*L*(y+1)*n cycles and the
// host supplies in_data for (in_strip, in_row) in each of them. A row
// leaves LAT = (L+1)*W - 1 cycles after it entered, so the whole problem
// takes (L+1)*W - 1 + (x+1)*L*(y+1)*L*W cycles, the source design's count
// for m = L. `busy` stays high until the last row is out. A start while a
// problem is being fed is ignored, except in its last input row: then the
// next problem (same strip length) follows without a gap, so consecutive
// problems overlap fully and each costs only its (x+1)L(y+1)LW input
// cycles. A start whose strips do not fit B_q raises cfg_err.
//
// The stacked arrays, the B_q feedback and the control scheme follow the
// source design. The skew/deskew buffers, the controller and the tap
// selectable B_q are this design's own. Problems with m > L blocks (more
// than one pass through the arrays) are not supported.
module faddeev_system
  import faddeev_pkg::*;
#(
  parameter int unsigned W        = 32,
  parameter int unsigned L        = 4,
  parameter int unsigned BQ_DEPTH = (2*L-1)*W
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] x_ext,
  input  logic [15:0] y_ext,
  output logic        busy,
  output logic        cfg_err,
  output logic        in_req,
  output logic [31:0] in_strip,
  output logic [31:0] in_row,
  input  fx_t         in_data [W],
  output logic        out_valid,
  output logic        out_last,
  output logic [31:0] out_strip,
  output logic [31:0] out_row,
  output fx_t         out_data [W]
);

  logic c4;
  logic c1 [L];
  logic c2 [L];
  logic [$clog2(BQ_DEPTH+1)-1:0] bq_len;

  faddeev_ctrl #(.W(W), .L(L), .BQ_DEPTH(BQ_DEPTH)) u_ctrl (
    .clk, .rst_n, .start, .x_ext, .y_ext,
    .busy, .cfg_err, .in_req, .in_strip, .in_row,
    .c4, .c1, .c2, .bq_len,
    .out_valid, .out_strip, .out_row, .out_last
  );

  // row-parallel input, gated when no row is requested
  fx_t  row_d [W];
  logic row_c4 [W];
  always_comb begin
    for (int j = 0; j < W; j++) begin
      row_d[j]  = in_req ? in_data[j] : FX_ZERO;
      row_c4[j] = c4;
    end
  end

  fx_t   x_top  [L][W];
  logic  c4_top [L][W];
  fx_t   x_bot  [L][W];
  logic  c4_bot [L][W];
  mfac_t m_west [L][W];
  mfac_t m_east [L][W];

  skew_buffer #(.W(W), .REVERSE(1'b0)) u_skew (
    .clk, .rst_n, .d_in(row_d), .b_in(row_c4), .d_out(x_top[0]), .b_out(c4_top[0])
  );

  for (genvar l = 0; l < L; l++) begin : g_arr
    if (l > 0) begin : g_chain
      assign x_top[l]  = x_bot[l-1];
      assign c4_top[l] = c4_bot[l-1];
    end

    dual_mode_array #(.W(W)) u_array (
      .clk, .rst_n,
      .x_top (x_top[l]), .c4_top(c4_top[l]),
      .c1_in (c1[l]),    .c2_in (c2[l]),
      .m_west(m_west[l]),
      .x_bot (x_bot[l]), .c4_bot(c4_bot[l]),
      .m_east(m_east[l])
    );

    bq_fifo #(.W(W), .DEPTH(BQ_DEPTH)) u_bq (
      .clk, .rst_n, .len(bq_len), .m_in(m_east[l]), .m_out(m_west[l])
    );
  end

  logic c4_unused [W];
  skew_buffer #(.W(W), .REVERSE(1'b1)) u_deskew (
    .clk, .rst_n, .d_in(x_bot[L-1]), .b_in(c4_bot[L-1]), .d_out(out_data), .b_out(c4_unused)
  );

endmodule
