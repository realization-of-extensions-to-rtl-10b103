// bq_fifo: B_q, the feedback queue of modification factors of one array.
//
// One shift-register lane per array row. Each cycle every lane shifts in
// the (M, C3) pair leaving the east edge of its array row and presents the
// pair that entered `len` cycles earlier to the west edge of the same row.
// With len = strip length - W, a factor generated for data row r of one
// strip re-enters the array exactly when data row r of the next strip
// reaches the row's first cell, so the factors recirculate for as many
// strips as follow (horizontal extension) and the queue length sets the
// strip length (vertical extension).
//
// Interface: m_in/m_out are W lanes of mfac_t; len (1..DEPTH) selects the
// tap, i.e. the delay in cycles. DEPTH is the physical length of each lane.
//
// A queue built only of shift registers clocked with the array is what the
// source design asks for; the selectable tap (instead of a fixed length per
// problem shape) is this design's choice, so one build serves several strip
// lengths. The default DEPTH = (2L-1)W = 224 is the 3w-deep queue of the
// two-array figure generalised to L = 4 arrays of w = 32 cells.
module bq_fifo
  import faddeev_pkg::*;
#(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 224
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(DEPTH+1)-1:0] len,
  input  mfac_t                    m_in  [W],
  output mfac_t                    m_out [W]
);

  mfac_t sr [W][DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < W; i++)
        for (int k = 0; k < DEPTH; k++)
          sr[i][k] <= '0;
    end else begin
      for (int i = 0; i < W; i++) begin
        sr[i][0] <= m_in[i];
        for (int k = 1; k < DEPTH; k++)
          sr[i][k] <= sr[i][k-1];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < W; i++)
      m_out[i] = (len == 0 || len > DEPTH) ? sr[i][DEPTH-1] : sr[i][len-1];
  end

endmodule
