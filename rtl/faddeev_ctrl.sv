// faddeev_ctrl: sequencer of the input data flow of the L-tuple system.
//
// A problem (plain Faddeev, or its horizontal, vertical or two-dimensional
// extension) of order n = L*W is fed as (x+1)*L strips, each W columns
// wide and (y+1)*L*W rows long, one row per cycle with no gaps: first the
// L strips of the left side (A on top of the -C blocks), then the x*L
// strips of the right side. x = y = 1 is the plain C A^-1 B + D problem.
// Once `start` is accepted, in_req is high for exactly that many cycles
// and in_strip/in_row name the row the host must present.
//
// Control bits, generated for the row being fed and then delayed to the
// cycle that row reaches the top-left cell of array l (l*W cycles later):
//   c1[l]  T mode: the strip being fed is strip l (array l triangularises
//          its own diagonal block); S mode otherwise
//   c2[l]  pivoting allowed: rows of the top block (first L*W rows) of
//          strip l; low otherwise (it only matters in T mode)
//   c4     clear X registers: first row of every strip (travels with the
//          data through the skew buffer and down through all arrays)
// bq_len is the B_q delay that makes the factor loop of every array row
// exactly one strip long: (y+1)*L*W - W. A start whose bq_len would exceed
// BQ_DEPTH is refused (cfg_err pulses).
//
// Output tags are the input tags delayed by the system latency
// LAT = (L+1)*W - 1, so out_valid marks the deskewed rows that carry a
// result: right-side strips, rows below the top block. out_last marks the
// last row of the problem.
//
// The control values per step follow the source design's data flow table;
// the counters, the latency bookkeeping and the tags are this design's own.
module faddeev_ctrl #(
  parameter int unsigned W        = 32,
  parameter int unsigned L        = 4,
  parameter int unsigned BQ_DEPTH = (2*L-1)*W
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] x_ext,   // number of horizontally compatible problems (>= 1)
  input  logic [15:0] y_ext,   // number of vertically compatible problems (>= 1)
  output logic        busy,
  output logic        cfg_err,
  output logic        in_req,
  output logic [31:0] in_strip,
  output logic [31:0] in_row,
  output logic        c4,
  output logic        c1 [L],
  output logic        c2 [L],
  output logic [$clog2(BQ_DEPTH+1)-1:0] bq_len,
  output logic        out_valid,
  output logic [31:0] out_strip,
  output logic [31:0] out_row,
  output logic        out_last
);

  localparam int unsigned LAT = (L + 1) * W - 1;
  localparam int unsigned P   = L * W;        // rows of the top block

  typedef struct packed {
    logic        valid;
    logic        last;
    logic [31:0] strip;
    logic [31:0] row;
  } tag_t;

  logic [31:0] n_strips, strip_len;
  logic [31:0] s_q, r_q;
  logic        run_q;
  logic [31:0] need_len;

  assign need_len = (32'(y_ext) + 32'd1) * P - W;

  // A new problem may follow the previous one without a gap (its first row
  // in the cycle after the last row of the previous one) when its strips
  // have the same length, since the factors of the previous problem are
  // still circulating in B_q; otherwise it waits until the system is empty.
  logic at_last, can_start;
  assign at_last   = run_q && (s_q == n_strips - 1) && (r_q == strip_len - 1);
  assign can_start = !busy || ((!run_q || at_last) &&
                               need_len == 32'(bq_len));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q     <= 1'b0;
      s_q       <= '0;
      r_q       <= '0;
      n_strips  <= 32'(2 * L);
      strip_len <= 32'(2 * P);
      bq_len    <= ($clog2(BQ_DEPTH+1))'(P - W);
      cfg_err   <= 1'b0;
    end else begin
      cfg_err <= 1'b0;
      if (start && can_start) begin
        if (x_ext == 0 || y_ext == 0 || need_len > BQ_DEPTH) begin
          cfg_err <= 1'b1;
          if (at_last) run_q <= 1'b0;
        end else begin
          run_q     <= 1'b1;
          s_q       <= '0;
          r_q       <= '0;
          n_strips  <= (32'(x_ext) + 32'd1) * L;
          strip_len <= (32'(y_ext) + 32'd1) * P;
          bq_len    <= ($clog2(BQ_DEPTH+1))'(need_len);
        end
      end else if (!run_q) begin
        // idle
      end else if (r_q == strip_len - 1) begin
        r_q <= '0;
        if (s_q == n_strips - 1) run_q <= 1'b0;
        else                     s_q   <= s_q + 1;
      end else begin
        r_q <= r_q + 1;
      end
    end
  end

  assign in_req   = run_q;
  assign in_strip = s_q;
  assign in_row   = r_q;
  assign c4       = run_q && (r_q == 0);

  // mode bits of array l, delayed by l*W cycles
  for (genvar l = 0; l < L; l++) begin : g_arr
    logic c1_now, c2_now;
    assign c1_now = run_q && (s_q == l);
    assign c2_now = run_q && (s_q == l) && (r_q < P);
    if (l == 0) begin : g_direct
      assign c1[l] = c1_now;
      assign c2[l] = c2_now;
    end else begin : g_delay
      logic [l*W-1:0] d1, d2;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          d1 <= '0;
          d2 <= '0;
        end else begin
          d1 <= {d1[l*W-2:0], c1_now};
          d2 <= {d2[l*W-2:0], c2_now};
        end
      end
      assign c1[l] = d1[l*W-1];
      assign c2[l] = d2[l*W-1];
    end
  end

  // result tags, delayed by the system latency
  tag_t tag_now;
  tag_t tag_q [LAT];
  assign tag_now.valid = run_q && (s_q >= L) && (r_q >= P);
  assign tag_now.last  = run_q && (s_q == n_strips - 1) && (r_q == strip_len - 1);
  assign tag_now.strip = s_q;
  assign tag_now.row   = r_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LAT; k++) tag_q[k] <= '0;
    end else begin
      tag_q[0] <= tag_now;
      for (int k = 1; k < LAT; k++) tag_q[k] <= tag_q[k-1];
    end
  end

  assign out_valid = tag_q[LAT-1].valid;
  assign out_last  = tag_q[LAT-1].last;
  assign out_strip = tag_q[LAT-1].strip;
  assign out_row   = tag_q[LAT-1].row;

  // busy until the last result has left the system
  logic [31:0] drain_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               drain_q <= '0;
    else if (run_q)           drain_q <= 32'(LAT);
    else if (drain_q != 0)    drain_q <= drain_q - 1;
  end
  assign busy = run_q || (drain_q != 0);

endmodule
