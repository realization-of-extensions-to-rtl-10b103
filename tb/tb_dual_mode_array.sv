// tb_dual_mode_array: one 4 x 4 dual mode array solving D + C A^-1 B.
//
// The testbench plays the host and the B_q queue: it feeds the skewed
// input flow A, -C, B, D (column j receives data row r at step r + j),
// C1 and C2 only to the top-left cell, C4 with the first row of [A;-C]
// and of [B;D] in every column, and returns each factor leaving the east
// edge to the west edge of the same row W cycles later. The D rows leaving
// the bottom are compared with a double-precision reference, and the last
// result must be out after 6n - 1 steps. Several random problems are run
// back to back; one is built so that neighbour pivoting must interchange.
module tb_dual_mode_array;
  import faddeev_pkg::*;
  import faddeev_tb_pkg::*;

  localparam int W = 4;
  localparam int N = W;

  logic  clk = 1'b0, rst_n = 1'b0;
  fx_t   x_top [W], x_bot [W];
  logic  c4_top [W], c4_bot [W];
  logic  c1_in, c2_in;
  mfac_t m_west [W], m_east [W];

  dual_mode_array #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    checks++;
    if (n_swap == 0) begin failures++; $display("no pivot interchange seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // neighbour-pivot interchanges of a non-zero stored row, seen at the east
  // edge of the first row: C3 = 1 with a non-zero factor (M = -X/x_in)
  int n_swap = 0;
  always @(negedge clk)
    if (m_east[0].c3 && m_east[0].m != 0) n_swap++;

  real   mb[], ex[];
  localparam int NC = 2 * N;
  mfac_t east_hist [1024][W];
  int    n_hist;

  function automatic real rnd(int span);
    return real'($signed($urandom_range(8*span, 0)) - 4*span) / 4.0;
  endfunction

  // value of the input flow for column j at step s (1-based), 0 outside
  function automatic real flow(int s, int j);
    int r;
    r = s - j;              // data row 1..4n
    if (r < 1 || r > 4 * N) return 0.0;
    if (r <= 2 * N) return mb[(r-1)*NC + j];          // A then -C
    return mb[(r-1-2*N)*NC + N + j];                    // B then D
  endfunction

  task automatic run(int prob);
    int last_step, n_res;
    real got, want, err;
    last_step = -1; n_res = 0;
    faddeev_ref(N, 2 * N, NC, mb, ex);
    for (int s = 1; s <= 7 * N; s++) begin
      // drive step s
      c1_in = (s >= 1 && s <= 2 * N);
      c2_in = (s >= 1 && s <= N);
      for (int j = 0; j < W; j++) begin
        x_top[j]  = to_fx(flow(s, j));
        c4_top[j] = (s - j == 1) || (s - j == 2 * N + 1);
      end
      // B_q model: W cycles of delay
      for (int i = 0; i < W; i++)
        m_west[i] = (n_hist > W) ? east_hist[n_hist-1-W][i] : '0;
      @(posedge clk);
      #1;
      for (int i = 0; i < W; i++) east_hist[n_hist][i] = m_east[i];
      n_hist++;
      // bottom output now holds data row r of column j with s = r + j + W - 1
      for (int j = 0; j < W; j++) begin
        int r;
        r = s - j - (W - 1);
        if (r > 3 * N && r <= 4 * N) begin
          got  = from_fx(x_bot[j]);
          want = ex[(r - 1 - 2 * N) * NC + N + j];
          err  = (got > want) ? got - want : want - got;
          checks++;
          n_res++;
          if (err > 0.01) begin
            failures++;
            $display("problem %0d D row %0d col %0d: got %f want %f", prob, r - 3 * N, j, got, want);
          end
          last_step = s + 1;   // visible during the following step
        end
      end
      @(negedge clk);
    end
    checks++;
    if (last_step != 6 * N - 1 || n_res != N * N) begin
      failures++;
      $display("problem %0d: last result at step %0d (expected %0d), %0d results", prob, last_step, 6 * N - 1, n_res);
    end
  endtask

  initial begin
    c1_in = 0; c2_in = 0;
    for (int j = 0; j < W; j++) begin x_top[j] = '0; c4_top[j] = 0; m_west[j] = '0; end
    mb = new[2 * N * NC];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int p = 0; p < 4; p++) begin
      do begin
        foreach (mb[k]) mb[k] = rnd(2);
        if (p == 0) begin
          // small leading entries force interchanges by neighbour pivoting
          mb[0] = 0.25;
          mb[1*NC] = 2.0;
        end
      end while (min_pivot(N, mb, NC) < 0.75);
      n_hist = 0;
      run(p);
    end
    checks++;
    if (n_swap == 0) begin failures++; $display("no pivot interchange seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
