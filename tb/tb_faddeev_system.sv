// tb_faddeev_system: end-to-end test of the L-tuple Faddeev system.
//
// Runs a two-array system of 2 x 2 cells (order n = 4 problems, the shape
// of the two-array figure of the source design) through:
//   1. plain Faddeev  [A B; -C D]            -> D + C A^-1 B (random data)
//   2. horizontal extension, x = 3            [A I B I; -I 0 0 D]
//                                             -> A^-1, A^-1 B, A^-1 + D
//   3. vertical extension, y = 3              [I B; -C 0; -I D; -E D]
//                                             -> C B, B + D, E B + D
//   4. two-dimensional extension, x = y = 2   [I B E; -A 0 F; -I D G]
//                                             -> AB, AE+F, B+D, E+G
//   5. two plain problems back to back, the second started in the last
//      input row of the first (no gap: maximum overlap)
//   6. a start with strips too long for B_q (must raise cfg_err) and a
//      start while a problem is being fed (must be ignored)
// Every result word is compared with a double-precision reference, the
// total cycle count with (L+1)W - 1 + (x+1)L(y+1)LW, and each mechanism
// (T/S mode switch, neighbour-pivot interchange, non-pivoting elimination,
// C4 clear, B_q recirculation, configuration refusal) must occur.
module tb_faddeev_system;
  import faddeev_pkg::*;
  import faddeev_tb_pkg::*;

  localparam int W  = 2;
  localparam int L  = 2;
  localparam int N  = W * L;
  localparam int BQ = 4 * N - W;   // strips up to 4n rows (y <= 3)

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [15:0] x_ext = 16'd1, y_ext = 16'd1;
  logic        busy, cfg_err, in_req, out_valid, out_last;
  logic [31:0] in_strip, in_row, out_strip, out_row;
  fx_t         in_data [W];
  fx_t         out_data [W];

  faddeev_system #(.W(W), .L(L), .BQ_DEPTH(BQ)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real mb[];
  real ex[];
  int  nr, nc;
  int  first_cyc, last_cyc, n_res;
  real max_err;

  // host: present the requested row
  always @(negedge clk) begin
    for (int j = 0; j < W; j++)
      in_data[j] = (in_req && mb.size() > 0) ? to_fx(mb[in_row*nc + in_strip*W + j]) : FX_ZERO;
  end

  // result checker
  always @(negedge clk) begin
    if (in_req && first_cyc < 0) first_cyc = cyc;
    if (out_valid) begin
      for (int j = 0; j < W; j++) begin
        real got, want, err;
        got  = from_fx(out_data[j]);
        want = ex[out_row*nc + out_strip*W + j];
        err  = (got > want) ? got - want : want - got;
        if (err > max_err) max_err = err;
        checks++;
        n_res++;
        if (err > 0.02 + 0.002 * ((want < 0) ? -want : want)) begin
          failures++;
          $display("MISMATCH strip %0d row %0d col %0d: got %f want %f", out_strip, out_row, j, got, want);
        end
      end
    end
    if (out_last) last_cyc = cyc;
  end

  // ---- mechanism counters -------------------------------------------------
  int n_ts_switch = 0, n_swap = 0, n_nopiv = 0, n_clear = 0, n_recirc = 0, n_cfgerr = 0, n_ignored = 0, n_chained = 0;
  logic c1_prev0 = 1'b0, c1_prev1 = 1'b0;
  always @(negedge clk) begin
    if (c1_prev0 && !dut.c1[0]) n_ts_switch++;
    if (c1_prev1 && !dut.c1[1]) n_ts_switch++;
    c1_prev0 = dut.c1[0];
    c1_prev1 = dut.c1[1];
    if (dut.g_arr[0].u_array.g_row[1].g_col[1].g_circ.u_cell.c1_in &&
        dut.g_arr[0].u_array.g_row[1].g_col[1].g_circ.u_cell.c2_in &&
        dut.g_arr[0].u_array.g_row[1].g_col[1].g_circ.u_cell.c3_d &&
        dut.g_arr[0].u_array.g_row[1].g_col[1].g_circ.u_cell.x_eff != 0 &&
        dut.g_arr[0].u_array.g_row[1].g_col[1].g_circ.u_cell.x_in  != 0) n_swap++;
    if (dut.g_arr[1].u_array.g_row[0].g_col[0].g_circ.u_cell.c1_in &&
        !dut.g_arr[1].u_array.g_row[0].g_col[0].g_circ.u_cell.c2_in) n_nopiv++;
    if (dut.c4) n_clear++;
    if (!dut.c1[0] && dut.m_west[0][0].m != 0) n_recirc++;
    if (cfg_err) n_cfgerr++;
  end

  // ---- matrix construction helpers ----------------------------------------
  function automatic real rnd(int span);  // multiples of 1/4 in [-span, span]
    return real'($signed($urandom_range(8*span, 0)) - 4*span) / 4.0;
  endfunction

  task automatic set_block(int br, int bc, int kind);
    // kind: 0 zero, 1 identity, -1 minus identity, 2 random
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        mb[(br*N+r)*nc + bc*N + c] = (kind == 2) ? rnd(2) :
                                     (r == c) ? real'(kind) : 0.0;
  endtask

  task automatic copy_block(int br, int bc, int sbr, int sbc, real scale);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        mb[(br*N+r)*nc + bc*N + c] = scale * mb[(sbr*N+r)*nc + sbc*N + c];
  endtask

  task automatic run_problem(string name, int x, int y, bit chain = 1'b0);
    int expect_cycles;
    int reps;
    nr = (y + 1) * N;
    nc = (x + 1) * N;
    faddeev_ref(N, nr, nc, mb, ex);
    first_cyc = -1; last_cyc = -1; n_res = 0; max_err = 0.0;
    x_ext = 16'(x); y_ext = 16'(y);
    reps = chain ? 2 : 1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    if (chain) begin
      // the same problem again, started in the last input row: no gap
      while (!(in_req && in_strip == 32'((x + 1) * L - 1) && in_row == 32'((y + 1) * N - 1)))
        @(negedge clk);
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      checks++;
      if (!in_req) begin failures++; $display("chained start not accepted"); end
      else n_chained++;
    end else begin
      // a second start while busy must be ignored
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
    end
    wait (!busy);
    @(negedge clk);
    if (in_req) begin failures++; $display("start while busy was not ignored"); end
    else if (!chain) n_ignored++;
    expect_cycles = (L + 1) * W - 1 + reps * (x + 1) * L * (y + 1) * L * W;
    checks++;
    if (last_cyc - first_cyc + 1 != expect_cycles) begin
      failures++;
      $display("%s: %0d cycles, expected %0d", name, last_cyc - first_cyc + 1, expect_cycles);
    end
    checks++;
    if (n_res != reps * x * y * N * N) begin
      failures++;
      $display("%s: %0d result words, expected %0d", name, n_res, reps * x * y * N * N);
    end
    $display("%s: %0d cycles, %0d result words, max error %f", name, last_cyc - first_cyc + 1, n_res, max_err);
  endtask

  initial begin
    mb = new[0];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // 1. plain Faddeev with random data
    nr = 2 * N; nc = 2 * N;
    mb = new[nr*nc];
    do begin
      set_block(0, 0, 2); set_block(0, 1, 2); set_block(1, 0, 2); set_block(1, 1, 2);
    end while (min_pivot(N, mb, nc) < 0.75);
    run_problem("plain C A^-1 B + D", 1, 1);

    // 2. horizontal extension (5.2)
    nr = 2 * N; nc = 4 * N;
    mb = new[nr*nc];
    do set_block(0, 0, 2); while (min_pivot(N, mb, nc) < 0.75);
    set_block(0, 1, 1); set_block(0, 2, 2); set_block(0, 3, 1);
    set_block(1, 0, -1); set_block(1, 1, 0); set_block(1, 2, 0); set_block(1, 3, 2);
    run_problem("horizontal x=3", 3, 1);

    // 3. vertical extension (5.6)
    nr = 4 * N; nc = 2 * N;
    mb = new[nr*nc];
    set_block(0, 0, 1); set_block(0, 1, 2);
    set_block(1, 0, 2); set_block(1, 1, 0);
    set_block(2, 0, -1); set_block(2, 1, 2);
    set_block(3, 0, 2); copy_block(3, 1, 2, 1, 1.0);
    run_problem("vertical y=3", 1, 3);

    // 4. two-dimensional extension (5.11)
    nr = 3 * N; nc = 3 * N;
    mb = new[nr*nc];
    set_block(0, 0, 1);  set_block(0, 1, 2); set_block(0, 2, 2);
    set_block(1, 0, 2);  set_block(1, 1, 0); set_block(1, 2, 2);
    set_block(2, 0, -1); set_block(2, 1, 2); set_block(2, 2, 2);
    run_problem("two-dimensional x=y=2", 2, 2);

    // 6. two plain problems back to back (maximum overlap)
    nr = 2 * N; nc = 2 * N;
    mb = new[nr*nc];
    do begin
      set_block(0, 0, 2); set_block(0, 1, 2); set_block(1, 0, 2); set_block(1, 1, 2);
    end while (min_pivot(N, mb, nc) < 0.75);
    run_problem("two chained plain problems", 1, 1, 1'b1);

    // 5. strips longer than B_q can hold must be refused
    x_ext = 16'd1; y_ext = 16'd4;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_cfgerr != 1 || busy) begin failures++; $display("oversized strip not refused"); end

    $display("mechanisms: T->S switches %0d, pivot interchanges %0d, non-pivot eliminations %0d, C4 clears %0d, Bq recirculations %0d, refusals %0d, ignored starts %0d, chained starts %0d",
             n_ts_switch, n_swap, n_nopiv, n_clear, n_recirc, n_cfgerr, n_ignored, n_chained);
    checks += 8;
    if (n_chained   == 0) begin failures++; $display("no chained start seen"); end
    if (n_ts_switch == 0) begin failures++; $display("no T->S mode switch seen"); end
    if (n_swap      == 0) begin failures++; $display("no pivot interchange seen"); end
    if (n_nopiv     == 0) begin failures++; $display("no non-pivoting elimination seen"); end
    if (n_clear     == 0) begin failures++; $display("no C4 clear seen"); end
    if (n_recirc    == 0) begin failures++; $display("no B_q recirculation seen"); end
    if (n_cfgerr    == 0) begin failures++; $display("no refusal seen"); end
    if (n_ignored   == 0) begin failures++; $display("no ignored start seen"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
