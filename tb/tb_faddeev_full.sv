// tb_faddeev_full: one complete problem on the system at its default size.
//
// Four stacked 32 x 32 arrays solve D + C A^-1 B for matrices of order
// n = 128 (the system size the source design uses in its throughput
// examples). A is diagonally dominant with random off-diagonal entries,
// B, C and D are random multiples of 1/4. Every result word is compared
// with a double-precision reference (tolerance for fixed-point rounding),
// and the run must take (L+1)W - 1 + 2L * 2LW = 2207 cycles.
module tb_faddeev_full;
  import faddeev_pkg::*;
  import faddeev_tb_pkg::*;

  localparam int W = 32;
  localparam int L = 4;
  localparam int N = W * L;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic [15:0] x_ext = 16'd1, y_ext = 16'd1;
  logic        busy, cfg_err, in_req, out_valid, out_last;
  logic [31:0] in_strip, in_row, out_strip, out_row;
  fx_t         in_data [W];
  fx_t         out_data [W];

  faddeev_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real mb[];
  real ex[];
  int  nc = 2 * N;
  int  first_cyc = -1, last_cyc = -1, n_res = 0;
  real max_err = 0.0;

  always @(negedge clk) begin
    for (int j = 0; j < W; j++)
      in_data[j] = in_req ? to_fx(mb[in_row*nc + in_strip*W + j]) : FX_ZERO;
  end

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
        if (err > 0.05 + 0.005 * ((want < 0) ? -want : want)) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH strip %0d row %0d col %0d: got %f want %f", out_strip, out_row, j, got, want);
        end
      end
    end
    if (out_last) last_cyc = cyc;
  end

  function automatic real rnd(int span);
    return real'($signed($urandom_range(8*span, 0)) - 4*span) / 4.0;
  endfunction

  initial begin
    int expect_cycles;
    mb = new[2*N*nc];
    for (int r = 0; r < 2*N; r++)
      for (int c = 0; c < nc; c++)
        mb[r*nc+c] = rnd(1);
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++) mb[r*nc+c] = rnd(1) / 8.0;
      mb[r*nc+r] = ($urandom_range(1, 0) == 1) ? 4.0 + rnd(1) : -4.0 - rnd(1);
    end
    faddeev_ref(N, 2*N, nc, mb, ex);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (!busy);
    @(negedge clk);

    expect_cycles = (L + 1) * W - 1 + 2 * L * 2 * L * W;
    checks++;
    if (last_cyc - first_cyc + 1 != expect_cycles) begin
      failures++;
      $display("%0d cycles, expected %0d", last_cyc - first_cyc + 1, expect_cycles);
    end
    checks++;
    if (n_res != N * N) begin
      failures++;
      $display("%0d result words, expected %0d", n_res, N * N);
    end
    $display("n = %0d: %0d cycles, %0d result words, max error %f", N, last_cyc - first_cyc + 1, n_res, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
