// tb_square_cell: random test of the non-diagonal cell.
//
// Drives random X, M, C3 and C4 and compares the registered outputs one
// cycle later with a real-arithmetic model of the cell program: with a row
// interchange (C3 = 1) x_out = X + M x_in and x_in is stored, otherwise
// x_out = x_in + M X; M and C3 pass east, C1, C2 and C4 pass south.
module tb_square_cell;
  import faddeev_pkg::*;
  import faddeev_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  fx_t  x_in, m_in, x_out, m_out;
  logic c1_in, c2_in, c3_in, c4_in, c1_out, c2_out, c3_out, c4_out;

  square_cell dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_swap = 0, n_keep = 0, n_clear = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rval();
    return real'($signed($urandom_range(64, 0)) - 32) / 8.0;
  endfunction

  real X, xi, mi, xe, exp_x;
  localparam real TOL = 2.0 / 65536.0;

  initial begin
    real e;
    x_in = '0; m_in = '0; c1_in = 0; c2_in = 0; c3_in = 0; c4_in = 0;
    X = 0.0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      xi = rval(); mi = rval();
      x_in  = to_fx(xi);
      m_in  = to_fx(mi);
      c1_in = $urandom_range(1, 0);
      c2_in = $urandom_range(1, 0);
      c3_in = $urandom_range(1, 0);
      c4_in = ($urandom_range(7, 0) == 0);
      xe = c4_in ? 0.0 : X;
      if (c3_in) begin exp_x = xe + mi * xi; X = xi; n_swap++; end
      else begin       exp_x = xi + mi * xe; X = xe; n_keep++; end
      if (c4_in) n_clear++;
      @(posedge clk);
      #1;
      e = from_fx(x_out) - exp_x;
      if (e < 0) e = -e;
      checks++;
      if (e > TOL) begin
        failures++;
        $display("x_out: got %f want %f", from_fx(x_out), exp_x);
      end
      checks++;
      if (m_out !== m_in || c3_out !== c3_in || c1_out !== c1_in || c2_out !== c2_in || c4_out !== c4_in) begin
        failures++;
        $display("pass-through outputs wrong at t=%0d", t);
      end
    end
    checks++;
    if (n_swap == 0 || n_keep == 0 || n_clear == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
