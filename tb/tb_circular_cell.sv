// tb_circular_cell: random test of the diagonal cell.
//
// Drives random X, M, C1..C4 (including zero X, equal magnitudes and C4
// clears) and compares every registered output one cycle later with a
// model of the T mode (boundary cell with/without neighbour pivoting) and
// S mode (internal cell) microprograms written in real arithmetic.
// Quotients and products may differ from the model by 2 LSB of rounding.
module tb_circular_cell;
  import faddeev_pkg::*;
  import faddeev_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  fx_t  x_in, m_in, x_out, m_out;
  logic c1_in, c2_in, c3_in, c4_in, c1_out, c2_out, c3_out, c4_out;

  circular_cell dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_swap = 0, n_elim = 0, n_smode = 0, n_clear = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rval();
    case ($urandom_range(5, 0))
      0: return 0.0;
      1: return 1.5;
      2: return -1.5;
      default: return real'($signed($urandom_range(64, 0)) - 32) / 8.0;
    endcase
  endfunction

  task automatic cmp(string what, real got, real want, real tol);
    real e;
    e = (got > want) ? got - want : want - got;
    checks++;
    if (e > tol) begin
      failures++;
      $display("%s: got %f want %f", what, got, want);
    end
  endtask

  real  X;  // model of the stored entry
  real  xi, mi, xe, exp_x, exp_m;
  logic exp_c3;
  localparam real LSB = 1.0 / 65536.0;

  initial begin
    x_in = '0; m_in = '0; c1_in = 0; c2_in = 0; c3_in = 0; c4_in = 0;
    X = 0.0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      xi = rval(); mi = rval();
      x_in  = to_fx(xi);
      m_in  = to_fx(mi);
      c1_in = ($urandom_range(3, 0) != 0);
      c2_in = $urandom_range(1, 0);
      c3_in = $urandom_range(1, 0);
      c4_in = ($urandom_range(7, 0) == 0);
      xe = c4_in ? 0.0 : X;
      exp_x = 0.0;
      if (c1_in) begin
        if (c2_in && ((xi < 0 ? -xi : xi) >= (xe < 0 ? -xe : xe))) begin
          exp_c3 = 1'b1;
          exp_m  = (xi != 0.0) ? -xe / xi : 0.0;
          X      = xi;
          if (xe != 0.0) n_swap++;
        end else begin
          exp_c3 = 1'b0;
          exp_m  = (xe != 0.0) ? -xi / xe : 0.0;
          X      = xe;
          n_elim++;
        end
      end else begin
        n_smode++;
        exp_c3 = c3_in;
        exp_m  = mi;
        if (c3_in) begin exp_x = xe + mi * xi; X = xi; end
        else begin       exp_x = xi + mi * xe; X = xe; end
      end
      if (c4_in) n_clear++;
      @(negedge clk);
      cmp("m_out", from_fx(m_out), exp_m, 2 * LSB);
      cmp("x_out", from_fx(x_out), exp_x, 2 * LSB);
      checks++;
      if (c3_out !== exp_c3 || c1_out !== c1_in || c2_out !== c2_in || c4_out !== c4_in) begin
        failures++;
        $display("control outputs wrong at t=%0d", t);
      end
      // the cell must hold its state while inputs are idle for one cycle:
      // drive a pure S-mode pass with m = 0 so x_out = x_in, X unchanged
      x_in = to_fx(0.25); m_in = '0; c1_in = 0; c3_in = 0; c4_in = 0;
    end
    checks++;
    if (n_swap == 0 || n_elim == 0 || n_smode == 0 || n_clear == 0) begin
      failures++;
      $display("mechanism not exercised: swap %0d elim %0d smode %0d clear %0d", n_swap, n_elim, n_smode, n_clear);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
