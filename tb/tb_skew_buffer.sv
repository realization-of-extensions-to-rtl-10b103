// tb_skew_buffer: checks the skewing (column j delayed by j cycles) and
// deskewing (column j delayed by W-1-j cycles) variants, data and side bit,
// and that skew followed by deskew delays every column by W-1 cycles.
module tb_skew_buffer;
  import faddeev_pkg::*;

  localparam int W = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  fx_t  d_in [W], d_sk [W], d_ds [W];
  logic b_in [W], b_sk [W], b_ds [W];

  skew_buffer #(.W(W), .REVERSE(1'b0)) u_skew   (.clk, .rst_n, .d_in(d_in), .b_in(b_in), .d_out(d_sk), .b_out(b_sk));
  skew_buffer #(.W(W), .REVERSE(1'b1)) u_deskew (.clk, .rst_n, .d_in(d_sk), .b_in(b_sk), .d_out(d_ds), .b_out(b_ds));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  fx_t  hd [$][W];
  logic hb [$][W];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fx_t  rd [W];
    logic rb [W];
    int   n;
    for (int j = 0; j < W; j++) begin d_in[j] = '0; b_in[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 100; t++) begin
      for (int j = 0; j < W; j++) begin
        rd[j] = fx_t'($urandom());
        rb[j] = $urandom_range(1, 0);
        d_in[j] = rd[j];
        b_in[j] = rb[j];
      end
      hd.push_back(rd);
      hb.push_back(rb);
      #1;
      n = hd.size();
      for (int j = 0; j < W; j++) begin
        if (n > j) begin
          checks++;
          if (d_sk[j] !== hd[n-1-j][j] || b_sk[j] !== hb[n-1-j][j]) begin
            failures++;
            $display("skew col %0d wrong at t=%0d", j, t);
          end
        end
        if (n > W - 1) begin
          checks++;
          if (d_ds[j] !== hd[n-W][j] || b_ds[j] !== hb[n-W][j]) begin
            failures++;
            $display("deskew col %0d wrong at t=%0d", j, t);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
