// tb_bq_fifo: checks that every lane of the B_q queue returns each
// (M, C3) pair exactly `len` cycles after it entered, for several tap
// settings including the full depth, and that lanes do not mix.
module tb_bq_fifo;
  import faddeev_pkg::*;

  localparam int W = 3;
  localparam int DEPTH = 8;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic [$clog2(DEPTH+1)-1:0] len;
  mfac_t m_in [W];
  mfac_t m_out [W];

  bq_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  mfac_t hist [$][W];

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lens [4] = '{1, 3, 8, 6};
    mfac_t row [W];
    for (int i = 0; i < W; i++) m_in[i] = '0;
    len = 1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (lens[k]) begin
      len = lens[k];
      hist.delete();
      for (int t = 0; t < 60; t++) begin
        @(negedge clk);
        // check: output now equals what was driven len cycles ago
        if (hist.size() >= len) begin
          for (int i = 0; i < W; i++) begin
            checks++;
            if (m_out[i] !== hist[hist.size()-len][i]) begin
              failures++;
              $display("len %0d lane %0d: got %h want %h", len, i, m_out[i], hist[hist.size()-len][i]);
            end
          end
        end
        for (int i = 0; i < W; i++) begin
          row[i].m  = fx_t'($urandom());
          row[i].c3 = $urandom_range(1, 0);
          m_in[i] = row[i];
        end
        hist.push_back(row);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
