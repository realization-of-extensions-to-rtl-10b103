// tb_faddeev_ctrl: checks the control sequence.
//
// Instance A (one 4 x 4 array, plain problem): the C1 C2 C4 values over
// the 16 steps of the input flow must be the single-array data flow table:
// step 1: 1 1 1, steps 2-4: 1 1 0, steps 5-8: 1 0 0, step 9: 0 0 1,
// steps 10-16: 0 0 0. Also checks in_strip/in_row, bq_len = W and the
// result tags (rows 13..16 of the flow, LAT = 2W-1 cycles later).
// Instance B (two 2 x 2 arrays, x = 2, y = 1): checks that array 1 sees
// its mode bits W cycles after array 0, that C1 of array l is high only
// during strip l, the request length and the refusal of a y that does not
// fit the queue.
module tb_faddeev_ctrl;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- instance A: W = 4, L = 1 ----------------
  logic        a_start = 0, a_busy, a_err, a_req, a_c4, a_ov, a_last;
  logic        a_c1 [1], a_c2 [1];
  logic [31:0] a_strip, a_row, a_ostrip, a_orow;
  logic [$clog2(4+1)-1:0] a_len;
  faddeev_ctrl #(.W(4), .L(1), .BQ_DEPTH(4)) u_a (
    .clk, .rst_n, .start(a_start), .x_ext(16'd1), .y_ext(16'd1),
    .busy(a_busy), .cfg_err(a_err), .in_req(a_req), .in_strip(a_strip), .in_row(a_row),
    .c4(a_c4), .c1(a_c1), .c2(a_c2), .bq_len(a_len),
    .out_valid(a_ov), .out_strip(a_ostrip), .out_row(a_orow), .out_last(a_last)
  );

  // ---------------- instance B: W = 2, L = 2 ----------------
  logic        b_start = 0, b_busy, b_err, b_req, b_c4, b_ov, b_last;
  logic        b_c1 [2], b_c2 [2];
  logic [31:0] b_strip, b_row, b_ostrip, b_orow;
  logic [15:0] b_y = 16'd1;
  logic [$clog2(6+1)-1:0] b_len;
  faddeev_ctrl #(.W(2), .L(2), .BQ_DEPTH(6)) u_b (
    .clk, .rst_n, .start(b_start), .x_ext(16'd2), .y_ext(b_y),
    .busy(b_busy), .cfg_err(b_err), .in_req(b_req), .in_strip(b_strip), .in_row(b_row),
    .c4(b_c4), .c1(b_c1), .c2(b_c2), .bq_len(b_len),
    .out_valid(b_ov), .out_strip(b_ostrip), .out_row(b_orow), .out_last(b_last)
  );

  initial begin
    bit [2:0] table_c [16] = '{3'b111, 3'b110, 3'b110, 3'b110,
                               3'b100, 3'b100, 3'b100, 3'b100,
                               3'b001, 3'b000, 3'b000, 3'b000,
                               3'b000, 3'b000, 3'b000, 3'b000};
    int step, nres, req_cycles, c1_0_first, c1_1_first, c1_1_count, cyc;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- A ----
    @(negedge clk) a_start = 1;
    @(negedge clk) a_start = 0;
    chk(a_len == 4, "bq_len of single array");
    nres = 0;
    for (step = 1; step <= 16; step++) begin
      chk(a_req == 1'b1, $sformatf("in_req at step %0d", step));
      chk({a_c1[0], a_c2[0], a_c4} == table_c[step-1], $sformatf("C1 C2 C4 at step %0d", step));
      chk(a_strip == 32'((step - 1) / 8) && a_row == 32'((step - 1) % 8), $sformatf("indices at step %0d", step));
      @(negedge clk);
    end
    chk(a_req == 1'b0, "in_req ends after 16 steps");
    // results: rows 13..16 appear LAT = 7 cycles after they were fed
    // (steps 20..23); we are now at step 17
    for (step = 17; step <= 24; step++) begin
      if (a_ov) begin
        nres++;
        chk(a_ostrip == 1 && a_orow == 32'(step - 7 - 1 - 8), $sformatf("result tag at step %0d", step));
      end
      chk(a_last == (step == 23), $sformatf("out_last at step %0d", step));
      @(negedge clk);
    end
    chk(nres == 4, "four result rows");
    wait (!a_busy);

    // ---- B ----
    @(negedge clk) b_start = 1;
    @(negedge clk) b_start = 0;
    chk(b_len == 6, "bq_len of two arrays");
    req_cycles = 0; c1_0_first = -1; c1_1_first = -1; c1_1_count = 0; cyc = 0;
    while (b_busy) begin
      if (b_req) req_cycles++;
      if (b_c1[0] && c1_0_first < 0) c1_0_first = cyc;
      if (b_c1[1] && c1_1_first < 0) c1_1_first = cyc;
      if (b_c1[1]) c1_1_count++;
      cyc++;
      @(negedge clk);
    end
    chk(req_cycles == 6 * 8, "48 rows requested for x = 2");
    chk(c1_0_first == 0, "array 0 enters T mode with the first row");
    chk(c1_1_first == 8 + 2, "array 1 enters T mode with strip 1, W cycles later");
    chk(c1_1_count == 8, "array 1 stays in T mode for one strip");

    // y = 2 needs a queue of 3*4-2 = 10 > 6: refused
    b_y = 16'd2;
    @(negedge clk) b_start = 1;
    @(negedge clk) b_start = 0;
    chk(b_err == 1'b1 && !b_busy, "oversized strip refused");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
