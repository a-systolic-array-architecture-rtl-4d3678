// Self-checking testbench of sw_array.
//
// 1. The worked 4x4 example: Sequence 1 = A G T A (columns), Sequence 2 =
//    G G T C (rows), d = 0, match 2. The final matrix is compared with the
//    table of that example written out below.
// 2. Random sequences and gap penalties on the 4x4 array and on a 5x3 array,
//    compared with the software reference.
// Each fill starts with a clear and then enables the cells clock by clock;
// after k enabled edges every cell of anti-diagonals 1..k must already hold
// its final value (wavefront check), and the whole matrix must be final
// after ROWS+COLS-1 edges. A combinational (ASYNC) 4x4 array fed the same
// inputs must settle to the same final matrix.
module tb_sw_array;
  import sw_pkg::*;
  import tb_sw_ref_pkg::*;

  logic   clk = 0, rst_n = 0, clr = 0, en = 0;
  int     checks = 0, failures = 0;
  int     full_at_last = 0;

  always #5 clk = ~clk;

  // 4x4 array (synchronous and combinational) ---------------------------
  char_t  a_s1 [4], a_s2 [4];
  score_t a_d;
  score_t a_h [4][4], a_ha [4][4];

  sw_array #(.ROWS(4), .COLS(4)) dut4 (
    .clk(clk), .rst_n(rst_n), .clr_i(clr), .en_i(en),
    .seq1_i(a_s1), .seq2_i(a_s2), .d_i(a_d), .h_o(a_h));

  sw_array #(.ROWS(4), .COLS(4), .ASYNC(1'b1)) dut4_async (
    .clk(clk), .rst_n(rst_n), .clr_i(clr), .en_i(en),
    .seq1_i(a_s1), .seq2_i(a_s2), .d_i(a_d), .h_o(a_ha));

  // 5x3 array -------------------------------------------------------------
  char_t  b_s1 [3], b_s2 [5];
  score_t b_d;
  score_t b_h [5][3];

  sw_array #(.ROWS(5), .COLS(3)) dut53 (
    .clk(clk), .rst_n(rst_n), .clr_i(clr), .en_i(en),
    .seq1_i(b_s1), .seq2_i(b_s2), .d_i(b_d), .h_o(b_h));

  function automatic int got(input int which, input int r, input int c);
    if (which == 0) return int'(a_h[r][c]);
    else if (which == 1) return int'(a_ha[r][c]);
    else return int'(b_h[r][c]);
  endfunction

  // Runs one fill on array `which` (0: 4x4, 2: 5x3) against ref matrix h.
  task automatic run_fill(input int which, input int rows, input int cols,
                          input mat_t h);
    int all_ok_at = -1;
    @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0;
    en  = 1;
    for (int k = 1; k <= rows + cols - 1; k++) begin
      bit all_ok = 1;
      @(negedge clk);
      for (int r = 0; r < rows; r++)
        for (int c = 0; c < cols; c++) begin
          if (got(which, r, c) != h[r+1][c+1]) all_ok = 0;
          if (r + c + 1 <= k) begin
            checks++;
            if (got(which, r, c) != h[r+1][c+1]) begin
              failures++;
              $display("FAIL arr%0d edge %0d H(%0d,%0d)=%0d exp %0d",
                       which, k, r+1, c+1, got(which, r, c), h[r+1][c+1]);
            end
          end
        end
      if (all_ok && all_ok_at < 0) all_ok_at = k;
    end
    en = 0;
    if (all_ok_at == rows + cols - 1) full_at_last++;
    // Holds once en is low.
    @(negedge clk);
    checks++;
    if (got(which, rows-1, cols-1) != h[rows][cols]) begin
      failures++;
      $display("FAIL arr%0d hold", which);
    end
  endtask

  task automatic check_async(input mat_t h);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (got(1, r, c) != h[r+1][c+1]) begin
          failures++;
          $display("FAIL async H(%0d,%0d)=%0d exp %0d", r+1, c+1, got(1, r, c), h[r+1][c+1]);
        end
      end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mat_t h, src;
    vec_t v1, v2;
    // Worked example, final matrix as printed (rows G G T C, cols A G T A).
    int table1 [4][4] = '{'{0, 2, 2, 2}, '{0, 2, 2, 2}, '{0, 2, 4, 4}, '{0, 2, 4, 4}};

    a_s1 = '{BASE_A, BASE_G, BASE_T, BASE_A};
    a_s2 = '{BASE_G, BASE_G, BASE_T, BASE_C};
    a_d  = '0;
    b_s1 = '{default: '0};
    b_s2 = '{default: '0};
    b_d  = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    foreach (h[i, j]) h[i][j] = 0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) h[r+1][c+1] = table1[r][c];
    run_fill(0, 4, 4, h);
    check_async(h);

    // A match at H(1,1) that reaches H(4,4) only through gap steps (d = 0,
    // every other pair a mismatch): the longest dependency chain, so the
    // matrix can only be final at the last of the 7 clocks.
    a_s1 = '{BASE_A, BASE_C, BASE_C, BASE_C};
    a_s2 = '{BASE_A, BASE_G, BASE_G, BASE_G};
    a_d  = '0;
    foreach (v1[i]) begin v1[i] = 0; v2[i] = 0; end
    for (int i = 0; i < 4; i++) begin v1[i+1] = a_s1[i]; v2[i+1] = a_s2[i]; end
    sw_ref(4, 4, v1, v2, 2, -1, 0, h, src);
    run_fill(0, 4, 4, h);
    check_async(h);

    for (int t = 0; t < 60; t++) begin
      foreach (v1[i]) begin v1[i] = 0; v2[i] = 0; end
      for (int c = 0; c < 4; c++) begin a_s1[c] = char_t'($urandom); v1[c+1] = a_s1[c]; end
      for (int r = 0; r < 4; r++) begin a_s2[r] = char_t'($urandom); v2[r+1] = a_s2[r]; end
      // Identical sequences now and then make long diagonals.
      if (t % 5 == 0) for (int r = 0; r < 4; r++) begin a_s2[r] = a_s1[r]; v2[r+1] = v1[r+1]; end
      a_d = score_t'($urandom_range(0, 2));
      sw_ref(4, 4, v1, v2, 2, -1, int'(a_d), h, src);
      run_fill(0, 4, 4, h);
      check_async(h);
    end

    for (int t = 0; t < 40; t++) begin
      foreach (v1[i]) begin v1[i] = 0; v2[i] = 0; end
      for (int c = 0; c < 3; c++) begin b_s1[c] = char_t'($urandom); v1[c+1] = b_s1[c]; end
      for (int r = 0; r < 5; r++) begin b_s2[r] = char_t'($urandom); v2[r+1] = b_s2[r]; end
      b_d = score_t'($urandom_range(0, 2));
      sw_ref(5, 3, v1, v2, 2, -1, int'(b_d), h, src);
      run_fill(2, 5, 3, h);
    end

    // The longest-chain fill must have needed every one of its ROWS+COLS-1 clocks.
    checks++;
    if (full_at_last == 0) begin
      failures++;
      $display("FAIL no fill needed the last anti-diagonal clock");
    end
    $display("fills that became final only at the last clock: %0d", full_at_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
