// End-to-end testbench of sw_top at its default size (4x4 array, match 2,
// mismatch -1), through the start/done interface.
//
// Runs the worked example (Sequence 1 = A G T A, Sequence 2 = G G T C,
// d = 0) against its printed result matrix, then random sequence pairs and
// gap penalties against the software reference. For every fill it checks
// the latency (done_o exactly ROWS+COLS-1 = 7 clocks after start), the
// wavefront while busy (anti-diagonals 1..cycle_o final), every H value and
// max_o. It counts how often each mechanism occurred: a cell taking the
// diagonal (match) path, a mismatch, a gap path win, a clamp to zero, a
// start ignored during a fill, a restart from the done state, and a maximum
// that is not in the last cell; each must occur at least once.
module tb_sw_top;
  import sw_pkg::*;
  import tb_sw_ref_pkg::*;

  localparam int R = 4, C = 4;
  localparam int LAT = R + C - 1;

  logic   clk = 0, rst_n = 0, start = 0;
  char_t  s1 [C], s2 [R];
  score_t d;
  logic   busy, done;
  logic [2:0] cyc;
  score_t h [R][C];
  score_t mx;

  int checks = 0, failures = 0;
  int n_diag = 0, n_mismatch = 0, n_gap = 0, n_zero = 0;
  int n_ignored = 0, n_restart = 0, n_inner_max = 0;

  always #5 clk = ~clk;

  sw_top dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .seq1_i(s1), .seq2_i(s2),
    .d_i(d), .busy_o(busy), .done_o(done), .cycle_o(cyc), .h_o(h), .max_o(mx));

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // Runs one fill of the current inputs against reference h_ref/src.
  task automatic fill(input mat_t h_ref, input mat_t src, input bit poke);
    vec_t v1, v2;
    int lat = 0;
    if (done) n_restart++;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    // The inputs may change now: they were registered at start.
    foreach (s1[i]) s1[i] = char_t'($urandom);
    foreach (s2[i]) s2[i] = char_t'($urandom);
    d = score_t'($urandom_range(0, 9));
    while (!done && lat < 4 * LAT) begin
      checks++;
      if (!busy || int'(cyc) != lat) fail($sformatf("busy/cycle at %0d", lat));
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++)
          if (r + c + 1 <= lat) begin
            checks++;
            if (int'(h[r][c]) != h_ref[r+1][c+1])
              fail($sformatf("wavefront H(%0d,%0d) after %0d clocks", r+1, c+1, lat));
          end
      if (poke && lat == 2) begin
        start = 1;
        n_ignored++;
      end
      @(negedge clk);
      start = 0;
      lat++;
    end
    checks++;
    if (lat != LAT) fail($sformatf("latency %0d, expected %0d", lat, LAT));
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        checks++;
        if (int'(h[r][c]) != h_ref[r+1][c+1])
          fail($sformatf("H(%0d,%0d)=%0d exp %0d", r+1, c+1, h[r][c], h_ref[r+1][c+1]));
        case (src[r+1][c+1])
          SRC_DIAG: n_diag++;
          SRC_GAP:  n_gap++;
          default:  n_zero++;
        endcase
      end
    checks++;
    if (int'(mx) != mat_max(R, C, h_ref)) fail($sformatf("max %0d exp %0d", mx, mat_max(R, C, h_ref)));
    if (mat_max(R, C, h_ref) > h_ref[R][C]) n_inner_max++;
    // Results hold after done.
    repeat (2) @(negedge clk);
    checks++;
    if (!done || int'(h[R-1][C-1]) != h_ref[R][C] || busy) fail("results not held");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mat_t h_ref, src;
    vec_t v1, v2;
    int table1 [4][4] = '{'{0, 2, 2, 2}, '{0, 2, 2, 2}, '{0, 2, 4, 4}, '{0, 2, 4, 4}};

    s1 = '{BASE_A, BASE_G, BASE_T, BASE_A};
    s2 = '{BASE_G, BASE_G, BASE_T, BASE_C};
    d  = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (busy || done) fail("not idle after reset");

    // Worked example: expected values are the printed table; the reference
    // model is used only to classify the cells.
    foreach (v1[i]) begin v1[i] = 0; v2[i] = 0; end
    for (int i = 0; i < 4; i++) begin v1[i+1] = s1[i]; v2[i+1] = s2[i]; end
    sw_ref(R, C, v1, v2, 2, -1, 0, h_ref, src);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) h_ref[r+1][c+1] = table1[r][c];
    fill(h_ref, src, 1'b0);

    for (int t = 0; t < 200; t++) begin
      foreach (v1[i]) begin v1[i] = 0; v2[i] = 0; end
      if (t % 4 == 0) foreach (s2[i]) s2[i] = s1[i];
      for (int i = 0; i < C; i++) v1[i+1] = s1[i];
      for (int i = 0; i < R; i++) v2[i+1] = s2[i];
      for (int i = 1; i <= C; i++)
        for (int j = 1; j <= R; j++)
          if (v1[i] != v2[j]) n_mismatch++;
      sw_ref(R, C, v1, v2, 2, -1, int'(d), h_ref, src);
      fill(h_ref, src, t % 10 == 3);
    end

    $display("mechanisms: diag=%0d mismatch=%0d gap=%0d zero=%0d ignored_start=%0d restart=%0d inner_max=%0d",
             n_diag, n_mismatch, n_gap, n_zero, n_ignored, n_restart, n_inner_max);
    checks++;
    if (n_diag == 0 || n_mismatch == 0 || n_gap == 0 || n_zero == 0 ||
        n_ignored == 0 || n_restart == 0 || n_inner_max == 0)
      fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
