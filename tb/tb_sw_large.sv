// Workload testbench: a large array, 42 x 42 = 1764 cells, close to the
// 1778-cell size of the FPGA implementation (whose array shape is not
// known). Random DNA sequence pairs, the second often a mutated copy of the
// first so that long local alignments occur, with match 2, mismatch -1 and
// gap penalties 0..3. Each fill must take 83 clocks (ROWS+COLS-1) and give
// the same matrix and maximum as the software reference.
module tb_sw_large;
  import sw_pkg::*;
  import tb_sw_ref_pkg::*;

  localparam int N   = 42;
  localparam int LAT = 2 * N - 1;

  logic   clk = 0, rst_n = 0, start = 0;
  char_t  s1 [N], s2 [N];
  score_t d;
  logic   busy, done;
  logic [6:0] cyc;
  score_t h [N][N];
  score_t mx;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  sw_top #(.ROWS(N), .COLS(N)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .seq1_i(s1), .seq2_i(s2),
    .d_i(d), .busy_o(busy), .done_o(done), .cycle_o(cyc), .h_o(h), .max_o(mx));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mat_t h_ref, src;
    vec_t v1, v2;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      int lat, bad;
      lat = 0;
      bad = 0;
      foreach (v1[i]) begin v1[i] = 0; v2[i] = 0; end
      foreach (s1[i]) s1[i] = char_t'($urandom);
      foreach (s2[i]) begin
        // Shifted, mutated copy of Sequence 1 on odd runs.
        if (t % 2 == 1 && $urandom_range(0, 9) != 0) s2[i] = s1[(i + t) % N];
        else s2[i] = char_t'($urandom);
      end
      d = score_t'($urandom_range(0, 3));
      for (int i = 0; i < N; i++) begin v1[i+1] = s1[i]; v2[i+1] = s2[i]; end
      sw_ref(N, N, v1, v2, 2, -1, int'(d), h_ref, src);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done && lat < 4 * LAT) begin
        @(negedge clk);
        lat++;
      end
      checks++;
      if (lat != LAT) begin failures++; $display("FAIL latency %0d exp %0d", lat, LAT); end
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          checks++;
          if (int'(h[r][c]) != h_ref[r+1][c+1]) begin failures++; bad++; end
        end
      checks++;
      if (int'(mx) != mat_max(N, N, h_ref)) begin
        failures++;
        $display("FAIL max %0d exp %0d", mx, mat_max(N, N, h_ref));
      end
      $display("run %0d: d=%0d max=%0d mismatching cells=%0d", t, d, mx, bad);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
