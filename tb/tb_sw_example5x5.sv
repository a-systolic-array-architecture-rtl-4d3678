// Workload testbench: the 5x5 parallelisation example.
//
// Sequence 1 = G A T T A (columns) and Sequence 2 = G A C T C (rows) on a
// 5x5 instance of sw_top with match 1, mismatch -1 and d = 2. The final
// matrix is compared with the values of that example, written out below,
// and the fill must take exactly 9 clocks, one per anti-diagonal.
module tb_sw_example5x5;
  import sw_pkg::*;

  localparam int N = 5;

  logic   clk = 0, rst_n = 0, start = 0;
  char_t  s1 [N], s2 [N];
  score_t d;
  logic   busy, done;
  logic [3:0] cyc;
  score_t h [N][N];
  score_t mx;
  int     checks = 0, failures = 0;

  int exp_h [N][N] = '{'{1, 0, 0, 0, 0},
                       '{0, 2, 0, 0, 1},
                       '{0, 0, 1, 0, 0},
                       '{0, 0, 1, 2, 0},
                       '{0, 0, 0, 0, 1}};

  always #5 clk = ~clk;

  sw_top #(.ROWS(N), .COLS(N), .MATCH(score_t'(1)), .MISMATCH(score_t'(-1))) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .seq1_i(s1), .seq2_i(s2),
    .d_i(d), .busy_o(busy), .done_o(done), .cycle_o(cyc), .h_o(h), .max_o(mx));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat = 0;
    s1 = '{BASE_G, BASE_A, BASE_T, BASE_T, BASE_A};
    s2 = '{BASE_G, BASE_A, BASE_C, BASE_T, BASE_C};
    d  = 16'sd2;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done && lat < 40) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != 2 * N - 1) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, 2 * N - 1);
    end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        checks++;
        if (int'(h[r][c]) != exp_h[r][c]) begin
          failures++;
          $display("FAIL H(%0d,%0d)=%0d exp %0d", r+1, c+1, h[r][c], exp_h[r][c]);
        end
      end
    checks++;
    if (int'(mx) != 2) begin failures++; $display("FAIL max %0d", mx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
