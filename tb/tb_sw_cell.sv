// Self-checking testbench of sw_cell.
//
// Drives random characters, neighbour H values and gap penalties into a
// synchronous cell (MATCH 2, MISMATCH -1) and checks, one clock later, the
// registered H against the recurrence computed here. Also checks that the
// register holds while en_i is low, that clr_i clears it, and that an
// ASYNC = 1 cell gives the same value without a clock.
module tb_sw_cell;
  import sw_pkg::*;

  localparam int M  = 2;
  localparam int MM = -1;

  logic   clk = 0, rst_n = 0, clr = 0, en = 0;
  char_t  s1, s2;
  score_t d, hd, hl, hu, h, ha;
  int     checks = 0, failures = 0;
  int     n_zero = 0, n_diag = 0, n_gap = 0;

  always #5 clk = ~clk;

  sw_cell #(.MATCH(score_t'(M)), .MISMATCH(score_t'(MM))) dut (
    .clk(clk), .rst_n(rst_n), .clr_i(clr), .en_i(en),
    .seq1_i(s1), .seq2_i(s2), .d_i(d),
    .h_diag_i(hd), .h_left_i(hl), .h_up_i(hu), .h_o(h));

  sw_cell #(.MATCH(score_t'(M)), .MISMATCH(score_t'(MM)), .ASYNC(1'b1)) dut_async (
    .clk(clk), .rst_n(rst_n), .clr_i(clr), .en_i(en),
    .seq1_i(s1), .seq2_i(s2), .d_i(d),
    .h_diag_i(hd), .h_left_i(hl), .h_up_i(hu), .h_o(ha));

  function automatic int ref_h(int a, int b, int dd, int dg, int lf, int up);
    int v = 0;
    if (dg + ((a == b) ? M : MM) > v) v = dg + ((a == b) ? M : MM);
    if (lf - dd > v) v = lf - dd;
    if (up - dd > v) v = up - dd;
    return v;
  endfunction

  task automatic expect_h(input int exp_v, input string what);
    checks++;
    if (int'(h) !== exp_v) begin
      failures++;
      $display("FAIL %s: h=%0d exp=%0d", what, h, exp_v);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, prev;
    s1 = '0; s2 = '0; d = '0; hd = '0; hl = '0; hu = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    expect_h(0, "after reset");
    en = 1;
    for (int k = 0; k < 400; k++) begin
      s1 = char_t'($urandom);
      s2 = char_t'($urandom);
      d  = score_t'($urandom_range(0, 4));
      hd = score_t'($urandom_range(0, 40));
      hl = score_t'($urandom_range(0, 40));
      hu = score_t'($urandom_range(0, 40));
      if (k % 7 == 0) begin hd = '0; hl = '0; hu = '0; end
      e = ref_h(s1, s2, d, hd, hl, hu);
      if (e == 0) n_zero++;
      else if (e == hd + ((s1 == s2) ? M : MM)) n_diag++;
      else n_gap++;
      #1;
      checks++;
      if (int'(ha) !== e) begin
        failures++;
        $display("FAIL async h=%0d exp=%0d", ha, e);
      end
      @(negedge clk);
      expect_h(e, "registered");
    end
    // Hold with en low.
    prev = h;
    en = 0;
    hd = 16'sd100; s1 = 2'd1; s2 = 2'd1;
    @(negedge clk);
    expect_h(prev, "hold");
    // Synchronous clear has priority over enable.
    en = 1; clr = 1;
    @(negedge clk);
    expect_h(0, "clear");
    clr = 0;
    @(negedge clk);
    expect_h(102, "after clear");
    checks++;
    if (n_zero == 0 || n_diag == 0 || n_gap == 0) begin
      failures++;
      $display("FAIL coverage zero=%0d diag=%0d gap=%0d", n_zero, n_diag, n_gap);
    end
    $display("cases: zero=%0d diag=%0d gap=%0d", n_zero, n_diag, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
