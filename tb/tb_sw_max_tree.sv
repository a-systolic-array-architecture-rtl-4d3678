// Self-checking testbench of sw_max_tree: a 16-input tree (the 4x4 array)
// and a 5-input tree (padding path) fed random and directed values; the
// result is compared with a maximum computed by a loop here.
module tb_sw_max_tree;
  import sw_pkg::*;

  score_t v16 [16], v5 [5];
  score_t m16, m5;
  int     checks = 0, failures = 0;

  sw_max_tree #(.N(16)) dut16 (.val_i(v16), .max_o(m16));
  sw_max_tree #(.N(5))  dut5  (.val_i(v5),  .max_o(m5));

  task automatic check_all();
    int e16, e5;
    #1;
    e16 = -32768;
    e5  = -32768;
    foreach (v16[i]) if (int'(v16[i]) > e16) e16 = v16[i];
    foreach (v5[i])  if (int'(v5[i])  > e5)  e5  = v5[i];
    checks += 2;
    if (int'(m16) != e16) begin failures++; $display("FAIL n16 max=%0d exp %0d", m16, e16); end
    if (int'(m5)  != e5)  begin failures++; $display("FAIL n5 max=%0d exp %0d", m5, e5); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Maximum in each position in turn.
    for (int p = 0; p < 16; p++) begin
      foreach (v16[i]) v16[i] = score_t'(i % 3);
      v16[p] = 16'sd9;
      foreach (v5[i]) v5[i] = score_t'(-5);
      v5[p % 5] = score_t'(-2);
      check_all();
    end
    // All negative (the padding must not win).
    foreach (v16[i]) v16[i] = score_t'(-10 - i);
    foreach (v5[i])  v5[i]  = score_t'(-10 - i);
    check_all();
    for (int t = 0; t < 300; t++) begin
      foreach (v16[i]) v16[i] = score_t'((t % 2) ? $urandom_range(0, 60) : $urandom);
      foreach (v5[i])  v5[i]  = score_t'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
