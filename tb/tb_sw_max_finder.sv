// Self-checking testbench of sw_max_finder: directed corner cases (ties,
// extremes, signs) and random pairs, compared with a max worked out here.
module tb_sw_max_finder;
  import sw_pkg::*;

  score_t in1, in2, mx;
  logic   flag;
  int     checks = 0, failures = 0;

  sw_max_finder dut (.in1_i(in1), .in2_i(in2), .flag_o(flag), .max_o(mx));

  task automatic check(input int a, input int b);
    int exp_max;
    logic exp_flag;
    in1 = score_t'(a);
    in2 = score_t'(b);
    #1;
    exp_flag = (a >= b);
    exp_max  = exp_flag ? a : b;
    checks++;
    if (flag !== exp_flag || int'(mx) !== exp_max) begin
      failures++;
      $display("FAIL in1=%0d in2=%0d flag=%0b max=%0d exp flag=%0b max=%0d",
               a, b, flag, mx, exp_flag, exp_max);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0);
    check(5, 3);
    check(3, 5);
    check(-1, 0);
    check(0, -1);
    check(-7, -3);
    check(7, 7);
    check(32767, -32768);
    check(-32768, 32767);
    for (int k = 0; k < 500; k++)
      check($signed(16'($urandom)), $signed(16'($urandom)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
