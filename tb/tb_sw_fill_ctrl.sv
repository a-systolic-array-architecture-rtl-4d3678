// Self-checking testbench of sw_fill_ctrl (CYCLES = 7, the 4x4 array).
//
// Checks, cycle by cycle: clr_o/load_o only on an accepted start, en_o high
// for exactly CYCLES clocks, done_o CYCLES clocks after start and held until
// the next start, starts during a fill ignored, restart from DONE.
module tb_sw_fill_ctrl;

  localparam int CYC = 7;

  logic       clk = 0, rst_n = 0, start = 0;
  logic       clr, load, en, busy, done;
  logic [2:0] cyc;
  int         checks = 0, failures = 0;
  int         n_ignored = 0;

  always #5 clk = ~clk;

  sw_fill_ctrl #(.CYCLES(CYC)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .clr_o(clr), .load_o(load),
    .en_o(en), .busy_o(busy), .done_o(done), .cycle_o(cyc));

  task automatic expect1(input logic got_v, input logic exp_v, input string what);
    checks++;
    if (got_v !== exp_v) begin
      failures++;
      $display("FAIL %s got %0b exp %0b at %0t", what, got_v, exp_v, $time);
    end
  endtask

  // One fill; poke = a cycle of the fill at which start is raised again.
  task automatic one_fill(input int poke);
    int en_count = 0, lat = 0;
    @(negedge clk);
    start = 1;
    #1;
    expect1(clr, 1'b1, "clr on start");
    expect1(load, 1'b1, "load on start");
    @(negedge clk);
    start = 0;
    while (!done && lat < 50) begin
      expect1(clr, 1'b0, "no clr during fill");
      if (en) en_count++;
      if (lat == poke) begin
        start = 1;
        #1;
        expect1(load, 1'b0, "start ignored while busy");
        n_ignored++;
      end
      @(negedge clk);
      start = 0;
      lat++;
    end
    checks++;
    if (lat != CYC || en_count != CYC) begin
      failures++;
      $display("FAIL latency %0d en cycles %0d exp %0d", lat, en_count, CYC);
    end
    repeat (3) begin
      @(negedge clk);
      expect1(done, 1'b1, "done held");
      expect1(en, 1'b0, "en low when done");
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    expect1(busy, 1'b0, "idle in reset");
    rst_n = 1;
    @(negedge clk);
    expect1(done, 1'b0, "not done after reset");
    expect1(en, 1'b0, "not enabled after reset");
    one_fill(-1);
    one_fill(3);
    one_fill(0);
    checks++;
    if (n_ignored == 0) begin failures++; $display("FAIL no ignored start"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
