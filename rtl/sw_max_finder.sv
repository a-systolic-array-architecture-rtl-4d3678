// Max finder: the larger of two signed scores.
//
// A comparator raises flag_o when in1_i >= in2_i, and flag_o selects the
// multiplexer input: max_o = flag_o ? in1_i : in2_i. Ties therefore pass
// Input 1. This is the comparator-plus-multiplexer unit used both in the
// network that tracks the largest H value of the array and, inside every
// cell, for the three "greater of two numbers" comparators (Comp2, Comp3,
// Comp4). Purely combinational; the 16-bit width comes from sw_pkg and is
// this design's choice.
module sw_max_finder
  import sw_pkg::*;
(
  input  score_t in1_i,
  input  score_t in2_i,
  output logic   flag_o,
  output score_t max_o
);

  always_comb begin
    flag_o = (in1_i >= in2_i);
    max_o  = flag_o ? in1_i : in2_i;
  end

endmodule
