// Smith-Waterman processing cell: one element H(i,j) of the score matrix.
//
//   H(i,j) = max{ 0, H(diag) + S, H(left) - d, H(up) - d }
//
// Datapath, unit by unit:
//   Comp1  S = MATCH if seq1_i == seq2_i, else MISMATCH
//   Add1   H(diag) + S
//   Comp2  max(Add1, 0)
//   Add2   H(left) + (-d)
//   Add3   H(up)   + (-d)
//   Comp3  max(Add2, Add3)
//   Comp4  max(Comp2, Comp3)  -> register R(i,j) -> h_o
// Comp2..Comp4 are sw_max_finder instances. The match and mismatch scores
// are parameters (constants of the cell); d is an input, shared along a row.
//
// Timing: with ASYNC = 0 (the normal, synchronous cell) R(i,j) loads the
// new value at each clock edge where en_i is high, so h_o follows the
// neighbours with one clock of delay. clr_i clears R(i,j) to 0 at the next
// edge (initialisation step) and has priority over en_i; rst_n clears it
// asynchronously. With ASYNC = 1 the register is left out and h_o is the
// combinational Comp4 output, so an array of such cells settles to the final
// matrix without a clock (it gives only the final values, not a wavefront);
// clk, rst_n, clr_i and en_i are then unused.
//
// The unit structure follows the cell diagram; MATCH = 2 matches the worked
// 4x4 example, MISMATCH = -1, the widths, the reset, clear and enable are
// choices of this design.
module sw_cell
  import sw_pkg::*;
#(
  parameter score_t MATCH    = score_t'(2),
  parameter score_t MISMATCH = score_t'(-1),
  parameter bit     ASYNC    = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clr_i,
  input  logic   en_i,
  input  char_t  seq1_i,
  input  char_t  seq2_i,
  input  score_t d_i,
  input  score_t h_diag_i,
  input  score_t h_left_i,
  input  score_t h_up_i,
  output score_t h_o
);

  score_t s;          // Comp1
  score_t add1, add2, add3;
  score_t comp2, comp3, comp4;

  always_comb begin
    s    = (seq1_i == seq2_i) ? MATCH : MISMATCH;
    add1 = h_diag_i + s;
    add2 = h_left_i - d_i;
    add3 = h_up_i - d_i;
  end

  sw_max_finder u_comp2 (.flag_o(), .in1_i(add1),  .in2_i('0),   .max_o(comp2));
  sw_max_finder u_comp3 (.flag_o(), .in1_i(add2),  .in2_i(add3), .max_o(comp3));
  sw_max_finder u_comp4 (.flag_o(), .in1_i(comp2), .in2_i(comp3), .max_o(comp4));

  if (ASYNC) begin : g_async
    assign h_o = comp4;
  end else begin : g_sync
    score_t r_ij;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     r_ij <= '0;
      else if (clr_i) r_ij <= '0;
      else if (en_i)  r_ij <= comp4;
    end
    assign h_o = r_ij;
  end

endmodule
