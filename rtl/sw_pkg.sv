// Shared types and constants of the Smith-Waterman systolic array.
//
// Sequence characters are DNA bases in a 2-bit code and all scores (H
// values, match/mismatch scores, the gap penalty d) are 16-bit two's
// complement numbers. Neither width is fixed by the architecture: the cell
// only tests characters for equality and H never exceeds MATCH times the
// shorter sequence length, so both can be widened here (for instance a
// 5-bit code for the 20 amino acids of protein sequences).
package sw_pkg;

  localparam int CHAR_W  = 2;
  localparam int SCORE_W = 16;

  typedef logic [CHAR_W-1:0]         char_t;
  typedef logic signed [SCORE_W-1:0] score_t;

  // Base code used by the testbenches; the hardware only compares codes.
  typedef enum logic [CHAR_W-1:0] {
    BASE_A = 2'd0,
    BASE_C = 2'd1,
    BASE_G = 2'd2,
    BASE_T = 2'd3
  } base_e;

  // Smallest representable score, the neutral element of a max.
  localparam score_t SCORE_MIN = {1'b1, {(SCORE_W-1){1'b0}}};

endpackage
