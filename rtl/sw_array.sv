// Two-dimensional systolic array of Smith-Waterman cells.
//
// One sw_cell per element of the ROWS x COLS score matrix. Cell (r,c)
// (0-based) computes H(r+1,c+1): Sequence 1 character c is broadcast down
// column c, Sequence 2 character r and the gap penalty d are broadcast along
// row r, and each cell's H goes to its right, lower and lower-right
// neighbours. The first row and column of the matrix (H(0,j) and H(i,0)) are
// not stored: those neighbour inputs are tied to 0.
//
// Timing (synchronous cells): data only moves one cell per clock, so after
// k enabled clock edges every cell on anti-diagonals 1..k (r+c+1 <= k) holds
// its final value, whatever the registers held before. The whole matrix is
// valid after ROWS+COLS-1 enabled edges (7 for the 4x4 array). clr_i and
// en_i go to every cell. With ASYNC = 1 the array is a combinational network
// and h_o settles to the final matrix without a clock.
//
// The grid, the broadcast of characters and d, the neighbour wiring and the
// 4x4 default follow the architecture; the zero boundary is the
// initialisation step of the algorithm.
module sw_array
  import sw_pkg::*;
#(
  parameter int     ROWS     = 4,
  parameter int     COLS     = 4,
  parameter score_t MATCH    = score_t'(2),
  parameter score_t MISMATCH = score_t'(-1),
  parameter bit     ASYNC    = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clr_i,
  input  logic   en_i,
  input  char_t  seq1_i [COLS],
  input  char_t  seq2_i [ROWS],
  input  score_t d_i,
  output score_t h_o [ROWS][COLS]
);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      score_t h_diag, h_left, h_up;

      if (r > 0 && c > 0) begin : g_diag
        assign h_diag = h_o[r-1][c-1];
      end else begin : g_diag0
        assign h_diag = '0;
      end
      if (c > 0) begin : g_left
        assign h_left = h_o[r][c-1];
      end else begin : g_left0
        assign h_left = '0;
      end
      if (r > 0) begin : g_up
        assign h_up = h_o[r-1][c];
      end else begin : g_up0
        assign h_up = '0;
      end

      sw_cell #(
        .MATCH    (MATCH),
        .MISMATCH (MISMATCH),
        .ASYNC    (ASYNC)
      ) u_cell (
        .clk      (clk),
        .rst_n    (rst_n),
        .clr_i    (clr_i),
        .en_i     (en_i),
        .seq1_i   (seq1_i[c]),
        .seq2_i   (seq2_i[r]),
        .d_i      (d_i),
        .h_diag_i (h_diag),
        .h_left_i (h_left),
        .h_up_i   (h_up),
        .h_o      (h_o[r][c])
      );
    end
  end

endmodule
