// Reference model for the Smith-Waterman testbenches.
//
// sw_ref fills the (rows+1) x (cols+1) score matrix in software, straight
// from the recurrence H(i,j) = max{0, H(i-1,j-1)+S, H(i-1,j)-d, H(i,j-1)-d},
// with H(0,j) = H(i,0) = 0. Row i takes character i of seq2 and column j
// character j of seq1 (1-based). src classifies where each H value came
// from, so testbenches can count which mechanism of the cell was exercised.
package tb_sw_ref_pkg;

  localparam int MAXN = 64;

  typedef int mat_t [0:MAXN][0:MAXN];
  typedef int vec_t [0:MAXN];

  // Which term of the recurrence won (ties resolved in this order).
  localparam int SRC_ZERO = 0;  // clamped to 0
  localparam int SRC_DIAG = 1;  // diagonal + S
  localparam int SRC_GAP  = 2;  // a neighbour minus d

  function automatic void sw_ref(input int rows, input int cols,
                                 input vec_t seq1, input vec_t seq2,
                                 input int match, input int mismatch,
                                 input int d, output mat_t h, output mat_t src);
    for (int i = 0; i <= MAXN; i++)
      for (int j = 0; j <= MAXN; j++) begin
        h[i][j]   = 0;
        src[i][j] = SRC_ZERO;
      end
    for (int i = 1; i <= rows; i++)
      for (int j = 1; j <= cols; j++) begin
        int dg, gp;
        dg = h[i-1][j-1] + ((seq1[j] == seq2[i]) ? match : mismatch);
        gp = h[i-1][j] - d;
        if (h[i][j-1] - d > gp) gp = h[i][j-1] - d;
        if (dg >= gp && dg > 0) begin
          h[i][j] = dg; src[i][j] = SRC_DIAG;
        end else if (gp > dg && gp > 0) begin
          h[i][j] = gp; src[i][j] = SRC_GAP;
        end else begin
          h[i][j] = 0; src[i][j] = SRC_ZERO;
        end
      end
  endfunction

  function automatic int mat_max(input int rows, input int cols, input mat_t h);
    int m = 0;
    for (int i = 1; i <= rows; i++)
      for (int j = 1; j <= cols; j++)
        if (h[i][j] > m) m = h[i][j];
    return m;
  endfunction

endpackage
