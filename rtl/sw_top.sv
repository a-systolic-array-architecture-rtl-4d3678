// Smith-Waterman matrix-fill accelerator: systolic array, max finder
// network and fill sequencer.
//
// Usage: drive seq1_i (COLS characters, matrix columns), seq2_i (ROWS
// characters, matrix rows) and the gap penalty d_i, and pulse start_i. The
// inputs are registered on that clock edge, the cells are cleared, and the
// array fills one anti-diagonal per clock. done_o rises ROWS+COLS-1 clocks
// after start_i was sampled (7 clocks for the 4x4 default); h_o then holds
// H(1..ROWS,1..COLS) and max_o the largest of them, the cell where a trace
// back would start. Both stay valid until the next start. While busy_o is
// high h_o shows the wavefront: anti-diagonals 1..cycle_o are final.
//
// The array and the max finder network follow the architecture; the input
// registers, the start/done handshake and the sequencer are this design's.
module sw_top
  import sw_pkg::*;
#(
  parameter int     ROWS     = 4,
  parameter int     COLS     = 4,
  parameter score_t MATCH    = score_t'(2),
  parameter score_t MISMATCH = score_t'(-1),
  localparam int    CYCLES   = ROWS + COLS - 1,
  localparam int    CNT_W    = (CYCLES < 2) ? 1 : $clog2(CYCLES + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start_i,
  input  char_t            seq1_i [COLS],
  input  char_t            seq2_i [ROWS],
  input  score_t           d_i,
  output logic             busy_o,
  output logic             done_o,
  output logic [CNT_W-1:0] cycle_o,
  output score_t           h_o [ROWS][COLS],
  output score_t           max_o
);

  logic   clr, load, en;
  char_t  seq1_q [COLS];
  char_t  seq2_q [ROWS];
  score_t d_q;
  score_t h_flat [ROWS*COLS];

  sw_fill_ctrl #(.CYCLES(CYCLES)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start_i (start_i),
    .clr_o   (clr),
    .load_o  (load),
    .en_o    (en),
    .busy_o  (busy_o),
    .done_o  (done_o),
    .cycle_o (cycle_o)
  );

  // Input registers: the sequences and d stay fixed during a fill.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq1_q <= '{default: '0};
      seq2_q <= '{default: '0};
      d_q    <= '0;
    end else if (load) begin
      seq1_q <= seq1_i;
      seq2_q <= seq2_i;
      d_q    <= d_i;
    end
  end

  sw_array #(
    .ROWS     (ROWS),
    .COLS     (COLS),
    .MATCH    (MATCH),
    .MISMATCH (MISMATCH),
    .ASYNC    (1'b0)
  ) u_array (
    .clk    (clk),
    .rst_n  (rst_n),
    .clr_i  (clr),
    .en_i   (en),
    .seq1_i (seq1_q),
    .seq2_i (seq2_q),
    .d_i    (d_q),
    .h_o    (h_o)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_fr
    for (genvar c = 0; c < COLS; c++) begin : g_fc
      assign h_flat[r*COLS+c] = h_o[r][c];
    end
  end

  sw_max_tree #(.N(ROWS*COLS)) u_max (
    .val_i (h_flat),
    .max_o (max_o)
  );

endmodule
