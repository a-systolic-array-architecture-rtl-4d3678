// Max finder network: the largest of N signed scores.
//
// A balanced binary tree of sw_max_finder units (comparator plus
// multiplexer). The inputs are padded with SCORE_MIN up to the next power
// of two P and stored as the leaves node[P..2P-1] of a heap; internal node k
// is the max of nodes 2k and 2k+1 and node 1 is the result. Depth is
// clog2(N) max finders; there are N-1 useful units. Purely combinational:
// in the accelerator it watches the cell registers, so max_o is the largest
// H value one combinational delay after the array settles.
//
// The max finder unit and the idea of a network of them fed by the cells
// follow the architecture, which shows it for a 2x2 array and says it
// extends to larger ones; the balanced-tree arrangement for N values is this
// design's choice.
module sw_max_tree
  import sw_pkg::*;
#(
  parameter int N = 16
) (
  input  score_t val_i [N],
  output score_t max_o
);

  localparam int P = (N <= 1) ? 1 : (1 << $clog2(N));

  score_t node [1:2*P-1];

  for (genvar i = 0; i < P; i++) begin : g_leaf
    if (i < N) begin : g_in
      assign node[P+i] = val_i[i];
    end else begin : g_pad
      assign node[P+i] = SCORE_MIN;
    end
  end

  for (genvar k = 1; k < P; k++) begin : g_node
    sw_max_finder u_max (
      .in1_i  (node[2*k]),
      .in2_i  (node[2*k+1]),
      .flag_o (),
      .max_o  (node[k])
    );
  end

  assign max_o = node[1];

endmodule
