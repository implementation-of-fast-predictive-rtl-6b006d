// Tree of comparators: reduces N enclosures to the minimum ceiling and the
// maximum floor.
//
// A balanced binary tree of li_cmp blocks. N is rounded up to the next power
// of two P and the missing leaves are tied to the neutral enclosure
// (ceiling = largest value, floor = smallest value), which synthesis prunes,
// so the tree uses N-1 comparison blocks and has ceil(log2 N) levels. The
// nodes are numbered heap-style: node i has children 2i+1 and 2i+2, leaves
// sit at P-1 .. 2P-2 and the root is node 0. Purely combinational.
// The interpolator uses it twice: over the K ECAU outputs of one row, and
// over the n stored row results.
module li_cmp_tree
  import li_pkg::*;
#(
  parameter int N    = 256,
  localparam int LVL = (N > 1) ? $clog2(N) : 0,
  localparam int P   = 1 << LVL
) (
  input  encl_t in  [N],
  output encl_t out
);

  encl_t node [2*P-1];

  for (genvar i = 0; i < P; i++) begin : g_leaf
    if (i < N) begin : g_used
      assign node[P-1+i] = in[i];
    end else begin : g_pad
      assign node[P-1+i] = ENCL_NEUTRAL;
    end
  end

  for (genvar i = 0; i < P-1; i++) begin : g_node
    li_cmp u_cmp (.a(node[2*i+1]), .b(node[2*i+2]), .y(node[i]));
  end

  assign out = node[0];

endmodule
