// Comparison block of the comparator trees.
//
// Merges two enclosures: the output ceiling is the smaller of the two
// ceilings and the output floor the larger of the two floors (signed
// compares). Purely combinational. One block serves both the ceiling and the
// floor pair, which is this design's reading of a single comparator node.
module li_cmp
  import li_pkg::*;
(
  input  encl_t a,
  input  encl_t b,
  output encl_t y
);

  always_comb begin
    y.u = (a.u < b.u) ? a.u : b.u;
    y.l = (a.l > b.l) ? a.l : b.l;
  end

endmodule
