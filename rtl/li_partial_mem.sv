// Partial-result memory: one {minimum ceiling, maximum floor} pair per row.
//
// While the controller walks the n rows of the training BRAMs, the first
// comparator tree produces one reduced enclosure per row; it is written here
// at row index waddr when we is high (one write per clock). All DEPTH rows are
// presented in parallel on `rows` so that the second comparator tree can
// reduce them in one step. It is therefore built as a register array rather
// than a block RAM, which is this design's choice. Rows are not cleared; the
// reader masks rows beyond the current query's row count.
module li_partial_mem
  import li_pkg::*;
#(
  parameter int DEPTH = 55,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  encl_t         wdata,
  output encl_t         rows [DEPTH]
);

  encl_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rows = mem;

endmodule
