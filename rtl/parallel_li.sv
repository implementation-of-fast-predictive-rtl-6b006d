// Parallel Lipschitz interpolator: evaluates a learned function (here a
// predictive control law) as
//     f~(q) = ( min_i (f~_i + ||q - w_i||inf) + max_i (f~_i - ||q - w_i||inf) ) / 2
// over a stored data set of N_D samples, with the stored outputs already
// divided by the Lipschitz constant so that no multiplier is needed.
//
// Structure: K training-data BRAMs (li_bram) each feed one ECAU (li_ecau);
// all K enclosures of a row are reduced by a comparator tree (li_cmp_tree) to
// one {min ceiling, max floor} pair, which is written to the partial-result
// memory (li_partial_mem), one entry per row. After the n = ceil(N_D/K) rows
// have been processed, a second comparator tree reduces the stored pairs and
// the output ALU (li_out_alu) averages them. The controller (li_fsm) steps
// the BRAM address once per clock. This partitioning, K = 256, n = 55 and
// the 16-bit Q3.12 format are the paper's; the ports below are this design's.
//
// Interface:
//  * Loading (only while ld_ready): ld_en writes ld_data = {f~, w[2..0]} to
//    row ld_addr of BRAM ld_bank. Sample i of a data set goes to bank i % K,
//    row i / K. Unused slots of the last row must hold copies of real samples.
//  * Query: pulse start with q and n_iter = number of rows to scan. busy
//    rises on the next clock; n_iter + 2 clocks after the start edge f_valid
//    rises and f_out holds f~(q). q is latched at start.
// Timing: the critical path is BRAM output -> ECAU -> log2(K) comparator
// levels -> partial memory, one row per clock.
module parallel_li
  import li_pkg::*;
#(
  parameter int K     = 256,
  parameter int DEPTH = 55,
  localparam int BW   = (K > 1) ? $clog2(K) : 1,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int NW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // training-data load port
  input  logic          ld_en,
  input  logic [BW-1:0] ld_bank,
  input  logic [AW-1:0] ld_addr,
  input  sample_t       ld_data,
  output logic          ld_ready,
  // query
  input  logic [NW-1:0] n_iter,
  input  logic          start,
  input  fx_t [N_W-1:0] q,
  output logic          busy,
  output logic          f_valid,
  output fx_t           f_out
);

  logic          rd_en, pm_we, out_load;
  logic [AW-1:0] rd_addr, pm_addr;
  logic [NW-1:0] n_rows;

  li_fsm #(.DEPTH(DEPTH)) u_fsm (
    .clk, .rst_n, .start(start && !busy), .n_iter,
    .rd_en, .rd_addr, .pm_we, .pm_addr, .n_rows, .out_load, .busy
  );

  assign ld_ready = !busy;

  // Query register, held for the whole scan.
  fx_t [N_W-1:0] q_r;
  always_ff @(posedge clk) begin
    if (!rst_n)              q_r <= '0;
    else if (start && !busy) q_r <= q;
  end

  // Training BRAMs and ECAUs, one pair per lane.
  sample_t smp  [K];
  encl_t   encl [K];

  for (genvar k = 0; k < K; k++) begin : g_lane
    logic          wr_k;
    assign wr_k = ld_en && !busy && (ld_bank == BW'(k));

    li_bram #(.DEPTH(DEPTH)) u_bram (
      .clk,
      .en   (rd_en || wr_k),
      .we   (wr_k),
      .addr (rd_en ? rd_addr : ld_addr),
      .wdata(ld_data),
      .rdata(smp[k])
    );

    li_ecau u_ecau (.q(q_r), .s(smp[k]), .e(encl[k]));
  end

  // First tree: one reduced enclosure per row.
  encl_t row_encl;
  li_cmp_tree #(.N(K)) u_tree_row (.in(encl), .out(row_encl));

  // Partial results of the n rows.
  encl_t rows [DEPTH];
  li_partial_mem #(.DEPTH(DEPTH)) u_pmem (
    .clk, .we(pm_we), .waddr(pm_addr), .wdata(row_encl), .rows
  );

  // Rows beyond this query's count take no part in the final reduction.
  encl_t rows_m [DEPTH];
  always_comb begin
    for (int r = 0; r < DEPTH; r++)
      rows_m[r] = (r < int'(n_rows)) ? rows[r] : ENCL_NEUTRAL;
  end

  encl_t all_encl;
  li_cmp_tree #(.N(DEPTH)) u_tree_all (.in(rows_m), .out(all_encl));

  fx_t f_next;
  li_out_alu u_alu (.e(all_encl), .f(f_next));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f_out   <= '0;
      f_valid <= 1'b0;
    end else if (out_load) begin
      f_out   <= f_next;
      f_valid <= 1'b1;
    end else if (start && !busy) begin
      f_valid <= 1'b0;
    end
  end

  // Handshake rules: the query stays put for the whole scan, and a result
  // only appears after the controller's capture cycle.
  a_query_stable: assert property (@(posedge clk) disable iff (!rst_n)
    busy |=> (busy ? $stable(q_r) : 1'b1));
  a_valid_after_load: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(f_valid) |-> $past(out_load));

endmodule
