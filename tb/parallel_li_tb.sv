// End-to-end test of parallel_li at reduced size (K = 8 lanes, 6 rows).
//
// Loads random training sets through the load port, runs queries and
// compares f_out bit-exactly with an independent integer model of
//   f~(q) = (min_i (f~_i + ||q-w_i||inf) + max_i (f~_i - ||q-w_i||inf)) >>> 1
// It also checks the latency of n + 2 clocks per query and counts each
// mechanism of the design: single-row and multi-row scans, a full-depth scan,
// a data set padded with duplicates in its last row, the final reduction
// taking ceiling and floor from different rows, row counts clipped (0 and
// above the depth), a load refused while busy and a start ignored while busy.
module parallel_li_tb;
  import li_pkg::*;

  localparam int K     = 8;
  localparam int DEPTH = 6;
  localparam int BW = $clog2(K);
  localparam int AW = $clog2(DEPTH);
  localparam int NW = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  logic ld_en = 0, ld_ready, start = 0, busy, f_valid;
  logic [BW-1:0] ld_bank = '0;
  logic [AW-1:0] ld_addr = '0;
  sample_t ld_data = '0;
  logic [NW-1:0] n_iter = '0;
  fx_t [N_W-1:0] q = '0;
  fx_t f_out;

  parallel_li #(.K(K), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .ld_en, .ld_bank, .ld_addr, .ld_data, .ld_ready,
    .n_iter, .start, .q, .busy, .f_valid, .f_out
  );

  always #5 clk = ~clk;

  sample_t slots [K*DEPTH];   // what the BRAMs hold, slot = row*K + bank
  int checks = 0, failures = 0;
  int n_single = 0, n_multi = 0, n_full = 0, n_padded = 0, n_cross = 0;
  int n_clip0 = 0, n_clip_hi = 0, n_ld_refused = 0, n_start_ignored = 0;

  task automatic ck(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic sample_t rand_sample();
    sample_t s;
    for (int j = 0; j < N_W; j++) s.w[j] = fx_t'($urandom_range(0, 4096));
    s.f = fx_t'(int'($urandom_range(0, 8192)) - 4096);
    return s;
  endfunction

  // Loads a set of nd random samples; the rest of the last row is padded with
  // copies of sample 0, every other slot gets unrelated random contents.
  task automatic load_set(input int nd);
    int rows = (nd + K - 1) / K;
    for (int i = 0; i < K*DEPTH; i++) begin
      if (i < nd) slots[i] = rand_sample();
      else if (i < rows*K) slots[i] = slots[0];
      else slots[i] = rand_sample();
    end
    for (int i = 0; i < K*DEPTH; i++) begin
      ld_en = 1; ld_bank = BW'(i % K); ld_addr = AW'(i / K); ld_data = slots[i];
      @(negedge clk);
    end
    ld_en = 0;
  endtask

  // Reference: nd samples; also reports the rows of the two winners.
  function automatic int ref_f(input fx_t [N_W-1:0] qq, input int nd,
                               output int row_u, output int row_l);
    int mu = 1 << 30, ml = -(1 << 30);
    for (int i = 0; i < nd; i++) begin
      int d = 0, u, l;
      for (int j = 0; j < N_W; j++) begin
        int a = int'(qq[j]) - int'(slots[i].w[j]);
        if (a < 0) a = -a;
        if (a > d) d = a;
      end
      u = int'(slots[i].f) + d;
      l = int'(slots[i].f) - d;
      if (u < mu) begin mu = u; row_u = i / K; end
      if (l > ml) begin ml = l; row_l = i / K; end
    end
    return (mu + ml) >>> 1;
  endfunction

  // One query over nd samples, requesting req rows.
  task automatic query(input int nd, input int req, input bit disturb);
    int rows_eff, cyc = 0, exp_f, ru, rl;
    rows_eff = (req == 0) ? 1 : (req > DEPTH ? DEPTH : req);
    for (int j = 0; j < N_W; j++) q[j] = fx_t'($urandom_range(0, 4096));
    exp_f = ref_f(q, nd, ru, rl);
    n_iter = NW'(req); start = 1;
    @(negedge clk);
    start = 0;
    q = '0;  // q must have been latched
    while (!f_valid && cyc < 100) begin
      if (disturb && cyc == 1) begin
        // try to overwrite a used slot and to restart: both must be ignored
        ck(!ld_ready, "ld_ready low while busy");
        ld_en = 1; ld_bank = '0; ld_addr = '0; ld_data = rand_sample();
        start = 1; n_iter = NW'(1);
        n_ld_refused++; n_start_ignored++;
      end else begin
        ld_en = 0; start = 0;
      end
      @(negedge clk);
      cyc++;
    end
    ld_en = 0; start = 0;
    ck(f_valid, "f_valid");
    ck(cyc == rows_eff + 2, $sformatf("latency %0d exp %0d", cyc, rows_eff + 2));
    ck(int'(f_out) == exp_f, $sformatf("f_out %0d exp %0d", f_out, exp_f));
    if (rows_eff == 1) n_single++; else n_multi++;
    if (rows_eff == DEPTH) n_full++;
    if (nd % K != 0 && rows_eff == (nd + K - 1) / K) n_padded++;
    if (ru != rl) n_cross++;
    if (req == 0) n_clip0++;
    if (req > DEPTH) n_clip_hi++;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    ck(ld_ready && !busy && !f_valid, "idle after reset");

    // full data set, every row count
    load_set(K*DEPTH);
    for (int n = 1; n <= DEPTH; n++) repeat (20) query(n*K, n, 0);
    repeat (5) query(K, 0, 0);
    repeat (5) query(K*DEPTH, DEPTH + 1, 0);
    repeat (10) query(K*DEPTH, DEPTH, 1);
    // padded data sets
    repeat (4) begin
      automatic int nd = $urandom_range(1, K*DEPTH);
      load_set(nd);
      repeat (20) query(nd, (nd + K - 1) / K, 0);
    end

    ck(n_single > 0, "single-row scan seen");
    ck(n_multi > 0, "multi-row scan seen");
    ck(n_full > 0, "full-depth scan seen");
    ck(n_padded > 0, "padded last row seen");
    ck(n_cross > 0, "ceiling and floor from different rows seen");
    ck(n_clip0 > 0 && n_clip_hi > 0, "row count clipping seen");
    ck(n_ld_refused > 0 && n_start_ignored > 0, "busy lock-out seen");
    $display("mechanisms: single=%0d multi=%0d full=%0d padded=%0d cross_row=%0d clip0=%0d cliphi=%0d ld_refused=%0d start_ignored=%0d",
             n_single, n_multi, n_full, n_padded, n_cross, n_clip0, n_clip_hi,
             n_ld_refused, n_start_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
