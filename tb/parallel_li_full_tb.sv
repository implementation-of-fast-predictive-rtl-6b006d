// Full-size test of parallel_li with its default configuration: K = 256
// lanes of 55 rows, i.e. room for 14080 samples.
//
// For data sets of N_D = 14000 (the robot controller's set), 7000, 2560 and
// 256 random samples it loads the BRAMs (sample i in bank i % 256, row
// i / 256, last row padded with copies of sample 0), runs queries with
// n = ceil(N_D / 256) rows and checks every result bit-exactly against an
// integer model of the interpolation formula, and the latency of n + 2
// clocks. With the 15 ns clock of the reference implementation this is
// printed in nanoseconds (n = 55 -> 57 clocks = 855 ns, against n * 15 ns =
// 825 ns for the bare row scan). The queries include points on top of stored
// samples, where the enclosure collapses to the stored value.
module parallel_li_full_tb;
  import li_pkg::*;

  localparam int K     = 256;
  localparam int DEPTH = 55;
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

  parallel_li dut (
    .clk, .rst_n, .ld_en, .ld_bank, .ld_addr, .ld_data, .ld_ready,
    .n_iter, .start, .q, .busy, .f_valid, .f_out
  );

  always #5 clk = ~clk;

  sample_t slots [K*DEPTH];
  int checks = 0, failures = 0;
  int n_cross = 0, n_exact = 0;

  task automatic ck(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Smooth-ish target with noise: f~ = (w0 - w1)/2 + w2/4 + noise, all Q3.12.
  function automatic sample_t rand_sample();
    sample_t s;
    int fv;
    for (int j = 0; j < N_W; j++) s.w[j] = fx_t'($urandom_range(0, 4096));
    fv = (int'(s.w[0]) - int'(s.w[1])) / 2 + int'(s.w[2]) / 4
         + int'($urandom_range(0, 64)) - 32;
    s.f = fx_t'(fv);
    return s;
  endfunction

  task automatic load_set(input int nd);
    int rows = (nd + K - 1) / K;
    for (int i = 0; i < rows*K; i++) begin
      if (i < nd) slots[i] = rand_sample();
      else slots[i] = slots[0];
      ld_en = 1; ld_bank = BW'(i % K); ld_addr = AW'(i / K); ld_data = slots[i];
      @(negedge clk);
    end
    ld_en = 0;
  endtask

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

  task automatic query(input int nd, input bit on_sample, output int cyc);
    int rows = (nd + K - 1) / K, exp_f, ru, rl;
    if (on_sample) begin
      q = slots[$urandom_range(0, nd - 1)].w;
      n_exact++;
    end else begin
      for (int j = 0; j < N_W; j++) q[j] = fx_t'($urandom_range(0, 4096));
    end
    exp_f = ref_f(q, nd, ru, rl);
    n_iter = NW'(rows); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!f_valid && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    ck(cyc == rows + 2, $sformatf("latency %0d exp %0d", cyc, rows + 2));
    ck(int'(f_out) == exp_f, $sformatf("N_D=%0d f_out %0d exp %0d", nd, f_out, exp_f));
    if (ru != rl) n_cross++;
    @(negedge clk);
  endtask

  int sizes [4] = '{14000, 7000, 2560, 256};
  int nq    [4] = '{60, 15, 15, 15};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (sizes[s]) begin
      automatic int cyc = 0;
      load_set(sizes[s]);
      for (int i = 0; i < nq[s]; i++) query(sizes[s], (i % 4) == 3, cyc);
      $display("N_D=%0d: n=%0d rows, %0d clocks per query = %0d ns at 15 ns",
               sizes[s], (sizes[s] + K - 1) / K, cyc, cyc * 15);
    end
    ck(n_cross > 0, "ceiling and floor from different rows seen");
    ck(n_exact > 0, "queries on stored samples seen");
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
