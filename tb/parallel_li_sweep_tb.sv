// Computation time against data-set size, on parallel_li at its default
// configuration (K = 256 lanes, 55 rows).
//
// For N_D = 1000, 2000, .., 14000 random samples it loads the set, runs five
// queries, checks each result against an integer model of the interpolation
// formula and checks that a query takes ceil(N_D / 256) + 2 clocks. It prints
// the time per query at the 15 ns clock of the reference implementation; the
// time grows by one clock per 256 samples, from 90 ns at N_D = 1000 to
// 855 ns at N_D = 14000.
module parallel_li_sweep_tb;
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
    s.f = fx_t'(int'($urandom_range(0, 4096)) - 2048);
    return s;
  endfunction

  task automatic load_set(input int nd);
    int rows = (nd + K - 1) / K;
    for (int i = 0; i < rows*K; i++) begin
      slots[i] = (i < nd) ? rand_sample() : slots[0];
      ld_en = 1; ld_bank = BW'(i % K); ld_addr = AW'(i / K); ld_data = slots[i];
      @(negedge clk);
    end
    ld_en = 0;
  endtask

  function automatic int ref_f(input fx_t [N_W-1:0] qq, input int nd);
    int mu = 1 << 30, ml = -(1 << 30);
    for (int i = 0; i < nd; i++) begin
      int d = 0;
      for (int j = 0; j < N_W; j++) begin
        int a = int'(qq[j]) - int'(slots[i].w[j]);
        if (a < 0) a = -a;
        if (a > d) d = a;
      end
      if (int'(slots[i].f) + d < mu) mu = int'(slots[i].f) + d;
      if (int'(slots[i].f) - d > ml) ml = int'(slots[i].f) - d;
    end
    return (mu + ml) >>> 1;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int nd = 1000; nd <= 14000; nd += 1000) begin
      automatic int rows = (nd + K - 1) / K;
      automatic int cyc = 0;
      load_set(nd);
      repeat (5) begin
        automatic int exp_f;
        for (int j = 0; j < N_W; j++) q[j] = fx_t'($urandom_range(0, 4096));
        exp_f = ref_f(q, nd);
        n_iter = NW'(rows); start = 1;
        @(negedge clk);
        start = 0;
        cyc = 0;
        while (!f_valid && cyc < 1000) begin
          @(negedge clk);
          cyc++;
        end
        ck(cyc == rows + 2, $sformatf("N_D=%0d latency %0d exp %0d", nd, cyc, rows + 2));
        ck(int'(f_out) == exp_f, $sformatf("N_D=%0d f_out %0d exp %0d", nd, f_out, exp_f));
        @(negedge clk);
      end
      $display("N_D=%5d  n=%2d rows  %2d clocks  %4d ns at 15 ns", nd, rows, cyc, cyc * 15);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
