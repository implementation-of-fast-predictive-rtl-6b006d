// Accuracy of the fixed-point interpolator against real-valued Lipschitz
// interpolation, on parallel_li at its default configuration.
//
// A data set of 14000 samples of a smooth three-input function (standing in
// for a learned control law, divided by a Lipschitz constant of 4.67) is
// generated in double precision, rounded to Q3.12 and loaded. 2500 random
// queries are then evaluated by the hardware and by a double-precision model
// working on the unrounded data. Each hardware result must also equal the
// integer model of the same fixed-point arithmetic exactly, and its error
// against the real-valued result must stay n_within the rounding bound
// 4 * 2^-13 (input rounding of 2^-13 on f~, up to 2^-12 on the distance,
// plus the truncating halving). The largest and mean errors are printed, as
// is the number of queries within 4e-4.
module parallel_li_accuracy_tb;
  import li_pkg::*;

  localparam int K     = 256;
  localparam int DEPTH = 55;
  localparam int ND    = 14000;
  localparam int NQ    = 2500;
  localparam int BW = $clog2(K);
  localparam int AW = $clog2(DEPTH);
  localparam int NW = $clog2(DEPTH + 1);
  localparam real LIP   = 4.67;
  localparam real SCALE = 4096.0;

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
  real     wr [ND][N_W];   // unrounded inputs
  real     fr [ND];        // unrounded outputs, already divided by LIP
  int checks = 0, failures = 0;

  task automatic ck(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic real urand01();
    return real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  function automatic fx_t to_fx(input real v);
    return fx_t'($rtoi(v * SCALE + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // Stand-in control law on [0,1]^3: a saturated linear feedback.
  function automatic real law(input real x0, input real x1, input real x2);
    real v = -2.0 * (x0 - 0.5) - 0.8 * (x1 - 0.5) + 0.6 * (x2 - 0.5);
    if (v > 1.0) v = 1.0;
    if (v < -1.0) v = -1.0;
    return v;
  endfunction

  initial begin
    automatic real max_err = 0.0, sum_err = 0.0;
    automatic int  n_within = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    for (int i = 0; i < K*DEPTH; i++) begin
      if (i < ND) begin
        for (int j = 0; j < N_W; j++) begin
          wr[i][j] = urand01();
          slots[i].w[j] = to_fx(wr[i][j]);
        end
        fr[i] = law(wr[i][0], wr[i][1], wr[i][2]) / LIP;
        slots[i].f = to_fx(fr[i]);
      end else begin
        slots[i] = slots[0];
      end
      ld_en = 1; ld_bank = BW'(i % K); ld_addr = AW'(i / K); ld_data = slots[i];
      @(negedge clk);
    end
    ld_en = 0;

    for (int k = 0; k < NQ; k++) begin
      real qr [N_W];
      automatic real mu = 1.0e9, ml = -1.0e9, ideal, err;
      automatic int  imu = 1 << 30, iml = -(1 << 30), exp_f, cyc = 0;
      for (int j = 0; j < N_W; j++) begin
        qr[j] = urand01();
        q[j]  = to_fx(qr[j]);
      end
      for (int i = 0; i < ND; i++) begin
        automatic real d = 0.0;
        automatic int  id = 0;
        for (int j = 0; j < N_W; j++) begin
          automatic real a = qr[j] - wr[i][j];
          automatic int  ia = int'(q[j]) - int'(slots[i].w[j]);
          if (a < 0.0) a = -a;
          if (a > d) d = a;
          if (ia < 0) ia = -ia;
          if (ia > id) id = ia;
        end
        if (fr[i] + d < mu) mu = fr[i] + d;
        if (fr[i] - d > ml) ml = fr[i] - d;
        if (int'(slots[i].f) + id < imu) imu = int'(slots[i].f) + id;
        if (int'(slots[i].f) - id > iml) iml = int'(slots[i].f) - id;
      end
      ideal = 0.5 * (mu + ml);
      exp_f = (imu + iml) >>> 1;

      n_iter = NW'(DEPTH); start = 1;
      @(negedge clk);
      start = 0;
      while (!f_valid && cyc < 1000) begin
        @(negedge clk);
        cyc++;
      end
      ck(cyc == DEPTH + 2, $sformatf("latency %0d", cyc));
      ck(int'(f_out) == exp_f, $sformatf("query %0d: f_out %0d exp %0d", k, f_out, exp_f));
      err = real'(f_out) / SCALE - ideal;
      if (err < 0.0) err = -err;
      ck(err <= 4.0 / 8192.0, $sformatf("query %0d: error %g above bound", k, err));
      if (err > max_err) max_err = err;
      if (err <= 4.0e-4) n_within++;
      sum_err += err;
      @(negedge clk);
    end
    $display("%0d queries on %0d samples: max |error| %g, mean %g (in f/L units), %0d within 4e-4; times L: max %g",
             NQ, ND, max_err, sum_err / NQ, n_within, max_err * LIP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
