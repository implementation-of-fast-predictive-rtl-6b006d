// Self-checking test of li_ecau: random samples and queries in the scaled
// range, plus corner cases (query equal to the sample, largest distances),
// compared against an integer model of u = f + max|q-w|, l = f - max|q-w|.
module li_ecau_tb;
  import li_pkg::*;

  fx_t [N_W-1:0] q;
  sample_t       s;
  encl_t         e;
  int checks = 0, failures = 0;

  li_ecau dut (.q, .s, .e);

  function automatic void ref_model(input fx_t [N_W-1:0] qq, input sample_t ss,
                                    output int u, output int l);
    int d = 0;
    for (int j = 0; j < N_W; j++) begin
      int a = int'(qq[j]) - int'(ss.w[j]);
      if (a < 0) a = -a;
      if (a > d) d = a;
    end
    u = int'(ss.f) + d;
    l = int'(ss.f) - d;
  endfunction

  task automatic check();
    int u, l;
    #1;
    ref_model(q, s, u, l);
    checks++;
    if (int'(e.u) != u || int'(e.l) != l) begin
      failures++;
      $display("FAIL q=%p w=%p f=%0d: got u=%0d l=%0d exp u=%0d l=%0d",
               q, s.w, s.f, e.u, e.l, u, l);
    end
  endtask

  initial begin
    // query on top of the sample: distance zero
    for (int j = 0; j < N_W; j++) begin q[j] = 16'sd1000; s.w[j] = 16'sd1000; end
    s.f = -16'sd300; check();
    // extreme corners of [0,1]
    for (int j = 0; j < N_W; j++) begin q[j] = 16'sd4096; s.w[j] = 16'sd0; end
    s.f = 16'sd4096; check();
    for (int j = 0; j < N_W; j++) begin q[j] = 16'sd0; s.w[j] = 16'sd4096; end
    s.f = -16'sd4096; check();
    // one coordinate dominates, each position in turn
    for (int k = 0; k < N_W; k++) begin
      for (int j = 0; j < N_W; j++) begin q[j] = 16'sd2000; s.w[j] = 16'sd2000 + 16'(j); end
      s.w[k] = 16'sd100; s.f = 16'sd50; check();
    end
    // random, inputs in [0,1], outputs in [-1,1]
    repeat (5000) begin
      for (int j = 0; j < N_W; j++) begin
        q[j]   = fx_t'($urandom_range(0, 4096));
        s.w[j] = fx_t'($urandom_range(0, 4096));
      end
      s.f = fx_t'(int'($urandom_range(0, 8192)) - 4096);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
