// Self-checking test of li_cmp_tree at its default width (256 inputs) and at
// a width that is not a power of two (13), so the neutral padding is
// exercised, also with all ceilings positive and all floors negative so
// that a wrong padding value would win. Random enclosures; the winners are also planted at the first
// and last inputs to check the tree edges.
module li_cmp_tree_tb;
  import li_pkg::*;

  localparam int NS = 13;
  localparam int NB = 256;

  encl_t in_s [NS];
  encl_t in_b [NB];
  encl_t out_s, out_b;
  int checks = 0, failures = 0;

  li_cmp_tree #(.N(NS)) dut_s (.in(in_s), .out(out_s));
  li_cmp_tree           dut_b (.in(in_b), .out(out_b));

  task automatic check(input int mode);
    int mu_s = 32767, ml_s = -32768, mu_b = 32767, ml_b = -32768;
    for (int i = 0; i < NS; i++) begin
      in_s[i] = encl_t'({$urandom(), $urandom()});
    end
    for (int i = 0; i < NB; i++) begin
      in_b[i] = encl_t'({$urandom(), $urandom()});
    end
    if (mode == 3) begin
      // all ceilings above zero and all floors below: padding must not win
      foreach (in_s[i]) begin
        in_s[i].u = fx_t'($urandom_range(1, 32767));
        in_s[i].l = fx_t'(-int'($urandom_range(1, 32768)));
      end
      foreach (in_b[i]) begin
        in_b[i].u = fx_t'($urandom_range(1, 32767));
        in_b[i].l = fx_t'(-int'($urandom_range(1, 32768)));
      end
    end
    if (mode == 1) begin
      in_s[0].u = FX_MIN; in_s[NS-1].l = FX_MAX;
      in_b[0].u = FX_MIN; in_b[NB-1].l = FX_MAX;
    end else if (mode == 2) begin
      in_s[NS-1].u = FX_MIN; in_s[0].l = FX_MAX;
      in_b[NB-1].u = FX_MIN; in_b[0].l = FX_MAX;
    end
    foreach (in_s[i]) begin
      if (int'(in_s[i].u) < mu_s) mu_s = int'(in_s[i].u);
      if (int'(in_s[i].l) > ml_s) ml_s = int'(in_s[i].l);
    end
    foreach (in_b[i]) begin
      if (int'(in_b[i].u) < mu_b) mu_b = int'(in_b[i].u);
      if (int'(in_b[i].l) > ml_b) ml_b = int'(in_b[i].l);
    end
    #1;
    checks += 2;
    if (int'(out_s.u) != mu_s || int'(out_s.l) != ml_s) begin
      failures++;
      $display("FAIL N=%0d got %p exp u=%0d l=%0d", NS, out_s, mu_s, ml_s);
    end
    if (int'(out_b.u) != mu_b || int'(out_b.l) != ml_b) begin
      failures++;
      $display("FAIL N=%0d got %p exp u=%0d l=%0d", NB, out_b, mu_b, ml_b);
    end
  endtask

  initial begin
    check(1);
    check(2);
    repeat (2000) check(0);
    repeat (200) check(3);
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
