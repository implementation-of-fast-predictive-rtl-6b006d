// Self-checking test of li_out_alu: (u + l) >> 1 with an arithmetic shift,
// over random and extreme operands (the sum must not overflow).
module li_out_alu_tb;
  import li_pkg::*;

  encl_t e;
  fx_t   f;
  int checks = 0, failures = 0;

  li_out_alu dut (.e, .f);

  task automatic check();
    int s, exp_f;
    #1;
    s = int'(e.u) + int'(e.l);
    exp_f = s >>> 1;
    checks++;
    if (int'(f) != exp_f) begin
      failures++;
      $display("FAIL u=%0d l=%0d got %0d exp %0d", e.u, e.l, f, exp_f);
    end
  endtask

  initial begin
    e = '{u: FX_MAX, l: FX_MAX}; check();
    e = '{u: FX_MIN, l: FX_MIN}; check();
    e = '{u: -16'sd3, l: 16'sd0}; check();
    e = '{u: 16'sd3, l: 16'sd0}; check();
    repeat (5000) begin
      e = encl_t'({$urandom(), $urandom()});
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
