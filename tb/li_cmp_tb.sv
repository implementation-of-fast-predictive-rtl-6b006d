// Self-checking test of li_cmp: random signed enclosure pairs, including
// equal and sign-crossing values; the ceiling must be the minimum and the
// floor the maximum of the two inputs.
module li_cmp_tb;
  import li_pkg::*;

  encl_t a, b, y;
  int checks = 0, failures = 0;

  li_cmp dut (.a, .b, .y);

  task automatic check();
    int eu, el;
    #1;
    eu = (int'(a.u) < int'(b.u)) ? int'(a.u) : int'(b.u);
    el = (int'(a.l) > int'(b.l)) ? int'(a.l) : int'(b.l);
    checks++;
    if (int'(y.u) != eu || int'(y.l) != el) begin
      failures++;
      $display("FAIL a=%p b=%p y=%p", a, b, y);
    end
  endtask

  initial begin
    a = '{u: 16'sd5, l: -16'sd5}; b = '{u: -16'sd5, l: 16'sd5}; check();
    a = '{u: FX_MAX, l: FX_MIN}; b = '{u: FX_MIN, l: FX_MAX}; check();
    a = '{u: 16'sd7, l: 16'sd7}; b = a; check();
    repeat (5000) begin
      a = encl_t'({$urandom(), $urandom()});
      b = encl_t'({$urandom(), $urandom()});
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
