// Self-checking test of li_bram at its default depth: fills every row with
// random samples, reads them back in random order checking the one-cycle
// read latency, checks that rdata holds while the port is disabled and that
// a write does not disturb rdata.
module li_bram_tb;
  import li_pkg::*;

  localparam int DEPTH = 55;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, en = 0, we = 0;
  logic [AW-1:0] addr = '0;
  sample_t wdata = '0, rdata;
  sample_t model [DEPTH];
  int checks = 0, failures = 0;

  li_bram dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic expect_eq(input sample_t exp_v, input string what);
    checks++;
    if (rdata !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, rdata, exp_v);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int r = 0; r < DEPTH; r++) begin
      model[r] = sample_t'({$urandom(), $urandom()});
      en = 1; we = 1; addr = AW'(r); wdata = model[r];
      @(negedge clk);
    end
    we = 0;
    repeat (400) begin
      automatic int r = $urandom_range(0, DEPTH - 1);
      en = 1; addr = AW'(r);
      @(negedge clk);
      expect_eq(model[r], "read");
      // hold while disabled
      en = 0; addr = AW'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      expect_eq(model[r], "hold");
      // a write leaves the read register alone
      en = 1; we = 1; addr = AW'(r); wdata = sample_t'({$urandom(), $urandom()});
      @(negedge clk);
      expect_eq(model[r], "no write-through");
      model[r] = wdata;
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
