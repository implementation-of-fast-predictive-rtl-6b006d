// Self-checking test of li_fsm at its default depth: for row counts 1 .. 55,
// 0 and above 55 it checks, cycle by cycle, the BRAM read sequence, the
// partial-memory writes one cycle behind it, the output-load pulse after
// n + 2 clocks, busy, the latched row count, and that start is ignored while
// busy.
module li_fsm_tb;

  localparam int DEPTH = 55;
  localparam int AW = $clog2(DEPTH);
  localparam int NW = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0, start = 0;
  logic [NW-1:0] n_iter = '0;
  logic rd_en, pm_we, out_load, busy;
  logic [AW-1:0] rd_addr, pm_addr;
  logic [NW-1:0] n_rows;
  int checks = 0, failures = 0;

  li_fsm dut (.clk, .rst_n, .start, .n_iter, .rd_en, .rd_addr, .pm_we,
              .pm_addr, .n_rows, .out_load, .busy);

  always #5 clk = ~clk;

  task automatic ck(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Runs one query with n_iter = req; expects n effective rows.
  task automatic run(input int req, input int n);
    int wr_seen = 0;
    n_iter = NW'(req); start = 1;
    @(negedge clk);
    start = 0;
    for (int c = 1; c <= n + 2; c++) begin
      ck(busy, "busy");
      // a start while busy must be ignored
      if (c == 2) start = 1;
      ck(rd_en == (c <= n), "rd_en");
      if (c <= n) ck(rd_addr == AW'(c - 1), "rd_addr");
      ck(pm_we == (c >= 2 && c <= n + 1), "pm_we");
      if (pm_we) begin
        ck(pm_addr == AW'(c - 2), "pm_addr");
        wr_seen++;
      end
      ck(out_load == (c == n + 2), "out_load");
      ck(n_rows == NW'(n), "n_rows");
      @(negedge clk);
      start = 0;
    end
    ck(!busy && !out_load && !rd_en, "back to idle");
    ck(wr_seen == n, "one write per row");
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    ck(!busy && !rd_en && !out_load, "idle after reset");
    for (int n = 1; n <= DEPTH; n++) run(n, n);
    run(0, 1);
    run(DEPTH + 5 > (1 << NW) - 1 ? (1 << NW) - 1 : DEPTH + 5, DEPTH);
    repeat (50) begin
      automatic int n = $urandom_range(1, DEPTH);
      run(n, n);
    end
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
