// Self-checking test of li_partial_mem: random writes to random rows with
// random write-enable, every row of the parallel read-out compared with a
// model after each clock.
module li_partial_mem_tb;
  import li_pkg::*;

  localparam int DEPTH = 55;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0;
  encl_t wdata = '0;
  encl_t rows [DEPTH];
  encl_t model [DEPTH];
  int checks = 0, failures = 0;

  li_partial_mem dut (.clk, .we, .waddr, .wdata, .rows);

  always #5 clk = ~clk;

  initial begin
    @(negedge clk);
    for (int r = 0; r < DEPTH; r++) begin
      we = 1; waddr = AW'(r); wdata = encl_t'($urandom()); model[r] = wdata;
      @(negedge clk);
    end
    repeat (2000) begin
      automatic int r = $urandom_range(0, DEPTH - 1);
      we = $urandom_range(0, 1) == 1; waddr = AW'(r); wdata = encl_t'($urandom());
      if (we) model[r] = wdata;
      @(negedge clk);
      for (int i = 0; i < DEPTH; i++) begin
        checks++;
        if (rows[i] != model[i]) begin
          failures++;
          $display("FAIL row %0d got %h exp %h", i, rows[i], model[i]);
        end
      end
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
