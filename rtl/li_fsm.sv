// Controller of the interpolator: a synchronous Moore state machine.
//
// On `start` (accepted only in IDLE) it latches the row count n and then, in
// RUN, presents BRAM row addresses 0, 1, .., n-1 on rd_addr with rd_en high,
// one per clock edge. Because the BRAMs answer one cycle later, the row
// results of the first comparator tree are written into the partial-result
// memory one cycle behind the read (pm_we / pm_addr are the read enable and
// address delayed by one clock). DRAIN covers that last write; in FINAL the
// second tree sees all n rows and out_load tells the top to capture the
// output ALU. A query thus takes n + 2 clocks from the start edge to the
// captured result, and one new row of K samples is consumed every clock.
//
// Interface: start is a one-cycle request, busy is high from the cycle after
// start until the result is captured. n_iter = 0 is run as one row, and
// values above DEPTH are clipped to DEPTH. The stepping of the address once
// per clock edge follows the paper; state names, the start/busy handshake and
// the synchronous active-low reset are this design's choices.
module li_fsm #(
  parameter int DEPTH = 55,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int NW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] n_iter,
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  output logic          pm_we,
  output logic [AW-1:0] pm_addr,
  output logic [NW-1:0] n_rows,
  output logic          out_load,
  output logic          busy
);

  typedef enum logic [1:0] {IDLE, RUN, DRAIN, FINAL} state_t;

  state_t        state;
  logic [AW-1:0] last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= IDLE;
      rd_addr <= '0;
      pm_we   <= 1'b0;
      pm_addr <= '0;
      last    <= '0;
      n_rows  <= NW'(1);
    end else begin
      pm_we   <= (state == RUN);
      pm_addr <= rd_addr;
      unique case (state)
        IDLE: if (start) begin
          rd_addr <= '0;
          if (n_iter == '0) begin
            last   <= '0;
            n_rows <= NW'(1);
          end else if (n_iter > NW'(DEPTH)) begin
            last   <= AW'(DEPTH - 1);
            n_rows <= NW'(DEPTH);
          end else begin
            last   <= AW'(n_iter - NW'(1));
            n_rows <= n_iter;
          end
          state <= RUN;
        end
        RUN: begin
          if (rd_addr == last) state <= DRAIN;
          else                 rd_addr <= rd_addr + AW'(1);
        end
        DRAIN:   state <= FINAL;
        FINAL:   state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // Moore outputs: functions of the state only.
  assign rd_en    = (state == RUN);
  assign out_load = (state == FINAL);
  assign busy     = (state != IDLE);

  // The partial-memory write is the delayed read: never two writes per row.
  property p_write_follows_read;
    @(posedge clk) disable iff (!rst_n) pm_we |-> $past(rd_en);
  endproperty
  a_write_follows_read: assert property (p_write_follows_read);

endmodule
