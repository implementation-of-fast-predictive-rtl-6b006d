// Training-data block RAM: one of the K memories of the interpolator.
//
// Holds DEPTH training samples (f~_i, w_i); the controller reads row `addr`
// of every BRAM in the same cycle, so ECAU k always sees the k-th sample of
// the current row. Single port: a write (en & we) stores wdata, a read
// (en & ~we) returns the addressed word on rdata one clock later (registered
// output, as an FPGA block RAM). rdata holds its value while en is low.
// The depth of 55 rows follows the 14000-sample data set spread over 256
// memories; the single-port, read-registered behaviour is this design's
// choice.
module li_bram
  import li_pkg::*;
#(
  parameter int DEPTH = 55,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  sample_t       wdata,
  output sample_t       rdata
);

  sample_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
