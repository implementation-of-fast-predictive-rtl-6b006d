// Output ALU: averages the enclosure bounds, f~ = (u + l) >> 1.
//
// The sum is formed one bit wider than the data so it cannot overflow, then
// shifted right arithmetically by one, i.e. rounded toward minus infinity.
// The result is f~ = f/L; scaling by the Lipschitz constant is left to the
// user of the result. Purely combinational.
module li_out_alu
  import li_pkg::*;
(
  input  encl_t e,
  output fx_t   f
);

  logic signed [DATA_W:0] sum;

  always_comb begin
    sum = {e.u[DATA_W-1], e.u} + {e.l[DATA_W-1], e.l};
    f   = fx_t'(sum[DATA_W:1]);
  end

endmodule
