// Enclosure calculation arithmetic unit (ECAU).
//
// For one stored sample (f~, w) and the query q it forms the infinity-norm
// distance d = max_j |q_j - w_j| and returns the ceiling u = f~ + d and the
// floor l = f~ - d. Because the stored outputs are already divided by the
// Lipschitz constant, no multiplier is needed: only subtractors, absolute
// values, a maximum and an adder/subtractor. Purely combinational.
//
// The differences are formed one bit wider than the data so that their
// absolute value is exact; the distance and the enclosure are returned at the
// data width. With inputs scaled to [0,1], as the number format assumes, the
// results cannot overflow; outside that range they wrap.
module li_ecau
  import li_pkg::*;
(
  input  fx_t [N_W-1:0] q,
  input  sample_t       s,
  output encl_t         e
);

  fx_t d;

  always_comb begin
    logic signed [DATA_W:0] diff;
    logic        [DATA_W:0] mag;
    logic        [DATA_W:0] norm_w;
    norm_w = '0;
    for (int j = 0; j < N_W; j++) begin
      diff = {q[j][DATA_W-1], q[j]} - {s.w[j][DATA_W-1], s.w[j]};
      mag  = diff[DATA_W] ? (DATA_W+1)'(-diff) : (DATA_W+1)'(diff);
      if (mag > norm_w) norm_w = mag;
    end
    d   = fx_t'(norm_w[DATA_W-1:0]);
  end

  assign e.u = s.f + d;
  assign e.l = s.f - d;

endmodule
