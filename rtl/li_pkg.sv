// Shared number format and data types of the parallel Lipschitz interpolator.
//
// Every value in the datapath (query coordinates, stored inputs w_i, stored
// outputs f~_i = f_i / L, ceilings, floors and the result) is a 16-bit two's-
// complement fixed-point number with 3 integer and 12 fractional bits (Q3.12),
// the format chosen for the self-balancing robot controller. The function
// learned has N_W = 3 inputs (the robot state) and one output.
package li_pkg;

  localparam int DATA_W = 16;  // 1 sign + 3 integer + 12 fraction bits
  localparam int FRAC_W = 12;
  localparam int N_W    = 3;   // inputs of the learned function

  typedef logic signed [DATA_W-1:0] fx_t;

  localparam fx_t FX_MAX = fx_t'({1'b0, {(DATA_W-1){1'b1}}});
  localparam fx_t FX_MIN = fx_t'({1'b1, {(DATA_W-1){1'b0}}});

  // One training sample as stored in a BRAM word: output first, then inputs.
  typedef struct packed {
    fx_t            f;
    fx_t [N_W-1:0]  w;
  } sample_t;

  // Ceiling u and floor l of an enclosure.
  typedef struct packed {
    fx_t u;
    fx_t l;
  } encl_t;

  // Identity of the min-ceiling / max-floor reduction.
  localparam encl_t ENCL_NEUTRAL = '{u: FX_MAX, l: FX_MIN};

endpackage
