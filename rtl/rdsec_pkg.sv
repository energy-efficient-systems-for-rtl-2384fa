// Shared types of the rank-decomposed statistical error compensation (RD-SEC)
// matrix-vector multiplier. An estimator coefficient is a signed power of two
// (or zero), so multiplying by it is a shift: value = (neg ? -1 : 1) * 2^exp,
// exp in [-8, 7]. This encoding is this design's choice.
package rdsec_pkg;
  typedef struct packed {
    logic              zero;   // coefficient rounds to 0
    logic              neg;    // negative coefficient
    logic signed [3:0] exp;    // power of two, -8 .. 7
  } pow2_coef_t;

  typedef enum logic {POOL_MAX = 1'b0, POOL_AVG = 1'b1} pool_mode_e;
endpackage
