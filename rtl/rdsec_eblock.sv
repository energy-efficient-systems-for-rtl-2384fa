// Estimator block (E-block) of RD-SEC: a low-cost estimate of one non-basis
// output, y_e = sum_r c[r] * y_o[r], where y_o are the R basis outputs and every
// coefficient c[r] is rounded to a signed power of two, so each product is a
// multiplexer-based shifter and the block is a shifter per basis output plus an
// R-input adder. Right shifts truncate towards minus infinity. Combinational.
// Power-of-two rounding of the coefficients follows the description; the
// coefficient encoding is this design's choice.
module rdsec_eblock
  import rdsec_pkg::*;
#(
  parameter int unsigned R    = 25,
  parameter int unsigned BOUT = 20,
  parameter int unsigned BE   = BOUT + 8 + $clog2(R)
) (
  input  logic signed [BOUT-1:0] y_o [R],
  input  pow2_coef_t             c   [R],
  output logic signed [BE-1:0]   y_e
);
  always_comb begin
    y_e = '0;
    for (int r = 0; r < R; r++) begin
      logic signed [BE-1:0] t;
      t = BE'(y_o[r]);
      if (c[r].exp >= 0) t = t <<< c[r].exp;
      else               t = t >>> (-c[r].exp);
      if (!c[r].zero) y_e += c[r].neg ? -t : t;
    end
  end
endmodule
