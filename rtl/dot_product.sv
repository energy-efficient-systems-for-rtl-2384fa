// One dot product (DP) of the matrix-vector multiplier: y = sum_i w[i] * x[i]
// over N signed BIN-bit inputs and signed BW-bit weights, full precision
// (BIN + BW + ceil(log2 N) bits). Combinational; a multiplier per element and an
// adder tree, the Baugh-Wooley/ripple-carry structure being left to synthesis.
// Follows the described dot-product unit; signed operands are this design's choice.
module dot_product #(
  parameter int unsigned N    = 25,
  parameter int unsigned BIN  = 7,
  parameter int unsigned BW   = 8,
  parameter int unsigned BOUT = BIN + BW + $clog2(N)
) (
  input  logic signed [BIN-1:0]  x [N],
  input  logic signed [BW-1:0]   w [N],
  output logic signed [BOUT-1:0] y
);
  always_comb begin
    y = '0;
    for (int i = 0; i < N; i++) y += BOUT'(x[i]) * BOUT'(w[i]);
  end
endmodule
