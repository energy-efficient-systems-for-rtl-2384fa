// Dot-product ensemble (DPE): an (N, M) matrix-vector multiplier y = W^T x made
// of M dot_product units sharing the input vector x; column m of W is the
// weight vector of output m. This is the main block (M-block) of RD-SEC and the
// C-layer datapath of one stage of an MVM-based CNN. Combinational.
// Follows the described dot-product ensemble; sizes default to the first C-layer.
module mvm_dpe #(
  parameter int unsigned N    = 25,
  parameter int unsigned M    = 32,
  parameter int unsigned BIN  = 7,
  parameter int unsigned BW   = 8,
  parameter int unsigned BOUT = BIN + BW + $clog2(N)
) (
  input  logic signed [BIN-1:0]  x [N],
  input  logic signed [BW-1:0]   w [M][N],
  output logic signed [BOUT-1:0] y [M]
);
  for (genvar m = 0; m < M; m++) begin : g_dp
    dot_product #(.N(N), .BIN(BIN), .BW(BW), .BOUT(BOUT)) u_dp (.x, .w(w[m]), .y(y[m]));
  end
endmodule
