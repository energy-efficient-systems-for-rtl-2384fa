// C-MSB block of PredictiveNet: the low-precision dot product that predicts the
// sign of a convolution output. It keeps only the MSB parts of weights, inputs
// and bias (top BW_MSB, BX_MSB and BD_MSB bits, two's complement, obtained by an
// arithmetic right shift) and computes
//   y_msb = sum_i w_msb[i] * x_msb[i] + delta_msb * 2^((BW_MSB-1)+(BX_MSB-1)-(BD_MSB-1))
// so y_msb is in units of 2^-((BW_MSB-1)+(BX_MSB-1)) when w, x and delta are read
// as fractions in [-1, 1). Purely combinational.
// Follows the described MSB-only computation; the bit widths of the MSB parts
// (4 for activations and bias, 5 for weights) follow the stated configuration
// where given and are this design's choice otherwise.
module pn_cmsb #(
  parameter int unsigned N      = 25,   // kernel length (5x5, one input map)
  parameter int unsigned BX     = 7,
  parameter int unsigned BW     = 8,
  parameter int unsigned BD     = 7,
  parameter int unsigned BX_MSB = 4,
  parameter int unsigned BW_MSB = 5,
  parameter int unsigned BD_MSB = BX_MSB,
  parameter int unsigned YM_W   = BX_MSB + BW_MSB + $clog2(N) + 2
) (
  input  logic signed [BX-1:0]   x [N],
  input  logic signed [BW-1:0]   w [N],
  input  logic signed [BD-1:0]   delta,
  output logic signed [YM_W-1:0] y_msb
);
  localparam int unsigned DSH = (BW_MSB-1) + (BX_MSB-1) - (BD_MSB-1);
  always_comb begin
    logic signed [BX_MSB-1:0] xm;
    logic signed [BW_MSB-1:0] wm;
    logic signed [BD_MSB-1:0] dm;
    dm    = BD_MSB'(delta >>> (BD - BD_MSB));
    y_msb = YM_W'(dm) <<< DSH;
    for (int i = 0; i < N; i++) begin
      xm = BX_MSB'(x[i] >>> (BX - BX_MSB));
      wm = BW_MSB'(w[i] >>> (BW - BW_MSB));
      y_msb += YM_W'(wm) * YM_W'(xm);
    end
  end
endmodule
