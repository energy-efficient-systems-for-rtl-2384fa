// C-LSB block of PredictiveNet: the correction term that, added to the scaled
// C-MSB result, gives the exact full-precision dot product. With the split
// w = w_msb * 2^WL + w_lsb and x = x_msb * 2^XL + x_lsb (the LSB parts are the
// unsigned low bits) it computes
//   y_lsb = sum_i (w_msb[i] * x_lsb[i] * 2^WL + w_lsb[i] * x[i]) + delta_lsb * 2^DSH
// in units of 2^-((BW-1)+(BX-1)); the full result is y = y_msb * 2^(WL+XL) + y_lsb.
// Purely combinational; it is only evaluated when C-MSB predicts a positive output.
// The MSB/LSB decomposition follows the described scheme; the unsigned LSB parts
// obtained by flooring are this design's choice.
// The upper bits of delta are unused here on purpose: they are the bias MSB
// part, which C-MSB accounts for.
module pn_clsb #(
  parameter int unsigned N      = 25,
  parameter int unsigned BX     = 7,
  parameter int unsigned BW     = 8,
  parameter int unsigned BD     = 7,
  parameter int unsigned BX_MSB = 4,
  parameter int unsigned BW_MSB = 5,
  parameter int unsigned BD_MSB = BX_MSB,
  parameter int unsigned YL_W   = BX + BW + $clog2(N) + 2
) (
  input  logic signed [BX-1:0]   x [N],
  input  logic signed [BW-1:0]   w [N],
  input  logic signed [BD-1:0]   delta,
  output logic signed [YL_W-1:0] y_lsb
);
  localparam int unsigned WL  = BW - BW_MSB;
  localparam int unsigned XL  = BX - BX_MSB;
  localparam int unsigned DL  = BD - BD_MSB;
  localparam int unsigned DSH = (BW-1) + (BX-1) - (BD-1);
  always_comb begin
    logic signed [BW_MSB-1:0] wm;
    logic        [XL-1:0]     xl;
    logic        [WL-1:0]     wl;
    logic        [DL-1:0]     dl;
    dl    = delta[DL-1:0];
    y_lsb = YL_W'($signed({1'b0, dl})) <<< DSH;
    for (int i = 0; i < N; i++) begin
      wm = BW_MSB'(w[i] >>> WL);
      xl = x[i][XL-1:0];
      wl = w[i][WL-1:0];
      y_lsb += (YL_W'(wm) * YL_W'($signed({1'b0, xl}))) <<< WL;
      y_lsb += YL_W'($signed({1'b0, wl})) * YL_W'(x[i]);
    end
  end
endmodule
