// RD-SEC matrix-vector multiplier. The weight matrix of an (N, M) MVM with
// M > N has rank R <= N, so it factors as W = B [I_R C_e]: the first R outputs
// y_o = B^T x are basis outputs and the other M-R outputs are linear
// combinations of them, y_a = C_e^T y_o. The M-block computes all M outputs
// directly (mvm_dpe); for each of the M-R non-basis outputs an E-block forms a
// cheap estimate y_e from y_o with power-of-two coefficients round(C_e). The
// output is
//   y_hat[m] = y_o[m]                       for m < R
//            = y_a[m-R]  if |y_a - y_e| <= th
//            = y_e[m-R]  otherwise,
// so a large timing error in the M-block is replaced by the estimate.
// The basis outputs are taken as error-free. eta is added to the non-basis
// M-block outputs: it emulates the timing errors of an M-block run at
// near-threshold voltage and is tied to zero in normal use. corrected[m-R]
// flags outputs where the estimate was used. Combinational.
// The decision rule and the rank decomposition follow the description; the error
// input eta is this design's means of emulating timing errors.
// The upper bits of the saturated estimate ye_sat are unused on purpose: after
// saturation it fits the BOUT-bit output.
module rdsec_mvm
  import rdsec_pkg::*;
#(
  parameter int unsigned N    = 25,
  parameter int unsigned M    = 32,
  parameter int unsigned R    = N,
  parameter int unsigned BIN  = 7,
  parameter int unsigned BW   = 8,
  parameter int unsigned BOUT = BIN + BW + $clog2(N)
) (
  input  logic signed [BIN-1:0]  x     [N],
  input  logic signed [BW-1:0]   w     [M][N],
  input  pow2_coef_t             c     [M-R][R],   // round(C_e^T), row per non-basis output
  input  logic        [BOUT-1:0] th,               // decision threshold T_h
  input  logic signed [BOUT-1:0] eta   [M-R],      // injected M-block error
  output logic signed [BOUT-1:0] y_hat [M],
  output logic                   corrected [M-R]
);
  localparam int unsigned BE = BOUT + 8 + $clog2(R);
  localparam logic signed [BE-1:0] YMAX = BE'((64'sd1 <<< (BOUT-1)) - 64'sd1);
  logic signed [BOUT-1:0] y_m [M];
  logic signed [BOUT-1:0] y_o [R];
  logic signed [BE-1:0]   y_e [M-R];

  mvm_dpe #(.N(N), .M(M), .BIN(BIN), .BW(BW), .BOUT(BOUT)) u_mblock (.x, .w, .y(y_m));

  always_comb for (int r = 0; r < R; r++) y_o[r] = y_m[r];

  for (genvar m = 0; m < M - R; m++) begin : g_e
    rdsec_eblock #(.R(R), .BOUT(BOUT), .BE(BE)) u_eb (.y_o, .c(c[m]), .y_e(y_e[m]));
  end

  always_comb begin
    for (int r = 0; r < R; r++) y_hat[r] = y_o[r];
    for (int m = 0; m < M - R; m++) begin
      logic signed [BE-1:0] ya, d, ye_sat;
      ya = BE'(y_m[R+m] + eta[m]);
      d  = ya - y_e[m];
      if (d < 0) d = -d;
      // saturate the estimate to the output width
      if (y_e[m] > YMAX)       ye_sat = YMAX;
      else if (y_e[m] < -YMAX) ye_sat = -YMAX;
      else                     ye_sat = y_e[m];
      corrected[m] = (d > BE'(th));
      y_hat[R+m]   = corrected[m] ? BOUT'(ye_sat) : BOUT'(ya);
    end
  end
endmodule
