// Test of the RD-SEC multiplier. A random rank-25 basis B is drawn and every
// non-basis column of W is built as a combination of at most two basis columns
// with coefficients in {+-1, +-2}, so the power-of-two estimator is exact.
// Errors eta are then injected into the non-basis M-block outputs: errors above
// the threshold must be replaced by the exact estimate (corrected flag set),
// errors at or below it must pass through unchanged, and with no error the
// output is the plain product.
`include "tb_common.svh"
module tb_rdsec_mvm;
  import rdsec_pkg::*;
  localparam int N = 25, M = 32, R = 25;
  int checks = 0, failures = 0;
  logic signed [6:0]  x [N];
  logic signed [7:0]  w [M][N];
  pow2_coef_t         c [M-R][R];
  logic [19:0]        th;
  logic signed [19:0] eta [M-R];
  logic signed [19:0] y_hat [M];
  logic               corrected [M-R];
  rdsec_mvm dut (.*);
  initial begin #1000000; failures++; `TB_FINISH end

  initial begin
    int n_corr = 0, n_pass = 0;
    for (int t = 0; t < 60; t++) begin
      for (int m = 0; m < R; m++) for (int i = 0; i < N; i++) w[m][i] = 8'($urandom_range(0, 40) - 20);
      for (int m = 0; m < M - R; m++) begin
        int r1, r2, k1, k2;
        r1 = $urandom_range(0, R - 1); r2 = (r1 + 1 + $urandom_range(0, R - 2)) % R;
        k1 = $urandom_range(0, 1) != 0 ? 2 : 1; if ($urandom_range(0, 1) != 0) k1 = -k1;
        k2 = $urandom_range(0, 2) - 1;      // -1, 0 or 1
        for (int r = 0; r < R; r++) c[m][r] = '{zero: 1'b1, neg: 1'b0, exp: 4'sd0};
        c[m][r1] = '{zero: 1'b0, neg: k1 < 0, exp: (k1 == 2 || k1 == -2) ? 4'sd1 : 4'sd0};
        if (k2 != 0) c[m][r2] = '{zero: 1'b0, neg: k2 < 0, exp: 4'sd0};
        for (int i = 0; i < N; i++) w[R+m][i] = 8'(k1 * int'(w[r1][i]) + k2 * int'(w[r2][i]));
      end
      for (int v = 0; v < 10; v++) begin
        int ref_y [M];
        th = 20'($urandom_range(0, 500));
        for (int i = 0; i < N; i++) x[i] = 7'($urandom);
        for (int m = 0; m < M - R; m++)
          case ($urandom_range(0, 2))
            0: eta[m] = '0;
            1: eta[m] = 20'($urandom_range(0, int'(th)) * ($urandom_range(0, 1) != 0 ? 1 : -1));
            default: eta[m] = 20'((int'(th) + 1 + $urandom_range(0, 100000)) * ($urandom_range(0, 1) != 0 ? 1 : -1));
          endcase
        #1;
        for (int m = 0; m < M; m++) begin
          ref_y[m] = 0;
          for (int i = 0; i < N; i++) ref_y[m] += int'(x[i]) * int'(w[m][i]);
        end
        for (int m = 0; m < R; m++)
          `TB_CHECK(int'(y_hat[m]) == ref_y[m], "basis output exact")
        for (int m = 0; m < M - R; m++) begin
          int e; e = int'(eta[m]);
          if (e > int'(th) || -e > int'(th)) begin
            n_corr++;
            `TB_CHECK(corrected[m] && int'(y_hat[R+m]) == ref_y[R+m],
                      $sformatf("large error corrected: got %0d expected %0d", y_hat[R+m], ref_y[R+m]))
          end else begin
            n_pass++;
            `TB_CHECK(!corrected[m] && int'(y_hat[R+m]) == ref_y[R+m] + e,
                      "small error passes through")
          end
        end
      end
    end
    `TB_CHECK(n_corr > 100 && n_pass > 100, "both decisions exercised")
    `TB_FINISH
  end
endmodule
