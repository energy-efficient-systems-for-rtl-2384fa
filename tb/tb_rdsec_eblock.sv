// Test of the estimator block: random basis outputs and random signed
// power-of-two coefficients (including zeros, left and right shifts); the
// estimate must equal sum of sign * floor(y * 2^exp) computed here.
`include "tb_common.svh"
module tb_rdsec_eblock;
  import rdsec_pkg::*;
  localparam int R = 25;
  int checks = 0, failures = 0;
  logic signed [19:0] y_o [R];
  pow2_coef_t         c   [R];
  logic signed [32:0] y_e;
  rdsec_eblock dut (.*);
  initial begin #1000000; failures++; `TB_FINISH end
  initial begin
    for (int t = 0; t < 500; t++) begin
      longint r; r = 0;
      for (int i = 0; i < R; i++) begin
        y_o[i] = 20'($urandom);
        c[i].zero = ($urandom_range(0, 3) == 0);
        c[i].neg  = 1'($urandom);
        c[i].exp  = 4'($urandom);
      end
      #1;
      for (int i = 0; i < R; i++) begin
        longint v; v = longint'(y_o[i]);
        if (c[i].exp >= 0) v = v * (longint'(1) << c[i].exp);
        else               v = v >>> (-int'(c[i].exp));
        if (!c[i].zero) r += c[i].neg ? -v : v;
      end
      `TB_CHECK(longint'(y_e) == r, $sformatf("y_e %0d expected %0d", y_e, r))
    end
    `TB_FINISH
  end
endmodule
