// Test of the (25, 32) matrix-vector multiplier: random weight matrices and
// input vectors; all 32 outputs are compared with an integer reference.
`include "tb_common.svh"
module tb_mvm_dpe;
  localparam int N = 25, M = 32;
  int checks = 0, failures = 0;
  logic signed [6:0]  x [N];
  logic signed [7:0]  w [M][N];
  logic signed [19:0] y [M];
  mvm_dpe dut (.*);
  initial begin #1000000; failures++; `TB_FINISH end
  initial begin
    for (int t = 0; t < 100; t++) begin
      for (int i = 0; i < N; i++) x[i] = 7'($urandom);
      for (int m = 0; m < M; m++) for (int i = 0; i < N; i++) w[m][i] = 8'($urandom);
      #1;
      for (int m = 0; m < M; m++) begin
        int r; r = 0;
        for (int i = 0; i < N; i++) r += int'(x[i]) * int'(w[m][i]);
        `TB_CHECK(int'(y[m]) == r, $sformatf("y[%0d] %0d expected %0d", m, y[m], r))
      end
    end
    `TB_FINISH
  end
endmodule
