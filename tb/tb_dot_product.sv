// Test of one dot product unit: random and extreme signed operands against an
// integer reference.
`include "tb_common.svh"
module tb_dot_product;
  localparam int N = 25;
  int checks = 0, failures = 0;
  logic signed [6:0]  x [N];
  logic signed [7:0]  w [N];
  logic signed [19:0] y;
  dot_product dut (.*);
  initial begin #1000000; failures++; `TB_FINISH end
  initial begin
    for (int t = 0; t < 500; t++) begin
      int r; r = 0;
      for (int i = 0; i < N; i++) begin
        x[i] = (t == 0) ? -7'sd64 : 7'($urandom);
        w[i] = (t == 0) ? -8'sd128 : (t == 1) ? 8'sd127 : 8'($urandom);
        if (t == 1) x[i] = -7'sd64;
      end
      #1;
      for (int i = 0; i < N; i++) r += int'(x[i]) * int'(w[i]);
      `TB_CHECK(int'(y) == r, $sformatf("y %0d expected %0d", y, r))
    end
    `TB_FINISH
  end
endmodule
