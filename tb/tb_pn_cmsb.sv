// Test of the C-MSB block: random 7-bit inputs, 8-bit weights and 7-bit bias;
// the MSB parts are formed here by integer floor division and the expected
// y_msb is recomputed and compared, including all-extreme operands.
`include "tb_common.svh"
module tb_pn_cmsb;
  localparam int N = 25;
  int checks = 0, failures = 0;
  logic signed [6:0] x [N];
  logic signed [7:0] w [N];
  logic signed [6:0] delta;
  logic signed [15:0] y_msb;
  pn_cmsb dut (.*);
  initial begin #1000000; failures++; `TB_FINISH end

  function automatic int fdiv(int a, int d);   // floor division
    return (a >= 0) ? a / d : -((-a + d - 1) / d);
  endfunction

  initial begin
    for (int t = 0; t < 300; t++) begin
      int ref_y;
      for (int i = 0; i < N; i++) begin
        case (t)
          0: begin x[i] = -64; w[i] = -128; end
          1: begin x[i] = 63;  w[i] = -128; end
          2: begin x[i] = 63;  w[i] = 127;  end
          default: begin x[i] = 7'($urandom); w[i] = 8'($urandom); end
        endcase
      end
      delta = (t < 3) ? 7'(t == 1 ? -64 : 63) : 7'($urandom);
      #1;
      ref_y = fdiv(int'(delta), 8) * 16;          // delta_msb * 2^(4+3-3)
      for (int i = 0; i < N; i++) ref_y += fdiv(int'(w[i]), 8) * fdiv(int'(x[i]), 8);
      `TB_CHECK(int'(y_msb) == ref_y, $sformatf("y_msb %0d expected %0d", y_msb, ref_y))
    end
    `TB_FINISH
  end
endmodule
