// Test of the C-LSB block together with C-MSB: for random and extreme operands
// y_msb * 2^(WL+XL) + y_lsb must equal the exact full-precision dot product
// sum w*x + delta * 2^(BW-1) computed here.
`include "tb_common.svh"
module tb_pn_clsb;
  localparam int N = 25;
  int checks = 0, failures = 0;
  logic signed [6:0] x [N];
  logic signed [7:0] w [N];
  logic signed [6:0] delta;
  logic signed [15:0] y_msb;
  logic signed [21:0] y_lsb;
  pn_cmsb u_m (.x, .w, .delta, .y_msb);
  pn_clsb dut (.x, .w, .delta, .y_lsb);
  initial begin #1000000; failures++; `TB_FINISH end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int exact, got;
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
      exact = int'(delta) * 128;                  // units 2^-(7+6), delta 2^-6
      for (int i = 0; i < N; i++) exact += int'(w[i]) * int'(x[i]);
      got = int'(y_msb) * 64 + int'(y_lsb);       // WL + XL = 3 + 3
      `TB_CHECK(got == exact, $sformatf("MSB+LSB %0d expected %0d", got, exact))
    end
    `TB_FINISH
  end
endmodule
