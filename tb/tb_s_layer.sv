// Test of the S-layer: random vectors with random gaps in in_valid, in both
// max and average pooling. After every fourth valid vector out_valid must pulse
// on the next cycle with the pooled vector (average rounds down), and at no
// other time.
`include "tb_common.svh"
module tb_s_layer;
  import rdsec_pkg::*;
  localparam int M = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  pool_mode_e mode;
  logic signed [19:0] z [M];
  logic signed [19:0] p [M];
  s_layer dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; `TB_FINISH end

  int exp_p [M];
  bit expect_out = 0;
  int n_out = 0;
  always @(negedge clk) if (rst_n) begin
    `TB_CHECK(out_valid == expect_out, "out_valid timing")
    if (out_valid) begin
      n_out++;
      for (int m = 0; m < M; m++)
        `TB_CHECK(int'(p[m]) == exp_p[m], $sformatf("pooled %0d expected %0d", p[m], exp_p[m]))
    end
  end

  initial begin
    int acc [M];
    int cnt = 0;
    mode = POOL_MAX;
    for (int m = 0; m < M; m++) z[m] = '0;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      if (t == 200) mode = POOL_AVG;
      in_valid = ($urandom_range(0, 3) != 0);
      for (int m = 0; m < M; m++) z[m] = 20'($urandom_range(0, 400000) - 200000);
      if (in_valid) begin
        for (int m = 0; m < M; m++)
          if (cnt == 0) acc[m] = int'(z[m]);
          else if (mode == POOL_AVG) acc[m] += int'(z[m]);
          else if (int'(z[m]) > acc[m]) acc[m] = int'(z[m]);
        cnt++;
      end
      @(posedge clk); #1;
      expect_out = 0;
      if (cnt == 4) begin
        for (int m = 0; m < M; m++) exp_p[m] = (mode == POOL_AVG) ? (acc[m] >>> 2) : acc[m];
        expect_out = 1; cnt = 0;
      end
      // keep mode stable within a window
      if (t == 199) while (cnt != 0) begin
        in_valid = 1;
        for (int m = 0; m < M; m++) begin z[m] = '0; if (0 > acc[m]) acc[m] = 0; end
        cnt++;
        @(negedge clk);
        @(posedge clk); #1;
        expect_out = 0;
        if (cnt == 4) begin
          for (int m = 0; m < M; m++) exp_p[m] = acc[m];
          expect_out = 1; cnt = 0;
        end
      end
      @(negedge clk);
    end
    in_valid = 0;
    @(negedge clk); @(negedge clk);
    `TB_CHECK(n_out > 60, "pooled outputs produced")
    `TB_FINISH
  end
endmodule
