// Test of one CNN stage with RD-SEC. The buffers are loaded through the write
// ports with a rank-25 kernel matrix whose 7 extra columns are exact
// power-of-two combinations of basis columns (as in the multiplier test) and
// random biases. Input vectors are streamed with random injected errors and
// gaps. Checks: z one cycle after x with z_valid, z = ReLU(exact product + bias)
// for corrected and error-free outputs and ReLU(product + error + bias) for
// small errors, the correction counter, and max pooling of every four z
// vectors one cycle after the fourth.
`include "tb_common.svh"
module tb_rdsec_cnn_stage;
  import rdsec_pkg::*;
  localparam int N = 25, M = 32, R = 25;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic w_wr = 0, c_wr = 0, b_wr = 0, x_valid = 0;
  logic [4:0] w_m, w_n, b_m, c_r;
  logic [2:0] c_m;
  logic signed [7:0] w_data;
  pow2_coef_t c_data;
  logic signed [19:0] b_data;
  logic [19:0] th;
  pool_mode_e pool_mode;
  logic signed [6:0] x [N];
  logic signed [19:0] eta [M-R];
  logic z_valid, p_valid;
  logic signed [19:0] z [M], p [M];
  logic [31:0] n_corrected;
  rdsec_cnn_stage dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; `TB_FINISH end

  int wm [M][N];
  int bias [M];
  int exp_z [M];
  int pool_acc [M];
  int pool_cnt = 0, n_p = 0, n_z = 0, exp_corr = 0;
  bit exp_zv = 0, exp_pv = 0;
  int exp_p [M];

  // output checker: sampled just after each rising edge
  always @(posedge clk) if (rst_n) begin
    #1;
    `TB_CHECK(z_valid == exp_zv, "z_valid one cycle after x_valid")
    if (z_valid) begin
      n_z++;
      for (int m = 0; m < M; m++)
        `TB_CHECK(int'(z[m]) == exp_z[m], $sformatf("z[%0d] %0d expected %0d", m, z[m], exp_z[m]))
    end
    `TB_CHECK(p_valid == exp_pv, "p_valid after four z vectors")
    if (p_valid) begin
      n_p++;
      for (int m = 0; m < M; m++) `TB_CHECK(int'(p[m]) == exp_p[m], "max pooled output")
    end
  end

  initial begin
    pool_mode = POOL_MAX; th = 20'd200;
    for (int i = 0; i < N; i++) x[i] = '0;
    for (int m = 0; m < M - R; m++) eta[m] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // load the kernel matrix, the estimator coefficients and the biases
    for (int m = 0; m < R; m++) for (int i = 0; i < N; i++) wm[m][i] = $urandom_range(0, 40) - 20;
    for (int m = 0; m < M - R; m++) begin
      int r1, r2;
      r1 = $urandom_range(0, R - 1); r2 = (r1 + 3) % R;
      for (int i = 0; i < N; i++) wm[R+m][i] = 2 * wm[r1][i] - wm[r2][i];
      for (int r = 0; r < R; r++) begin
        @(negedge clk);
        c_wr = 1; c_m = 3'(m); c_r = 5'(r);
        if (r == r1)      c_data = '{zero: 1'b0, neg: 1'b0, exp: 4'sd1};
        else if (r == r2) c_data = '{zero: 1'b0, neg: 1'b1, exp: 4'sd0};
        else              c_data = '{zero: 1'b1, neg: 1'b0, exp: 4'sd0};
      end
    end
    @(negedge clk); c_wr = 0;
    for (int m = 0; m < M; m++) for (int i = 0; i < N; i++) begin
      w_wr = 1; w_m = 5'(m); w_n = 5'(i); w_data = 8'(wm[m][i]);
      @(negedge clk);
    end
    w_wr = 0;
    for (int m = 0; m < M; m++) begin
      bias[m] = $urandom_range(0, 6000) - 3000;
      b_wr = 1; b_m = 5'(m); b_data = 20'(bias[m]);
      @(negedge clk);
    end
    b_wr = 0;
    // stream
    for (int t = 0; t < 300; t++) begin
      bit v;
      v = ($urandom_range(0, 4) != 0);
      x_valid = v;
      for (int i = 0; i < N; i++) x[i] = 7'($urandom_range(0, 63));
      for (int m = 0; m < M - R; m++)
        case ($urandom_range(0, 2))
          0: eta[m] = '0;
          1: eta[m] = 20'($urandom_range(0, 200) - 100);
          default: eta[m] = 20'($urandom_range(1000, 50000));
        endcase
      @(posedge clk);
      exp_zv = v;
      exp_pv = 0;
      if (v) begin
        for (int m = 0; m < M; m++) begin
          int y, s;
          y = 0;
          for (int i = 0; i < N; i++) y += int'(x[i]) * wm[m][i];
          if (m >= R) begin
            int e; e = int'(eta[m-R]);
            if (e > 200 || e < -200) exp_corr++;
            else y += e;
          end
          s = y + bias[m];
          exp_z[m] = s < 0 ? 0 : s;
          if (pool_cnt == 0 || exp_z[m] > pool_acc[m]) pool_acc[m] = exp_z[m];
        end
        pool_cnt++;
      end
      @(negedge clk);
      // pooled vector appears one cycle after the fourth z vector
      if (pool_cnt == 4 && exp_zv) begin
        x_valid = 0;
        @(posedge clk);
        exp_zv = 0; exp_pv = 1; exp_p = pool_acc; pool_cnt = 0;
        @(negedge clk);
        @(posedge clk); exp_pv = 0;
        @(negedge clk);
      end
    end
    x_valid = 0;
    @(posedge clk); exp_zv = 0; exp_pv = 0;
    repeat (3) @(negedge clk);
    `TB_CHECK(int'(n_corrected) == exp_corr, $sformatf("corrections %0d expected %0d", n_corrected, exp_corr))
    `TB_CHECK(n_z > 200 && n_p > 50 && exp_corr > 100, "stream exercised")
    `TB_FINISH
  end
endmodule
