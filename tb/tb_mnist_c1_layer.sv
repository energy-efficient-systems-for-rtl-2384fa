// Workload test: the first convolutional layer of a small MNIST CNN run through
// the top level at its default sizes. A 28x28 image of 7-bit non-negative
// pixels is generated here (smooth strokes plus noise), with random 8-bit 5x5
// kernels and biases.
//  * PredictiveNet: 16 output maps of 24x24 (9,216 outputs), one 5x5 patch per
//    start; every output is checked against ReLU of the exact convolution, or
//    must be a predicted zero; the cycle count must be 2 per skipped and 3 per
//    computed output (issue cycle included).
//  * RD-SEC: 32 output maps from one 25-input vector per position; maps 25..31
//    are power-of-two combinations of maps 0..24. The 576 patches are streamed
//    2x2 window by window with timing errors injected on a third of the
//    non-basis outputs; the 12x12x32 max-pooled result is checked against the
//    error-free reference.
`include "tb_common.svh"
module tb_mnist_c1_layer;
  import boa_pkg::*;
  import rdsec_pkg::*;
  localparam int L = 40, PN = 25, RN = 25, RM = 32, RR = 25, IMG = 28, OUT = 24;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("FAIL watchdog"); begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end end

  // receiver side held idle
  logic signed [7:0] boa_vin = '0;
  adc_mode_e boa_mode = MODE_CUA4;
  upd_alg_e  boa_alg = UPD_LMS;
  logic boa_le_adapt = 0, boa_qlud_en = 0, boa_lvl_load = 0;
  lvl_t boa_lvl_init [NLEV];
  logic boa_locked, boa_word_valid, boa_dac_sweep_done;
  logic boa_dec [L];
  y_t   boa_yhat [L];
  logic [5:0] boa_sync_mismatches;
  tap_t boa_w [NTAPS];
  lvl_t boa_lvl [NLEV];
  thr_t boa_thr [NCMP];
  logic [31:0] boa_bit_count, boa_err_count;

  logic pn_start = 0, pn_ready, pn_done, pn_skipped;
  logic signed [6:0] pn_x [PN];
  logic signed [7:0] pn_w [PN];
  logic signed [6:0] pn_delta;
  logic [21:0] pn_z;
  logic [31:0] pn_n_skip, pn_n_full;

  logic rd_w_wr = 0, rd_c_wr = 0, rd_b_wr = 0, rd_x_valid = 0;
  logic [4:0] rd_w_m, rd_w_n, rd_c_r, rd_b_m;
  logic [2:0] rd_c_m;
  logic signed [7:0] rd_w_data;
  pow2_coef_t rd_c_data;
  logic signed [19:0] rd_b_data;
  logic [19:0] rd_th = 20'd500;
  pool_mode_e rd_pool_mode = POOL_MAX;
  logic signed [6:0] rd_x [RN];
  logic signed [19:0] rd_eta [RM-RR];
  logic rd_z_valid, rd_p_valid;
  logic signed [19:0] rd_z [RM], rd_p [RM];
  logic [31:0] rd_n_corrected;

  eesys_top dut (.*);

  int img [IMG][IMG];
  int pk [16][25];
  int pb [16];
  int rk [RM][25];
  int rb [RM];

  function automatic int fdiv(int a, int d);
    return (a >= 0) ? a / d : -((-a + d - 1) / d);
  endfunction

  // pooled outputs arrive in window order; compare with the reference
  int pooled_ref [$];
  int n_pooled = 0;
  always @(posedge clk) if (rst_n) begin
    #1;
    if (rd_p_valid) begin
      n_pooled++;
      for (int m = 0; m < RM; m++) begin
        int e;
        e = pooled_ref.pop_front();
        `TB_CHECK(int'(rd_p[m]) == e, $sformatf("pooled map %0d: %0d expected %0d", m, rd_p[m], e))
      end
    end
  end

  initial begin
    int skips, fulls, wrong_zero, t0, cycles, inj;
    for (int i = 0; i < NLEV; i++) boa_lvl_init[i] = '0;
    for (int i = 0; i < PN; i++) begin pn_x[i] = '0; pn_w[i] = '0; end
    for (int i = 0; i < RN; i++) rd_x[i] = '0;
    for (int m = 0; m < RM - RR; m++) rd_eta[m] = '0;
    pn_delta = '0;
    // image: two diagonal strokes plus noise, clipped to 0..63
    for (int r = 0; r < IMG; r++) for (int c = 0; c < IMG; c++) begin
      int v;
      v = $urandom_range(0, 8);
      if ((r - c) * (r - c) < 9 || (r + c - 27) * (r + c - 27) < 6) v += 50;
      img[r][c] = v > 63 ? 63 : v;
    end
    for (int m = 0; m < 16; m++) begin
      for (int i = 0; i < 25; i++) pk[m][i] = int'($urandom_range(0, 255)) - 128;
      pb[m] = int'($urandom_range(0, 127)) - 64;
    end
    for (int m = 0; m < RR; m++) for (int i = 0; i < 25; i++) rk[m][i] = int'($urandom_range(0, 40)) - 20;
    repeat (3) @(negedge clk); rst_n = 1;

    // ---------------- PredictiveNet: all 16 maps
    skips = 0; fulls = 0; wrong_zero = 0;
    t0 = int'($time / 10);
    for (int m = 0; m < 16; m++)
      for (int r = 0; r < OUT; r++)
        for (int c = 0; c < OUT; c++) begin
          int exact, ym;
          for (int i = 0; i < 25; i++) begin
            pn_x[i] = 7'(img[r + i / 5][c + i % 5]);
            pn_w[i] = 8'(pk[m][i]);
          end
          pn_delta = 7'(pb[m]);
          exact = pb[m] * 128; ym = fdiv(pb[m], 8) * 16;
          for (int i = 0; i < 25; i++) begin
            exact += int'(pn_x[i]) * pk[m][i];
            ym += fdiv(int'(pn_x[i]), 8) * fdiv(pk[m][i], 8);
          end
          pn_start = 1;
          @(negedge clk); pn_start = 0;
          while (!pn_done) @(negedge clk);
          if (ym < 0) begin
            skips++;
            if (exact > 0) wrong_zero++;
            `TB_CHECK(pn_skipped && pn_z == 0, "PN: predicted zero")
          end else begin
            fulls++;
            `TB_CHECK(!pn_skipped && int'(pn_z) == (exact > 0 ? exact : 0), "PN: exact ReLU output")
          end
        end
    cycles = int'($time / 10) - t0;
    `TB_CHECK(cycles == 2 * skips + 3 * fulls, $sformatf("PN: %0d cycles for %0d skipped and %0d computed", cycles, skips, fulls))
    `TB_CHECK(skips + fulls == 16 * OUT * OUT, "PN: all outputs of the layer")
    $display("PN layer: %0d outputs, %0d skipped, %0d computed, %0d positive outputs zeroed, %0d cycles",
             skips + fulls, skips, fulls, wrong_zero, cycles);

    // ---------------- RD-SEC: load 32 kernels (7 are combinations) and biases
    for (int m = 0; m < RM - RR; m++) begin
      int r1, r2;
      r1 = m; r2 = m + 9;
      for (int i = 0; i < 25; i++) rk[RR+m][i] = 2 * rk[r1][i] - rk[r2][i];
      for (int r = 0; r < RR; r++) begin
        rd_c_wr = 1; rd_c_m = 3'(m); rd_c_r = 5'(r);
        if (r == r1)      rd_c_data = '{zero: 1'b0, neg: 1'b0, exp: 4'sd1};
        else if (r == r2) rd_c_data = '{zero: 1'b0, neg: 1'b1, exp: 4'sd0};
        else              rd_c_data = '{zero: 1'b1, neg: 1'b0, exp: 4'sd0};
        @(negedge clk);
      end
    end
    rd_c_wr = 0;
    for (int m = 0; m < RM; m++) for (int i = 0; i < 25; i++) begin
      rd_w_wr = 1; rd_w_m = 5'(m); rd_w_n = 5'(i); rd_w_data = 8'(rk[m][i]);
      @(negedge clk);
    end
    rd_w_wr = 0;
    for (int m = 0; m < RM; m++) begin
      rb[m] = int'($urandom_range(0, 4000)) - 2000;
      rd_b_wr = 1; rd_b_m = 5'(m); rd_b_data = 20'(rb[m]);
      @(negedge clk);
    end
    rd_b_wr = 0;
    // stream the 24x24 positions, 2x2 window by window
    inj = 0;
    t0 = int'($time / 10);
    for (int pr = 0; pr < OUT / 2; pr++)
      for (int pc = 0; pc < OUT / 2; pc++) begin
        int mx [RM];
        for (int q = 0; q < 4; q++) begin
          int r, c;
          r = 2 * pr + q / 2; c = 2 * pc + q % 2;
          for (int i = 0; i < 25; i++) rd_x[i] = 7'(img[r + i / 5][c + i % 5]);
          for (int m = 0; m < RM - RR; m++)
            if ($urandom_range(0, 2) == 0) begin rd_eta[m] = 20'($urandom_range(5000, 100000)); inj++; end
            else rd_eta[m] = '0;
          for (int m = 0; m < RM; m++) begin
            int y;
            y = rb[m];
            for (int i = 0; i < 25; i++) y += int'(rd_x[i]) * rk[m][i];
            if (y < 0) y = 0;
            if (q == 0 || y > mx[m]) mx[m] = y;
          end
          rd_x_valid = 1;
          @(negedge clk);
        end
        for (int m = 0; m < RM; m++) pooled_ref.push_back(mx[m]);
      end
    rd_x_valid = 0;
    cycles = int'($time / 10) - t0;
    repeat (4) @(negedge clk);
    `TB_CHECK(cycles == OUT * OUT, "RD: one input vector per clock")
    `TB_CHECK(n_pooled == (OUT / 2) * (OUT / 2), "RD: 12x12 pooled positions")
    `TB_CHECK(int'(rd_n_corrected) == inj, $sformatf("RD: %0d corrections for %0d injected errors", rd_n_corrected, inj))
    $display("RD layer: %0d vectors in %0d cycles, %0d pooled, %0d errors injected and corrected",
             OUT * OUT, cycles, n_pooled, inj);
    begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  end
endmodule
