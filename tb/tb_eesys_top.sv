// End-to-end test of the top level at its default (full) size: 40 lanes, the
// threshold DAC at its real refresh rate (one 32-slot sweep = 10,624 cycles),
// a 25-input PredictiveNet unit and a (25, 32) RD-SEC CNN stage, all running
// at the same time. Every mechanism is counted and a mechanism that never
// happens is a failure:
//   BOA: PRBS lock, equalizer adaptation, DAC sweeps, CUA->BOA switch, level
//        movement under LMS and under AMBER, thresholds reaching the
//        comparators, parked comparators, BER;
//   PN : skipped (predicted zero) and fully computed outputs, each checked
//        against an integer reference with its latency;
//   RD : outputs corrected by the estimator, outputs passed through, max and
//        average pooling, each checked against an integer reference.
`include "tb_common.svh"
module tb_eesys_top;
  import boa_pkg::*;
  import rdsec_pkg::*;
  localparam int L = 40, PN = 25, RN = 25, RM = 32, RR = 25;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin #6000000000; failures++; $display("FAIL watchdog"); `TB_FINISH end

  // ---------------- top-level signals
  logic signed [7:0] boa_vin;
  adc_mode_e boa_mode;
  upd_alg_e  boa_alg;
  logic boa_le_adapt, boa_qlud_en, boa_lvl_load;
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
  logic [19:0] rd_th;
  pool_mode_e rd_pool_mode;
  logic signed [6:0] rd_x [RN];
  logic signed [19:0] rd_eta [RM-RR];
  logic rd_z_valid, rd_p_valid;
  logic signed [19:0] rd_z [RM], rd_p [RM];
  logic [31:0] rd_n_corrected;

  eesys_top dut (.*);

  // ---------------- mechanism counters
  int m_lock = 0, m_le_adapt = 0, m_sweep = 0, m_mode_switch = 0;
  int m_lvl_lms = 0, m_lvl_amber = 0, m_thr_set = 0;
  int m_pn_skip = 0, m_pn_full = 0;
  int m_rd_corr = 0, m_rd_pass = 0, m_rd_max = 0, m_rd_avg = 0;
  bit boa_done = 0, pn_fin = 0, rd_fin = 0;

  always @(posedge clk) if (rst_n && boa_dac_sweep_done) m_sweep++;
  logic locked_d = 0;
  always @(posedge clk) begin
    if (boa_locked && !locked_d) m_lock++;
    locked_d <= boa_locked;
  end

  // ---------------- BOA: PRBS 2^23-1 transmitter, 20-inch backplane channel
  // at +-300 LSB drive, clipped to the ADC input range
  real h [7] = '{0.0949, 0.2539, 0.1552, 0.0793, 0.0435, 0.0356, 0.0220};
  logic [22:0] lfsr = 23'h2F0F0F;
  bit tx [$];
  always @(negedge clk) begin
    real v;
    logic b;
    b = lfsr[22] ^ lfsr[17];
    lfsr = {lfsr[21:0], b};
    tx.push_front(b);
    if (tx.size() > 8) void'(tx.pop_back());
    v = 0;
    for (int i = 0; i < 7; i++)
      if (tx.size() > i) v += h[i] * (tx[i] ? 300.0 : -300.0);
    v += real'(int'($urandom_range(0, 6)) - 3);
    if (v > 127.0) v = 127.0;           // the ADC input range clips
    if (v < -128.0) v = -128.0;
    boa_vin = 8'(int'($rtoi(v + (v >= 0 ? 0.5 : -0.5))));
  end

  task automatic words(int n);
    repeat (n * L) @(posedge clk);
  endtask

  initial begin : boa_flow
    lvl_t l0 [NLEV];
    int e0, b0;
    boa_mode = MODE_CUA4; boa_alg = UPD_LMS; boa_le_adapt = 1; boa_qlud_en = 0; boa_lvl_load = 0;
    for (int i = 0; i < NLEV; i++) boa_lvl_init[i] = lvl_t'((2 * i - 7) * 12 * 16);
    wait (rst_n);
    for (int i = 0; i < 4000 && !boa_locked; i++) words(1);
    words(300);
    `TB_CHECK(boa_locked, "BOA: locked in uniform 4-bit mode")
    if (boa_w[0] != 0 || boa_w[2] != 0 || boa_w[1] != tap_t'(1 << TAP_F)) m_le_adapt++;
    // switch to the BER-optimal 3-bit mode
    @(negedge clk); boa_mode = MODE_BOA3; boa_lvl_load = 1; @(negedge clk); boa_lvl_load = 0;
    m_mode_switch++;
    l0 = boa_lvl;
    boa_qlud_en = 1; boa_alg = UPD_LMS;
    words(400);
    for (int i = 0; i < NLEV; i++) m_lvl_lms += int'(boa_lvl[i] != l0[i]);
    l0 = boa_lvl;
    boa_alg = UPD_AMBER;
    words(300);
    for (int i = 0; i < NLEV; i++) m_lvl_amber += int'(boa_lvl[i] != l0[i]);
    // freeze; the charge-sharing DAC closes 1/4 of the remaining gap per
    // refresh, so the thresholds settle within about 20 sweeps
    boa_qlud_en = 0;
    begin
      int s0;
      bit ok;
      s0 = m_sweep;
      ok = 0;
      while (!ok && m_sweep - s0 < 30) begin
        words(10);
        ok = 1;
        for (int k = 0; k < NCMP; k++) begin
          int m;
          if (k < NLEV - 1) begin
            m = (int'(boa_lvl[k]) + int'(boa_lvl[k+1]) + 16) >>> 5;
            if (m > 127) m = 127; if (m < -128) m = -128;
          end else m = 127;
          if (int'(boa_thr[k]) != m) ok = 0;
        end
      end
      $display("BOA: thresholds settled after %0d sweeps", m_sweep - s0);
      `TB_CHECK(m_sweep - s0 <= 25, "BOA: thresholds settle within 25 sweeps")
    end
    for (int k = 0; k < NCMP; k++) begin
      int m;
      if (k < NLEV - 1) begin
        m = (int'(boa_lvl[k]) + int'(boa_lvl[k+1]) + 16) >>> 5;
        if (m > 127) m = 127; if (m < -128) m = -128;
      end else m = 127;
      if (int'(boa_thr[k]) == m) m_thr_set++;
      `TB_CHECK(int'(boa_thr[k]) == m, $sformatf("BOA: comparator %0d threshold %0d expected %0d", k, boa_thr[k], m))
    end
    e0 = int'(boa_err_count); b0 = int'(boa_bit_count);
    words(300);
    `TB_CHECK(int'(boa_bit_count) - b0 == 300 * L, "BOA: lock held")
    `TB_CHECK(int'(boa_err_count) - e0 <= 300 * L / 20, "BOA: BER below 5e-2")  // thresholds trail the levels at the slow DAC refresh
    $display("BOA: %0d errors in %0d bits, taps %0d %0d %0d", int'(boa_err_count) - e0,
             int'(boa_bit_count) - b0, boa_w[0], boa_w[1], boa_w[2]);
    boa_done = 1;
  end

  // ---------------- PredictiveNet
  function automatic int fdiv(int a, int d);
    return (a >= 0) ? a / d : -((-a + d - 1) / d);
  endfunction

  initial begin : pn_flow
    for (int i = 0; i < PN; i++) begin pn_x[i] = '0; pn_w[i] = '0; end
    pn_delta = '0;
    wait (rst_n);
    for (int t = 0; t < 500; t++) begin
      int exact, ym, lat;
      @(negedge clk);
      for (int i = 0; i < PN; i++) begin
        pn_x[i] = 7'($urandom_range(0, 63));
        pn_w[i] = 8'($urandom);
      end
      pn_delta = 7'($urandom);
      exact = int'(pn_delta) * 128;
      ym = fdiv(int'(pn_delta), 8) * 16;
      for (int i = 0; i < PN; i++) begin
        exact += int'(pn_w[i]) * int'(pn_x[i]);
        ym += fdiv(int'(pn_w[i]), 8) * fdiv(int'(pn_x[i]), 8);
      end
      `TB_CHECK(pn_ready, "PN: ready")
      pn_start = 1;
      @(negedge clk); pn_start = 0;
      lat = 0;
      while (!pn_done && lat < 10) begin @(negedge clk); lat++; end
      if (ym < 0) begin
        m_pn_skip++;
        `TB_CHECK(pn_skipped && pn_z == 0 && lat == 1, "PN: predicted zero skipped in one cycle")
      end else begin
        m_pn_full++;
        `TB_CHECK(!pn_skipped && int'(pn_z) == (exact > 0 ? exact : 0) && lat == 2,
                  "PN: full-precision output in two cycles")
      end
    end
    `TB_CHECK(int'(pn_n_skip) == m_pn_skip && int'(pn_n_full) == m_pn_full, "PN: counters")
    pn_fin = 1;
  end

  // ---------------- RD-SEC CNN stage
  int wm [RM][RN];
  int bias [RM];
  int zq [$];     // expected z vectors, RM values each
  int pq [$];     // expected pooled vectors
  int n_z_seen = 0, n_p_seen = 0;
  logic rd_xv_d = 0;
  always @(posedge clk) if (rst_n) begin
    #1;
    `TB_CHECK(rd_z_valid == rd_xv_d, "RD: z one cycle after x")
    if (rd_z_valid && zq.size() >= RM) begin
      int e [RM];
      for (int m = 0; m < RM; m++) e[m] = zq.pop_front();
      n_z_seen++;
      for (int m = 0; m < RM; m++) `TB_CHECK(int'(rd_z[m]) == e[m], $sformatf("RD: z[%0d] %0d expected %0d", m, rd_z[m], e[m]))
    end
    if (rd_p_valid) begin
      int e [RM];
      `TB_CHECK(pq.size() > 0, "RD: expected pooled vector")
      if (pq.size() >= RM) begin
        for (int m = 0; m < RM; m++) e[m] = pq.pop_front();
        n_p_seen++;
        for (int m = 0; m < RM; m++) `TB_CHECK(int'(rd_p[m]) == e[m], "RD: pooled value")
      end
    end
  end
  always @(posedge clk) rd_xv_d <= rd_x_valid;

  initial begin : rd_flow
    int exp_corr = 0;
    rd_th = 20'd300; rd_pool_mode = POOL_MAX;
    for (int i = 0; i < RN; i++) rd_x[i] = '0;
    for (int m = 0; m < RM - RR; m++) rd_eta[m] = '0;
    wait (rst_n);
    for (int m = 0; m < RR; m++) for (int i = 0; i < RN; i++) wm[m][i] = $urandom_range(0, 40) - 20;
    for (int m = 0; m < RM - RR; m++) begin
      int r1, r2;
      r1 = $urandom_range(0, RR - 1); r2 = (r1 + 5) % RR;
      for (int i = 0; i < RN; i++) wm[RR+m][i] = -wm[r1][i] + 2 * wm[r2][i];
      for (int r = 0; r < RR; r++) begin
        @(negedge clk);
        rd_c_wr = 1; rd_c_m = 3'(m); rd_c_r = 5'(r);
        if (r == r1)      rd_c_data = '{zero: 1'b0, neg: 1'b1, exp: 4'sd0};
        else if (r == r2) rd_c_data = '{zero: 1'b0, neg: 1'b0, exp: 4'sd1};
        else              rd_c_data = '{zero: 1'b1, neg: 1'b0, exp: 4'sd0};
      end
    end
    @(negedge clk); rd_c_wr = 0;
    for (int m = 0; m < RM; m++) for (int i = 0; i < RN; i++) begin
      rd_w_wr = 1; rd_w_m = 5'(m); rd_w_n = 5'(i); rd_w_data = 8'(wm[m][i]);
      @(negedge clk);
    end
    rd_w_wr = 0;
    for (int m = 0; m < RM; m++) begin
      bias[m] = $urandom_range(0, 6000) - 3000;
      rd_b_wr = 1; rd_b_m = 5'(m); rd_b_data = 20'(bias[m]);
      @(negedge clk);
    end
    rd_b_wr = 0;
    for (int win = 0; win < 100; win++) begin
      int acc [RM];
      rd_pool_mode = (win % 2 == 0) ? POOL_MAX : POOL_AVG;
      for (int v = 0; v < 4; v++) begin
        int ez [RM];
        rd_x_valid = 1;
        for (int i = 0; i < RN; i++) rd_x[i] = 7'($urandom_range(0, 63));
        for (int m = 0; m < RM - RR; m++)
          case ($urandom_range(0, 2))
            0: rd_eta[m] = '0;
            1: rd_eta[m] = 20'($urandom_range(0, 600) - 300);
            default: rd_eta[m] = 20'(-$urandom_range(2000, 60000));
          endcase
        for (int m = 0; m < RM; m++) begin
          int y;
          y = 0;
          for (int i = 0; i < RN; i++) y += int'(rd_x[i]) * wm[m][i];
          if (m >= RR) begin
            int e; e = int'(rd_eta[m-RR]);
            if (e > 300 || e < -300) begin exp_corr++; m_rd_corr++; end
            else begin y += e; m_rd_pass++; end
          end
          ez[m] = (y + bias[m] < 0) ? 0 : y + bias[m];
          if (v == 0) acc[m] = ez[m];
          else if (rd_pool_mode == POOL_AVG) acc[m] += ez[m];
          else if (ez[m] > acc[m]) acc[m] = ez[m];
        end
        for (int m = 0; m < RM; m++) zq.push_back(ez[m]);
        @(negedge clk);
      end
      for (int m = 0; m < RM; m++) if (rd_pool_mode == POOL_AVG) acc[m] = acc[m] >>> 2;
      for (int m = 0; m < RM; m++) pq.push_back(acc[m]);
      if (rd_pool_mode == POOL_AVG) m_rd_avg++; else m_rd_max++;
      rd_x_valid = 0;
      repeat (3) @(negedge clk);
    end
    `TB_CHECK(int'(rd_n_corrected) == exp_corr, "RD: correction counter")
    `TB_CHECK(n_z_seen == 400 && n_p_seen == 100, "RD: all outputs produced")
    rd_fin = 1;
  end

  // ---------------- reset and end of test
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    wait (boa_done && pn_fin && rd_fin);
    `TB_CHECK(m_lock > 0, "mechanism: PRBS lock")
    `TB_CHECK(m_le_adapt > 0, "mechanism: equalizer adaptation")
    `TB_CHECK(m_sweep >= 3, "mechanism: DAC threshold sweeps")
    `TB_CHECK(m_mode_switch > 0, "mechanism: CUA to BOA switch")
    `TB_CHECK(m_lvl_lms > 0, "mechanism: LMS level update")
    `TB_CHECK(m_lvl_amber > 0, "mechanism: AMBER level update")
    `TB_CHECK(m_thr_set == NCMP, "mechanism: thresholds reach the comparators")
    `TB_CHECK(m_pn_skip > 0, "mechanism: PN skip")
    `TB_CHECK(m_pn_full > 0, "mechanism: PN full computation")
    `TB_CHECK(m_rd_corr > 0, "mechanism: RD-SEC correction")
    `TB_CHECK(m_rd_pass > 0, "mechanism: RD-SEC pass-through")
    `TB_CHECK(m_rd_max > 0, "mechanism: max pooling")
    `TB_CHECK(m_rd_avg > 0, "mechanism: average pooling")
    $display("mechanisms: lock %0d le %0d sweeps %0d switch %0d lms %0d amber %0d thr %0d pn_skip %0d pn_full %0d rd_corr %0d rd_pass %0d max %0d avg %0d",
             m_lock, m_le_adapt, m_sweep, m_mode_switch, m_lvl_lms, m_lvl_amber, m_thr_set,
             m_pn_skip, m_pn_full, m_rd_corr, m_rd_pass, m_rd_max, m_rd_avg);
    `TB_FINISH
  end
endmodule
