// End-to-end test of the BOA receiver. A PRBS 2^23-1 bit stream passes through
// the 20-inch backplane channel h = [0.0949 0.2539 0.1552 0.0793 0.0435 0.0356
// 0.0220] at +-300 DAC LSB drive (clipped to the 8-bit ADC input range, plus
// small uniform noise) into the flash ADC. The drive level is this test's
// choice; it makes the signal span the ADC range.
// Phase 1 runs the 4-bit uniform mode with an adapting equalizer until lock;
// phase 2 switches to the 3-bit BOA mode and adapts the levels first with LMS
// and then with AMBER; phase 3 freezes the levels and lets the DAC refresh the
// thresholds. Checks: lock, the receiver's error counter against errors counted
// here from the transmitted bits, threshold mid-points reaching the comparators
// through the DAC, parked comparators, level movement, and the BER.
`include "tb_common.svh"
module tb_boa_receiver;
  import boa_pkg::*;
  localparam int L = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic signed [7:0] vin;
  adc_mode_e mode;
  upd_alg_e alg;
  logic le_adapt, qlud_en, lvl_load;
  lvl_t lvl_init [NLEV];
  logic locked, word_valid, dac_sweep_done;
  logic dec [L];
  y_t yhat [L];
  logic [5:0] sync_mismatches;
  tap_t w [NTAPS];
  lvl_t lvl [NLEV];
  thr_t thr_adc [NCMP];
  logic [31:0] bit_count, err_count;

  boa_receiver #(.LANES(L), .DAC_DIV(2)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100000000; failures++; `TB_FINISH end

  // ---- transmitter and channel
  real h [7] = '{0.0949, 0.2539, 0.1552, 0.0793, 0.0435, 0.0356, 0.0220};
  logic [22:0] lfsr;
  bit tx [$];
  int nfed = 0;
  always @(negedge clk) begin
    real v;
    logic b;
    b = lfsr[22] ^ lfsr[17];
    lfsr = {lfsr[21:0], b};
    tx.push_back(b);
    nfed++;
    v = 0;
    for (int i = 0; i < 7; i++)
      if (tx.size() > i) v += h[i] * (tx[tx.size() - 1 - i] ? 300.0 : -300.0);
    v += real'(int'($urandom_range(0, 6)) - 3);
    if (v > 127.0) v = 127.0;           // the ADC input range clips
    if (v < -128.0) v = -128.0;
    vin = 8'(int'($rtoi(v + (v >= 0 ? 0.5 : -0.5))));
  end

  // ---- independent error count
  int kofs = -1, my_err = 0, words_locked = 0, err_base = 0;
  always @(negedge clk) begin
    int n;
    #2;
    if (word_valid && locked) begin
    if (kofs < 0) begin
      for (int k = L; k < L + 40 && kofs < 0; k++) begin
        n = 0;
        for (int j = 0; j < L; j++) n += int'(dec[j] != tx[nfed - k + j]);
        if (n <= 8) kofs = k;
      end
      err_base = int'(err_count);
      if (kofs > 0) begin
        n = 0;
        for (int j = 0; j < L; j++) n += int'(dec[j] != tx[nfed - kofs + j]);
        my_err += n;
      end
    end else begin
      n = 0;
      for (int j = 0; j < L; j++) n += int'(dec[j] != tx[nfed - kofs + j]);
      my_err += n;
      words_locked++;
    end
    end
  end

  task automatic run_words(int n);
    repeat (n * L) @(posedge clk);
  endtask

  initial begin
    int e0, e1, b0, b1;
    lvl_t lvl_start [NLEV];
    lfsr = 23'h1ABCDE;
    mode = MODE_CUA4; alg = UPD_LMS; le_adapt = 1; qlud_en = 0; lvl_load = 0;
    for (int i = 0; i < NLEV; i++) lvl_init[i] = lvl_t'((2 * i - 7) * 12 * 16);
    repeat (3) @(posedge clk); rst_n = 1;
    // phase 1: CUA; wait for lock, then keep adapting
    for (int i = 0; i < 3000 && !locked; i++) run_words(1);
    run_words(200);
    `TB_CHECK(locked, "CUA: locked to the PRBS")
    `TB_CHECK(kofs > 0, "CUA: decisions align with transmitted bits")
    `TB_CHECK(int'(err_count) - err_base == my_err, "CUA: error counter matches")
    `TB_CHECK(w[0] != 0 || w[2] != 0, "CUA: equalizer adapted")
    $display("CUA: bits %0d errors %0d taps %0d %0d %0d", bit_count, err_count, w[0], w[1], w[2]);
    // phase 2: BOA with LMS then AMBER level update
    @(negedge clk); mode = MODE_BOA3; lvl_load = 1; @(negedge clk); lvl_load = 0;
    lvl_start = lvl;
    qlud_en = 1; alg = UPD_LMS;
    run_words(400);
    alg = UPD_AMBER;
    run_words(300);
    begin
      int moved; moved = 0;
      for (int i = 0; i < NLEV; i++) moved += int'(lvl[i] != lvl_start[i]);
      `TB_CHECK(moved >= 4, "BOA: levels adapted")
    end
    // phase 3: freeze levels, let the DAC settle, measure
    qlud_en = 0;
    run_words(100);
    for (int k = 0; k < NCMP; k++) begin
      int m;
      if (k < NLEV - 1) begin
        m = (int'(lvl[k]) + int'(lvl[k+1]) + 16) >>> 5;
        if (m > 127) m = 127; if (m < -128) m = -128;
      end else m = 127;
      `TB_CHECK(int'(thr_adc[k]) == m, "BOA: comparator threshold set through the DAC")
    end
    `TB_CHECK(locked, "BOA: locked")
    e0 = int'(err_count); b0 = int'(bit_count);
    run_words(300);
    e1 = int'(err_count); b1 = int'(bit_count);
    $display("BOA: bits %0d errors %0d levels %0d %0d %0d %0d %0d %0d %0d %0d", b1 - b0, e1 - e0,
             lvl[0], lvl[1], lvl[2], lvl[3], lvl[4], lvl[5], lvl[6], lvl[7]);
    `TB_CHECK(b1 - b0 == 300 * L, "BOA: all words counted while locked")
    `TB_CHECK(e1 - e0 <= (b1 - b0) / 100, "BOA: BER below 1e-2")
    `TB_CHECK(int'(err_count) - err_base == my_err, "error counter matches over the run")
    `TB_FINISH
  end
endmodule
