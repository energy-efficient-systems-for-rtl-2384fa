// QL-UD test: the seven thresholds are the rounded mid-points of neighbouring
// levels (with saturation), the codes of the previous word feed the first lanes
// of the next (checked through one LMS step of level 5 recomputed here), en
// gates the update and load writes all levels.
`include "tb_common.svh"
module tb_ql_ud;
  import boa_pkg::*;
  localparam int L = 40, LS = 24;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, word_valid = 0, en = 0, load = 0;
  upd_alg_e alg = UPD_LMS;
  lvl_t init_lvl [NLEV], lvl [NLEV];
  code_t code [L];
  tap_t w [NTAPS];
  logic signed [Y_W:0] e [L];
  logic err [L];
  thr_t thr [NLEV-1];
  int prevc [2];
  ql_ud #(.LANES(L), .LMS_SHIFT(LS)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; `TB_FINISH end

  task automatic check_thr();
    for (int i = 0; i < NLEV - 1; i++) begin
      int m;
      m = (int'(lvl[i]) + int'(lvl[i+1]) + 16) >>> 5;
      if (m > 127) m = 127; if (m < -128) m = -128;
      `TB_CHECK(int'(thr[i]) == m, "threshold is mid-point of levels")
    end
  endtask

  initial begin
    for (int i = 0; i < NLEV; i++) init_lvl[i] = lvl_t'(int'($urandom_range(0, 4000)) - 2000);
    init_lvl[7] = 12'sd2047; init_lvl[6] = 12'sd2040;   // saturating pair
    for (int k = 0; k < NTAPS; k++) w[k] = tap_t'(int'($urandom_range(0, 6000)) - 1000);
    prevc[0] = 0; prevc[1] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    #1 check_thr();
    @(negedge clk); load = 1; @(posedge clk); #1 load = 0;
    for (int i = 0; i < NLEV; i++) `TB_CHECK(lvl[i] == init_lvl[i], "load")
    check_thr();
    for (int wd = 0; wd < 30; wd++) begin
      longint step, lvl_prev;
      int cw [L + 2];
      @(negedge clk);
      en = (wd % 3 != 2);
      for (int j = 0; j < L; j++) begin
        code[j] = code_t'($urandom_range(0, 7));
        e[j] = (Y_W+1)'(int'($urandom_range(0, 4000)) - 2000);
        err[j] = 1'b0;
      end
      cw[0] = prevc[1]; cw[1] = prevc[0];
      for (int j = 0; j < L; j++) cw[j+2] = int'(code[j]);
      step = 0;
      for (int j = 0; j < L; j++) begin
        longint s; s = 0;
        for (int k = 0; k < NTAPS; k++) if (cw[j + 2 - k] == 5) s += longint'(w[k]);
        step += longint'(e[j]) * s;
      end
      step = step >>> LS;
      lvl_prev = longint'(lvl[5]);
      word_valid = 1;
      @(posedge clk); #1 word_valid = 0;
      if (en) `TB_CHECK(longint'(lvl[5]) == lvl_prev + step, "level 5 step across word boundary")
      else    `TB_CHECK(longint'(lvl[5]) == lvl_prev, "levels hold when disabled")
      check_thr();
      prevc[0] = int'(code[L-1]); prevc[1] = int'(code[L-2]);
    end
    `TB_FINISH
  end
endmodule
