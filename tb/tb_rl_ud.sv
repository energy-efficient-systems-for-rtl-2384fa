// RL-UD test for level 3: random code windows, taps, errors and error flags;
// the level step is recomputed here for both the LMS and the AMBER rule. Also
// checks the uniform reset value, hold when en is low, and load.
`include "tb_common.svh"
module tb_rl_ud;
  import boa_pkg::*;
  localparam int L = 40, IDX = 3, LS = 24, AS = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, load = 0;
  upd_alg_e alg;
  lvl_t init_lvl, lvl;
  code_t code_win [L][NTAPS];
  tap_t w [NTAPS];
  logic signed [Y_W:0] e [L];
  logic err [L];
  rl_ud #(.LANES(L), .LVL_IDX(IDX), .LMS_SHIFT(LS), .AMBER_SHIFT(AS)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; `TB_FINISH end
  initial begin
    alg = UPD_LMS; init_lvl = 12'sd100;
    for (int k = 0; k < NTAPS; k++) w[k] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    #1 `TB_CHECK(int'(lvl) == (2 * IDX - 7) * 16 * 16, "reset to uniform 3-bit grid")
    for (int it = 0; it < 60; it++) begin
      longint step, lvl_prev;
      @(negedge clk);
      alg = (it % 2) ? UPD_AMBER : UPD_LMS;
      en  = (it % 5 != 4);
      for (int k = 0; k < NTAPS; k++) w[k] = tap_t'(int'($urandom_range(0, 8000)) - 2000);
      for (int j = 0; j < L; j++) begin
        for (int k = 0; k < NTAPS; k++) code_win[j][k] = code_t'($urandom_range(0, 7));
        e[j]   = (Y_W+1)'(int'($urandom_range(0, 2000)) - 1000);
        err[j] = ($urandom_range(0, 3) == 0);
      end
      step = 0;
      for (int j = 0; j < L; j++) begin
        longint s; s = 0;
        for (int k = 0; k < NTAPS; k++) if (int'(code_win[j][k]) == IDX) s += longint'(w[k]);
        if (alg == UPD_LMS) step += longint'(e[j]) * s;
        else if (err[j])    step += (e[j] < 0) ? -s : s;
      end
      step = (alg == UPD_LMS) ? (step >>> LS) : (step >>> AS);
      lvl_prev = longint'(lvl);
      @(posedge clk); #1;
      if (en) `TB_CHECK(longint'(lvl) == lvl_prev + step, "level step")
      else    `TB_CHECK(longint'(lvl) == lvl_prev, "level holds when disabled")
    end
    @(negedge clk); load = 1; @(posedge clk); #1;
    `TB_CHECK(lvl == init_lvl, "load")
    `TB_FINISH
  end
endmodule
