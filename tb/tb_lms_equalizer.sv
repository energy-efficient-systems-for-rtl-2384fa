// LMS equalizer test. A 3-tap ISI channel with cursor on the middle tap feeds
// the equalizer; the testbench recomputes y, e and the error flag of every lane
// from the current taps (including the two samples carried over from the
// previous word), recomputes the block-LMS tap update, and checks that the mean
// squared error after adaptation is well below its starting value.
`include "tb_common.svh"
module tb_lms_equalizer;
  import boa_pkg::*;
  localparam int L = 40, MU = 16, TGT = 32 << LVL_F;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, adapt = 0, ref_ok = 1;
  lvl_t xr [L];
  logic ref_bit [L];
  y_t y [L];
  logic dec [L];
  logic signed [Y_W:0] e [L];
  logic err [L];
  tap_t w [NTAPS];
  lms_equalizer #(.LANES(L), .MU_SHIFT(MU), .TARGET(TGT)) dut (.*);
  always #5 clk = ~clk;
  initial begin #10000000; failures++; `TB_FINISH end

  int bits [$];
  longint xh [L + 2];       // [0..1] previous word, [2..] current word
  longint prev [2];
  real mse_first, mse_last;

  initial begin
    prev[0] = 0; prev[1] = 0;
    for (int i = 0; i < 3; i++) bits.push_back(1);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int wd = 0; wd < 400; wd++) begin
      longint exp_w [NTAPS];
      real mse;
      @(negedge clk);
      for (int j = 0; j < L; j++) begin
        int b0, b1, b2, n;
        bits.push_back(int'($urandom_range(0, 1)));
        n = bits.size() - 1;
        b0 = bits[n] ? 1 : -1; b1 = bits[n-1] ? 1 : -1; b2 = bits[n-2] ? 1 : -1;
        // channel: 0.3, 1.0, 0.45 times 24 LSB, levels in 1/16 LSB
        xr[j] = lvl_t'((b0 * 115 + b1 * 384 + b2 * 173) + int'($urandom_range(0, 32)) - 16);
        ref_bit[j] = bits[n-1][0];
      end
      adapt = (wd >= 5);
      en = 1;
      #1;
      xh[0] = prev[1]; xh[1] = prev[0];
      for (int j = 0; j < L; j++) xh[j+2] = longint'(xr[j]);
      mse = 0;
      for (int k = 0; k < NTAPS; k++) exp_w[k] = longint'(w[k]);
      for (int j = 0; j < L; j++) begin
        longint acc, ey; int t;
        acc = 0;
        for (int k = 0; k < NTAPS; k++) acc += longint'(w[k]) * xh[j + 2 - k];
        ey = acc >>> TAP_F;
        t  = ref_bit[j] ? TGT : -TGT;
        if (wd % 50 == 0 || wd < 10) begin
          `TB_CHECK(longint'(y[j]) == ey, "equalizer output")
          `TB_CHECK(longint'(e[j]) == longint'(t) - ey, "estimation error")
          `TB_CHECK(err[j] == ((ey >= 0) != ref_bit[j]), "bit error indicator")
        end
        mse += real'((longint'(t) - ey) * (longint'(t) - ey));
      end
      if (adapt)
        for (int k = 0; k < NTAPS; k++) begin
          longint g; g = 0;
          for (int j = 0; j < L; j++) g += (longint'(t_of(j)) - est(j)) * xh[j + 2 - k];
          exp_w[k] += g >>> MU;
        end
      if (wd == 0) mse_first = mse / L;
      mse_last = mse / L;
      @(posedge clk); #1;
      if (wd % 50 == 0 || wd < 10)
        for (int k = 0; k < NTAPS; k++) `TB_CHECK(longint'(w[k]) == exp_w[k], "tap update")
      prev[0] = longint'(xr[L-1]); prev[1] = longint'(xr[L-2]);
    end
    $display("mse first %f last %f, taps %0d %0d %0d", mse_first, mse_last, w[0], w[1], w[2]);
    `TB_CHECK(mse_last < 0.25 * mse_first, "adaptation reduces the MSE")
    `TB_FINISH
  end

  function automatic int t_of(int j);
    return ref_bit[j] ? TGT : -TGT;
  endfunction
  function automatic longint est(int j);
    longint acc; acc = 0;
    for (int k = 0; k < NTAPS; k++) acc += longint'(w[k]) * xh[j + 2 - k];
    return acc >>> TAP_F;
  endfunction
endmodule
