// Threshold DAC model test: repeated two-phase updates of capacitor pairs must
// converge each differential threshold to C[2k] - C[2k+1], and a single update
// must move a capacitor by a quarter of the way (charge sharing).
`include "tb_common.svh"
module tb_threshold_dac_model;
  import boa_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, phi1 = 0, phi2 = 0;
  logic [7:0] code = 128;
  logic [4:0] addr = 0;
  thr_t vth [NCMP];
  int tgt [NCMP];
  threshold_dac_model dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; `TB_FINISH end
  task automatic upd(input int a, input int c);
    @(negedge clk); addr = 5'(a); code = 8'(c); phi1 = 1;
    @(negedge clk); phi1 = 0;
    @(negedge clk); phi2 = 1;
    @(negedge clk); phi2 = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < NCMP; k++) `TB_CHECK(vth[k] == 0, "reset thresholds are zero")
    // one update of C[0] to 192 from 128: moves by 16 -> threshold 16
    upd(0, 192);
    `TB_CHECK(vth[0] == 16, "single charge-sharing step moves 1/4 of the way")
    for (int k = 0; k < NCMP; k++) tgt[k] = int'($urandom_range(0, 120)) - 60;
    for (int it = 0; it < 40; it++)
      for (int k = 0; k < NCMP; k++) begin
        upd(2*k,   128 + (tgt[k] >>> 1));
        upd(2*k+1, 128 - (tgt[k] - (tgt[k] >>> 1)));
      end
    for (int k = 0; k < NCMP; k++) `TB_CHECK(int'(vth[k]) == tgt[k], "threshold converges to code difference")
    `TB_FINISH
  end
endmodule
