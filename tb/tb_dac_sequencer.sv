// DAC sequencer test (DIV = 2): phases never overlap, every slot addresses the
// next capacitor, codes of each pair differ by the requested threshold, idle
// slots carry mid-scale, and a sweep takes 32 slots x 4 quarters x DIV cycles.
`include "tb_common.svh"
module tb_dac_sequencer;
  import boa_pkg::*;
  localparam int DIV = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  thr_t thr [NCMP];
  logic phi1, phi2, sweep_done;
  logic [7:0] code;
  logic [4:0] addr;
  int codes [32];
  int t_sweep [$];
  dac_sequencer #(.DIV(DIV)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; `TB_FINISH end
  always @(posedge clk) if (rst_n) begin
    if (phi1 && phi2) begin checks++; failures++; $display("FAIL phases overlap"); end
    if (phi1) codes[addr] = int'(code);
    if (sweep_done) t_sweep.push_back($time / 10);
  end
  initial begin
    for (int k = 0; k < NCMP; k++) thr[k] = thr_t'(int'($urandom_range(0, 250)) - 125);
    repeat (2) @(posedge clk); rst_n = 1;
    wait (t_sweep.size() == 3);
    `TB_CHECK(t_sweep[2] - t_sweep[1] == 32 * 4 * DIV, "sweep period = 32 slots")
    for (int k = 0; k < NCMP; k++) begin
      `TB_CHECK(codes[2*k] - codes[2*k+1] == int'(thr[k]), "pair difference equals threshold")
      `TB_CHECK(codes[2*k] >= 64 && codes[2*k] <= 192, "positive code in range")
    end
    `TB_CHECK(codes[30] == 128 && codes[31] == 128, "idle slots carry mid-scale")
    `TB_FINISH
  end
endmodule
