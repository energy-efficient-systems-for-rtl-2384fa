// Flash ADC model test: random rising thresholds and samples; the thermometer
// code must appear three cycles after the sample and match a direct compare.
`include "tb_common.svh"
module tb_flash_adc_model;
  import boa_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic signed [7:0] vin;
  thr_t vth [NCMP];
  logic [NCMP-1:0] therm;
  logic [NCMP-1:0] hist [4];
  flash_adc_model dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; `TB_FINISH end
  initial begin
    for (int k = 0; k < NCMP; k++) vth[k] = thr_t'(16 * k - 112);
    vin = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (i % 100 == 50) for (int k = 0; k < NCMP; k++) vth[k] = thr_t'(-120 + 15 * k + int'($urandom_range(0, 5)));
      vin = 8'($urandom);
      for (int k = 0; k < NCMP; k++) hist[0][k] = (vin > vth[k]);
      @(posedge clk); #1;
      if (i >= 3 && (i % 100 < 50 || i % 100 > 53)) `TB_CHECK(therm == hist[2], "thermometer code after the 3-latch pipeline")
      for (int s = 3; s > 0; s--) hist[s] = hist[s-1];
    end
    `TB_FINISH
  end
endmodule
