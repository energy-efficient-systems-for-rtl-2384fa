// Test of the PredictiveNet unit with random operands whose bias is drawn so
// that both signs of the output are common. For every output it checks: the
// skip decision equals the sign of the MSB-only dot product (recomputed here),
// skipped outputs are zero, computed outputs equal ReLU of the exact dot
// product, the latency is one cycle when skipped and two otherwise, ready is
// low while busy, and the skip/full counters. It also reports how often the
// MSB prediction zeroes an output whose exact value was positive.
`include "tb_common.svh"
module tb_predictivenet_unit;
  localparam int N = 25;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, ready, done, skipped;
  logic signed [6:0] x [N];
  logic signed [7:0] w [N];
  logic signed [6:0] delta;
  logic [21:0] z;
  logic [31:0] n_skip, n_full;
  predictivenet_unit dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; `TB_FINISH end

  function automatic int fdiv(int a, int d);
    return (a >= 0) ? a / d : -((-a + d - 1) / d);
  endfunction

  initial begin
    int skips = 0, fulls = 0, misses = 0;
    for (int i = 0; i < N; i++) begin x[i] = '0; w[i] = '0; end
    delta = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int exact, ym, lat;
      @(negedge clk);
      `TB_CHECK(ready, "ready when idle")
      for (int i = 0; i < N; i++) begin
        x[i] = 7'($urandom_range(0, 63));        // post-ReLU activations
        w[i] = 8'($urandom);
      end
      delta = 7'($urandom);
      exact = int'(delta) * 128;
      ym = fdiv(int'(delta), 8) * 16;
      for (int i = 0; i < N; i++) begin
        exact += int'(w[i]) * int'(x[i]);
        ym += fdiv(int'(w[i]), 8) * fdiv(int'(x[i]), 8);
      end
      start = 1;
      @(negedge clk); start = 0;
      lat = 0;
      while (!done && lat < 10) begin
        `TB_CHECK(!ready, "busy while computing")
        @(negedge clk); lat++;
      end
      if (ym < 0) begin
        skips++;
        if (exact > 0) misses++;
        `TB_CHECK(skipped && z == 0, "predicted-negative output skipped and zero")
        `TB_CHECK(lat == 1, $sformatf("skip latency %0d", lat))
      end else begin
        fulls++;
        `TB_CHECK(!skipped, "predicted-positive output computed")
        `TB_CHECK(int'(z) == (exact > 0 ? exact : 0), $sformatf("z %0d expected %0d", z, exact))
        `TB_CHECK(lat == 2, $sformatf("full latency %0d", lat))
      end
    end
    `TB_CHECK(int'(n_skip) == skips && int'(n_full) == fulls, "outcome counters")
    `TB_CHECK(skips > 50 && fulls > 50, "both outcomes exercised")
    $display("skipped %0d, computed %0d, positive outputs zeroed by prediction %0d", skips, fulls, misses);
    `TB_FINISH
  end
endmodule
