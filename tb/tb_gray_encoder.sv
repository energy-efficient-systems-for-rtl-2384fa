// Gray encoder test: every clean thermometer code gives its binary count three
// cycles later with one result per cycle; a single bubble (one missing 1 below
// the top) gives a code within 3 of the true count.
`include "tb_common.svh"
module tb_gray_encoder;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [14:0] therm;
  logic [3:0] bin;
  int exp_q [$];
  gray_encoder #(.B(4)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; `TB_FINISH end
  initial begin
    therm = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      int n;
      @(negedge clk);
      n = (i < 16) ? i : int'($urandom_range(0, 15));
      therm = 15'((32'(1) << n) - 1);
      exp_q.push_back(n);
      @(posedge clk); #1;
      if (i >= 2) begin
        `TB_CHECK(int'(bin) == exp_q[0], "binary of thermometer code, 3-cycle latency")
        void'(exp_q.pop_front());
      end
    end
    // bubbles
    for (int n = 3; n < 15; n++) begin
      int d;
      @(negedge clk);
      therm = 15'((32'(1) << n) - 1);
      therm[n-2] = 1'b0;
      repeat (4) @(posedge clk); #1;
      d = int'(bin) - n;
      if (!(d >= -3 && d <= 3)) $display("n=%0d bin=%0d", n, bin);
      `TB_CHECK(d >= -3 && d <= 3, "bubble gives a nearby code")
    end
    `TB_FINISH
  end
endmodule
