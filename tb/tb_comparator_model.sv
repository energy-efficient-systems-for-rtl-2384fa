// Comparator model test: random samples and thresholds; the decision must equal
// (vin > vth) exactly three cycles later.
`include "tb_common.svh"
module tb_comparator_model;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic signed [7:0] vin, vth;
  logic dout;
  logic exp_q [$];
  comparator_model dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; `TB_FINISH end
  initial begin
    vin = 0; vth = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      vin = 8'($urandom); vth = (i % 7 == 0) ? vin : 8'($urandom);
      exp_q.push_back(vin > vth);
      @(posedge clk); #1;
      if (exp_q.size() > 3) void'(exp_q.pop_front());
      if (exp_q.size() == 3 && i >= 3) `TB_CHECK(dout == exp_q[0], "comparator decision after 3 latches")
    end
    `TB_FINISH
  end
endmodule
