// Deserializer test: a counting stream must come out as words of 40 consecutive
// samples, lane 0 oldest, with exactly one word_valid per 40 samples.
`include "tb_common.svh"
module tb_lane_deserializer;
  localparam int L = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [3:0] din = 0;
  logic [3:0] word [L];
  logic word_valid;
  int nwords = 0, sent = 0, lastv = -1;
  lane_deserializer #(.LANES(L), .W(4)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; `TB_FINISH end
  always @(posedge clk) if (word_valid) begin
    for (int j = 0; j < L; j++) `TB_CHECK(int'(word[j]) == ((nwords * L + j) % 16), "lane order")
    if (lastv >= 0) `TB_CHECK(int'($time) - lastv == L * 10, "one word per 40 samples")
    lastv = int'($time);
    nwords++;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 5 * L; i++) begin
      @(negedge clk); in_valid = 1; din = 4'(i % 16);
      @(posedge clk); sent++;
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(posedge clk);
    `TB_CHECK(nwords == 5, "five words")
    `TB_FINISH
  end
endmodule
