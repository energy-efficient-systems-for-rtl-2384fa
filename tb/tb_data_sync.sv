// Data sync test: a PRBS 2^23-1 stream (generated here as a Fibonacci LFSR)
// starting at a random point must be locked onto within five words, after which
// the reference equals the stream; a word with 4 errors keeps lock and reports
// 4 mismatches; one garbage word is tolerated, two in a row drop lock; clean data locks again.
`include "tb_common.svh"
module tb_data_sync;
  localparam int L = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic dec [L];
  logic ref_bit [L];
  logic locked;
  logic [5:0] mismatches;
  logic [22:0] lfsr;
  data_sync #(.LANES(L)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; `TB_FINISH end

  function automatic logic prbs_next();
    logic b;
    b = lfsr[22] ^ lfsr[17];         // x^23 + x^18 + 1
    lfsr = {lfsr[21:0], b};
    return b;
  endfunction

  task automatic word(input int nerr, input bit garbage, output int mism_ref);
    logic d [L];
    @(negedge clk);
    for (int j = 0; j < L; j++) d[j] = prbs_next();
    for (int j = 0; j < L; j++) dec[j] = garbage ? 1'($urandom) : d[j];
    for (int j = 0; j < nerr; j++) dec[5 + 6 * j] = ~dec[5 + 6 * j];
    en = 1; #1;
    mism_ref = 0;
    for (int j = 0; j < L; j++) mism_ref += int'(ref_bit[j] != d[j]);
    if (nerr > 0 && locked) `TB_CHECK(int'(mismatches) == nerr, "errored word reports its errors")
    @(posedge clk); #1; en = 0;
  endtask

  initial begin
    int m, lock_words;
    lfsr = 23'($urandom) | 23'd1;
    repeat (2) @(posedge clk); rst_n = 1;
    lock_words = 0;
    while (!locked && lock_words < 10) begin word(0, 0, m); lock_words++; end
    `TB_CHECK(locked && lock_words <= 5, "lock within five words")
    for (int i = 0; i < 20; i++) begin
      word(0, 0, m);
      `TB_CHECK(m == 0 && locked, "reference follows the PRBS")
    end
    @(negedge clk);
    word(4, 0, m);
    `TB_CHECK(locked && m == 0, "four errors keep lock")
    word(0, 1, m);
    `TB_CHECK(locked, "one garbage word is tolerated")
    word(0, 0, m);
    `TB_CHECK(locked && m == 0, "reference still right after one bad word")
    word(0, 1, m);
    word(0, 1, m);
    `TB_CHECK(!locked, "two garbage words drop lock")
    for (int i = 0; i < 5; i++) word(0, 0, m);
    `TB_CHECK(locked, "relock on clean data")
    word(0, 0, m);
    `TB_CHECK(m == 0, "reference correct after relock")
    `TB_FINISH
  end

  // mismatch output during the 3-error word
  always @(posedge clk) if (en && locked && rst_n) begin
    int n; n = 0;
    for (int j = 0; j < L; j++) n += int'(ref_bit[j] != dec[j]);
    `TB_CHECK(int'(mismatches) == n, "mismatch count")
  end
endmodule
