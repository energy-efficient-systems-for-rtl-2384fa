// Pipelined thermometer-to-binary encoder of the flash ADC, in three steps with
// a register after each: (1) the thermometer code is turned into a 1-of-N code by
// marking the single 1->0 transition, (2) the 1-of-N code is turned into Gray code
// by OR-ing, for every Gray bit, the positions whose Gray code has that bit set,
// (3) the Gray code is turned into binary with a chain of XOR gates.
// Because each Gray bit is an OR of one-hot lines, a bubble in the thermometer
// code (two transitions) gives a code near the true one rather than a wild one.
// Latency: 3 clock cycles, one result per cycle.
// The thermometer -> one-of-N -> Gray -> binary chain with registers between the
// steps follows the described encoder; the exact register placement is this
// design's choice.
module gray_encoder #(
  parameter int unsigned B = 4                    // output bits
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [(1<<B)-2:0] therm,                // bit i: input above threshold i
  output logic [B-1:0]      bin
);
  localparam int unsigned N = 1 << B;
  logic [N-1:0] onehot_q;
  logic [B-1:0] gray_q;
  logic [N-1:0] onehot;
  logic [B-1:0] gray, binv;

  always_comb begin
    onehot[0]   = ~therm[0];
    onehot[N-1] = therm[N-2];
    for (int i = 1; i < N-1; i++) onehot[i] = therm[i-1] & ~therm[i];
  end

  always_comb begin
    gray = '0;
    for (int i = 0; i < N; i++) begin
      logic [B-1:0] gi;
      gi = B'(i) ^ (B'(i) >> 1);
      for (int b = 0; b < B; b++)
        if (gi[b]) gray[b] = gray[b] | onehot_q[i];
    end
  end

  always_comb begin
    binv[B-1] = gray_q[B-1];
    for (int b = B-2; b >= 0; b--) binv[b] = binv[b+1] ^ gray_q[b];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      onehot_q <= '0;
      gray_q   <= '0;
      bin      <= '0;
    end else begin
      onehot_q <= onehot;
      gray_q   <= gray;
      bin      <= binv;
    end
  end
endmodule
