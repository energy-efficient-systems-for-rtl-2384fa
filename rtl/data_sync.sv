// Data synchronisation unit: finds where the received PRBS (2^23-1, polynomial
// x^23 + x^18 + 1) stands, so that the equalizer and the level update have the
// transmitted bit for every lane. It is a self-synchronising checker: while
// unlocked it loads the last 23 received decisions as the generator state; the
// generator then predicts the next word, b[n] = b[n-18] ^ b[n-23]. A prediction
// that misses no more than LOCK_ERRS decisions in LOCK_WORDS words running
// declares lock, so lock is possible before the equalizer has converged (a
// seed with one wrong bit predicts almost right for a word or two and then
// diverges, hence several words); while
// locked the generator free-runs from its own output, and two words running with
// more than LOSE_ERRS misses drop lock and reseed (one bad word alone is taken
// as a noise burst). ref_bit is a function of the state
// registers only, so it is available in the same cycle as the word it checks.
// The PRBS 2^23-1 reference follows the described link test; the polynomial and
// the lock and loss rules are this design's choices.
module data_sync
  import boa_pkg::*;
#(
  parameter int unsigned LANES     = 40,
  parameter int unsigned LOCK_ERRS = LANES / 10,
  parameter int unsigned LOSE_ERRS = LANES / 5,
  parameter int unsigned LOCK_WORDS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        dec     [LANES],
  output logic        ref_bit [LANES],
  output logic        locked,
  output logic [$clog2(LANES+1)-1:0] mismatches
);
  localparam int unsigned P = PRBS_LEN;
  logic [P-1:0] state;        // [P-1] = most recent bit
  logic         seeded;
  logic [$clog2(LOCK_WORDS+1)-1:0] good;   // good predictions in a row
  logic         strike;       // locked, one bad word seen
  logic [P+LANES-1:0] ext;    // generated stream, [P-1:0] = history

  initial assert (LANES >= P) else $error("data_sync needs LANES >= %0d", P);

  always_comb begin
    ext = '0;
    ext[P-1:0] = state;
    // ext index P-1-i holds bit n-1-i; generated lanes go above, oldest first
    for (int j = 0; j < LANES; j++)
      ext[P+j] = ext[P+j-18] ^ ext[P+j-23];
    for (int j = 0; j < LANES; j++) ref_bit[j] = ext[P+j];
  end

  always_comb begin
    mismatches = '0;
    for (int j = 0; j < LANES; j++) mismatches += $bits(mismatches)'(ref_bit[j] ^ dec[j]);
  end

  // last P decisions of the word as a state (bit P-1 = newest)
  function automatic logic [P-1:0] dec_state();
    logic [P-1:0] s;
    for (int i = 0; i < P; i++) s[i] = dec[LANES-P+i];
    return s;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0; seeded <= 1'b0; good <= '0; locked <= 1'b0; strike <= 1'b0;
    end else if (en) begin
      if (locked) begin
        state <= ext[P+LANES-1:LANES];
        strike <= 32'(mismatches) > LOSE_ERRS;
        if (strike && 32'(mismatches) > LOSE_ERRS) begin
          locked <= 1'b0; seeded <= 1'b0; good <= '0; strike <= 1'b0;
        end
      end else if (seeded && 32'(mismatches) <= LOCK_ERRS) begin
        locked  <= (32'(good) + 1 >= LOCK_WORDS);
        good    <= good + 1'b1;
        state   <= ext[P+LANES-1:LANES];
      end else begin
        seeded  <= 1'b1;
        good <= '0;
        state   <= dec_state();
      end
    end
  end
endmodule
