// Quantization-level update unit (QL-UD). It holds the NLEV = 2^B_o BOA
// representation levels, one RL-UD unit per level, and derives the BOA
// thresholds as mid-points of neighbouring levels, t_i = (r_i + r_{i+1}) / 2,
// rounded to the DAC's 8-bit grid and saturated. It keeps the last NTAPS-1 codes
// of the previous word so that every lane sees the codes of all equalizer taps.
// en gates the whole unit: once the levels have converged it can be switched off
// and the levels simply hold. load writes init_lvl into all levels.
// Timing: levels change on the clock edge after a word with en high; thresholds
// follow combinationally.
// The mid-point thresholds and one update unit per level follow the description;
// rounding to the 8-bit DAC grid is this design's choice.
module ql_ud
  import boa_pkg::*;
#(
  parameter int unsigned LANES       = 40,
  parameter int unsigned LMS_SHIFT   = 24,
  parameter int unsigned AMBER_SHIFT = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 word_valid,
  input  logic                 en,
  input  upd_alg_e             alg,
  input  logic                 load,
  input  lvl_t                 init_lvl [NLEV],
  input  code_t                code     [LANES],
  input  tap_t                 w        [NTAPS],
  input  logic signed [Y_W:0]  e        [LANES],
  input  logic                 err      [LANES],
  output lvl_t                 lvl      [NLEV],
  output thr_t                 thr      [NLEV-1]
);
  code_t chist [NTAPS-1];    // [0] = newest code of the previous word
  code_t code_win [LANES][NTAPS];

  always_comb
    for (int j = 0; j < LANES; j++)
      for (int k = 0; k < NTAPS; k++)
        code_win[j][k] = (j - k >= 0) ? code[j-k] : chist[k-j-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int k = 0; k < NTAPS-1; k++) chist[k] <= '0;
    else if (word_valid)
      for (int k = 0; k < NTAPS-1; k++) chist[k] <= code[LANES-1-k];
  end

  for (genvar i = 0; i < NLEV; i++) begin : g_rl
    rl_ud #(.LANES(LANES), .LVL_IDX(i), .LMS_SHIFT(LMS_SHIFT), .AMBER_SHIFT(AMBER_SHIFT)) u_rl (
      .clk, .rst_n, .en(en && word_valid), .alg, .load, .init_lvl(init_lvl[i]),
      .code_win, .w, .e, .err, .lvl(lvl[i])
    );
  end

  for (genvar i = 0; i < NLEV-1; i++) begin : g_thr
    logic signed [LVL_W+1:0] sum;
    always_comb begin
      sum = (LVL_W+2)'(lvl[i]) + (LVL_W+2)'(lvl[i+1]) + (LVL_W+2)'(1 << LVL_F);  // round
      sum = sum >>> (LVL_F + 1);
      if (sum > 127)       thr[i] = 8'sd127;
      else if (sum < -128) thr[i] = -8'sd128;
      else                 thr[i] = thr_t'(sum);
    end
  end
endmodule
