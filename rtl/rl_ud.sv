// Representation-level update unit (RL-UD) for BOA level i. For every lane j it
// sums the equalizer taps whose input sample in that lane was quantised to level
// i, s[j] = sum over k with code[j-k] == i of w[k], and moves the level along the
// MSE gradient. Two update rules, chosen by alg:
//   LMS   : r_i += (sum_j e[j] * s[j])                 >>> (LMS_SHIFT)
//   AMBER : r_i += (sum_j err[j] * sgn(e[j]) * s[j])   >>> (AMBER_SHIFT)
// where err is the bit-error indicator, so AMBER only moves on detected errors.
// The per-lane contributions are summed into one step per word (this design's
// choice for the parallel back end). Reset puts the levels on a uniform 3-bit
// grid of INIT_STEP; load forces the level to init_lvl.
// Timing: the level register updates on a clock edge with en high.
module rl_ud
  import boa_pkg::*;
#(
  parameter int unsigned LANES       = 40,
  parameter int unsigned LVL_IDX     = 0,
  parameter int unsigned LMS_SHIFT   = 24,   // mu_r = 2^-(LMS_SHIFT-TAP_F)
  parameter int unsigned AMBER_SHIFT = 16,   // mu_r = 2^-(AMBER_SHIFT-TAP_F+LVL_F)
  parameter int          INIT_STEP   = 32 << LVL_F  // reset value: uniform 3-bit levels
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  upd_alg_e             alg,
  input  logic                 load,
  input  lvl_t                 init_lvl,
  input  code_t                code_win [LANES][NTAPS],   // code of x[j-k]
  input  tap_t                 w        [NTAPS],
  input  logic signed [Y_W:0]  e        [LANES],
  input  logic                 err      [LANES],
  output lvl_t                 lvl
);
  logic signed [63:0] step;

  always_comb begin
    step = '0;
    for (int j = 0; j < LANES; j++) begin
      logic signed [TAP_W+2:0] s;
      s = '0;
      for (int k = 0; k < NTAPS; k++)
        if (code_win[j][k][BOA_BITS-1:0] == BOA_BITS'(LVL_IDX)) s += (TAP_W+3)'(w[k]);
      if (alg == UPD_LMS) step += 64'(e[j]) * 64'(s);
      else if (err[j])    step += e[j][Y_W] ? -64'(s) : 64'(s);
    end
    step = (alg == UPD_LMS) ? (step >>> LMS_SHIFT) : (step >>> AMBER_SHIFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    lvl <= lvl_t'(((2 * int'(LVL_IDX) - int'(NLEV) + 1) * INIT_STEP) / 2);
    else if (load) lvl <= init_lvl;
    else if (en)   lvl <= lvl + lvl_t'(step);
  end
endmodule
