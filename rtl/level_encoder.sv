// Back-end encoder (ENC): maps each ADC code of a word to the two's complement
// representation level x_r the equalizer works with. In 4-bit CUA mode the
// levels are uniform, r(c) = (2c - 15) * CUA_STEP / 2, mid-points of a uniform
// staircase; in 3-bit BOA mode they are read from the level registers that the
// quantization-level update unit adapts. Purely combinational.
// Mapping codes to two's complement levels follows the description; the uniform
// level spacing in 4-bit mode is this design's choice.
module level_encoder
  import boa_pkg::*;
#(
  parameter int unsigned LANES    = 40,
  parameter int          CUA_STEP = 16 << LVL_F   // CUA step, LVL_F fraction bits
) (
  input  adc_mode_e mode,
  input  code_t     code [LANES],
  input  lvl_t      boa_lvl [NLEV],
  output lvl_t      xr [LANES]
);
  always_comb
    for (int j = 0; j < LANES; j++)
      if (mode == MODE_BOA3) xr[j] = boa_lvl[code[j][BOA_BITS-1:0]];
      else                   xr[j] = lvl_t'(((2 * int'(code[j]) - 15) * CUA_STEP) / 2);
endmodule
