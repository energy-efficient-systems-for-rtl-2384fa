// Level encoder test: CUA mode gives the uniform mid-point levels, BOA mode
// returns the programmed level of each 3-bit code.
`include "tb_common.svh"
module tb_level_encoder;
  import boa_pkg::*;
  localparam int L = 40;
  int checks = 0, failures = 0;
  adc_mode_e mode;
  code_t code [L];
  lvl_t boa_lvl [NLEV];
  lvl_t xr [L];
  level_encoder #(.LANES(L)) dut (.*);
  initial begin
    for (int i = 0; i < NLEV; i++) boa_lvl[i] = lvl_t'($urandom);
    for (int j = 0; j < L; j++) code[j] = code_t'(j % 16);
    mode = MODE_CUA4; #1;
    for (int j = 0; j < L; j++) `TB_CHECK(int'(xr[j]) == (2 * (j % 16) - 15) * 8 * 16, "CUA level")
    mode = MODE_BOA3;
    for (int j = 0; j < L; j++) code[j] = code_t'($urandom_range(0, 7));
    #1;
    for (int j = 0; j < L; j++) `TB_CHECK(xr[j] == boa_lvl[code[j]], "BOA level lookup")
    `TB_FINISH
  end
endmodule
