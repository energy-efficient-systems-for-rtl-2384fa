// Top level holding the three designs side by side; they share nothing but the
// clock and reset:
//   * boa_*  : BER-optimal ADC serial-link receiver (flash ADC, threshold DAC,
//              encoder, equalizer, PRBS synchronisation, level/threshold update)
//   * pn_*   : PredictiveNet output unit (zero prediction from MSBs, C-LSB skip)
//   * rd_*   : one RD-SEC protected MVM-based CNN stage (C-layer + S-layer)
// All parameters default to the configuration the designs are described with.
module eesys_top
  import boa_pkg::*;
  import rdsec_pkg::*;
#(
  parameter int unsigned LANES   = 40,
  parameter int unsigned DAC_DIV = 83,
  parameter int unsigned PN_N    = 25,
  parameter int unsigned RD_N    = 25,
  parameter int unsigned RD_M    = 32,
  parameter int unsigned RD_BOUT = 7 + 8 + $clog2(RD_N)
) (
  input  logic              clk,
  input  logic              rst_n,
  // ---- BOA receiver
  input  logic signed [7:0] boa_vin,
  input  adc_mode_e         boa_mode,
  input  upd_alg_e          boa_alg,
  input  logic              boa_le_adapt,
  input  logic              boa_qlud_en,
  input  logic              boa_lvl_load,
  input  lvl_t              boa_lvl_init [NLEV],
  output logic              boa_locked,
  output logic              boa_word_valid,
  output logic              boa_dec [LANES],
  output y_t                boa_yhat [LANES],
  output logic [$clog2(LANES+1)-1:0] boa_sync_mismatches,
  output logic              boa_dac_sweep_done,
  output tap_t              boa_w   [NTAPS],
  output lvl_t              boa_lvl [NLEV],
  output thr_t              boa_thr [NCMP],
  output logic [31:0]       boa_bit_count,
  output logic [31:0]       boa_err_count,
  // ---- PredictiveNet unit
  input  logic              pn_start,
  output logic              pn_ready,
  input  logic signed [6:0] pn_x [PN_N],
  input  logic signed [7:0] pn_w [PN_N],
  input  logic signed [6:0] pn_delta,
  output logic              pn_done,
  output logic              pn_skipped,
  output logic [7+8+$clog2(PN_N)+1:0] pn_z,
  output logic [31:0]       pn_n_skip,
  output logic [31:0]       pn_n_full,
  // ---- RD-SEC CNN stage
  input  logic              rd_w_wr,
  input  logic [$clog2(RD_M)-1:0] rd_w_m,
  input  logic [$clog2(RD_N)-1:0] rd_w_n,
  input  logic signed [7:0] rd_w_data,
  input  logic              rd_c_wr,
  input  logic [$clog2((RD_M-RD_N) > 1 ? (RD_M-RD_N) : 2)-1:0] rd_c_m,
  input  logic [$clog2(RD_N)-1:0] rd_c_r,
  input  pow2_coef_t        rd_c_data,
  input  logic              rd_b_wr,
  input  logic [$clog2(RD_M)-1:0] rd_b_m,
  input  logic signed [RD_BOUT-1:0] rd_b_data,
  input  logic [RD_BOUT-1:0] rd_th,
  input  pool_mode_e        rd_pool_mode,
  input  logic              rd_x_valid,
  input  logic signed [6:0] rd_x [RD_N],
  input  logic signed [RD_BOUT-1:0] rd_eta [RD_M-RD_N],
  output logic              rd_z_valid,
  output logic signed [RD_BOUT-1:0] rd_z [RD_M],
  output logic [31:0]       rd_n_corrected,
  output logic              rd_p_valid,
  output logic signed [RD_BOUT-1:0] rd_p [RD_M]
);
  boa_receiver #(.LANES(LANES), .DAC_DIV(DAC_DIV)) u_boa (
    .clk, .rst_n, .vin(boa_vin), .mode(boa_mode), .alg(boa_alg), .le_adapt(boa_le_adapt),
    .qlud_en(boa_qlud_en), .lvl_load(boa_lvl_load), .lvl_init(boa_lvl_init),
    .locked(boa_locked), .word_valid(boa_word_valid), .dec(boa_dec), .yhat(boa_yhat),
    .sync_mismatches(boa_sync_mismatches), .dac_sweep_done(boa_dac_sweep_done),
    .w(boa_w), .lvl(boa_lvl), .thr_adc(boa_thr), .bit_count(boa_bit_count),
    .err_count(boa_err_count));

  predictivenet_unit #(.N(PN_N), .BX(7), .BW(8), .BD(7)) u_pn (
    .clk, .rst_n, .start(pn_start), .ready(pn_ready), .x(pn_x), .w(pn_w), .delta(pn_delta),
    .done(pn_done), .skipped(pn_skipped), .z(pn_z), .n_skip(pn_n_skip), .n_full(pn_n_full));

  rdsec_cnn_stage #(.N(RD_N), .M(RD_M), .R(RD_N), .BIN(7), .BW(8), .POOL(4), .BOUT(RD_BOUT)) u_rd (
    .clk, .rst_n, .w_wr(rd_w_wr), .w_m(rd_w_m), .w_n(rd_w_n), .w_data(rd_w_data),
    .c_wr(rd_c_wr), .c_m(rd_c_m), .c_r(rd_c_r), .c_data(rd_c_data),
    .b_wr(rd_b_wr), .b_m(rd_b_m), .b_data(rd_b_data), .th(rd_th), .pool_mode(rd_pool_mode),
    .x_valid(rd_x_valid), .x(rd_x), .eta(rd_eta), .z_valid(rd_z_valid), .z(rd_z),
    .n_corrected(rd_n_corrected), .p_valid(rd_p_valid), .p(rd_p));
endmodule
