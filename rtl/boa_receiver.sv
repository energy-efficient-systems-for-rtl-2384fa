// BER-optimal ADC (BOA) serial-link receiver: analog front end models plus the
// back-end DSP. Instead of an ADC that reproduces the waveform faithfully, the
// receiver places a few ADC thresholds where they minimise the bit-error rate
// after equalization, so a 3-bit BOA can beat a 4-bit uniform ADC.
//
// Chain, all on one clock (the 4 GS/s sample clock in the real part):
//   vin -> flash_adc_model (15 comparators, 3-cycle latch pipeline)
//       -> gray_encoder (3 cycles) -> lane_deserializer (LANES codes per word)
//       -> level_encoder (code -> representation level x_r)
//       -> lms_equalizer (3 taps) <-> data_sync (PRBS reference, lock)
//       -> ql_ud (8 RL-UD units) -> thresholds -> dac_sequencer
//       -> threshold_dac_model (shared 8-bit DAC + 30 storage capacitors)
//       -> comparator thresholds.
// mode selects the 4-bit uniform ADC (CUA, fixed thresholds and levels) or the
// 3-bit BOA (7 adaptive thresholds; comparators 7..14 parked at +127). In BOA
// mode with qlud_en set, the levels adapt after every word and the thresholds
// reach the comparators through the slow DAC refresh. Error and bit counters
// measure the BER against the synchronised PRBS once data_sync is locked.
// Follows the described architecture (flash ADC with DAC-set thresholds, 40-lane
// back end, LMS equalizer, PRBS sync, level update closing the loop through the
// DAC); the single clock with a word-valid enable and the parked comparators in
// 3-bit mode are this design's choices.
module boa_receiver
  import boa_pkg::*;
#(
  parameter int unsigned LANES       = 40,
  parameter int unsigned DAC_DIV     = 83,
  parameter int unsigned MU_SHIFT    = 20,
  parameter int unsigned LMS_SHIFT   = 24,
  parameter int unsigned AMBER_SHIFT = 16,
  parameter int          CUA_STEP    = 16          // CUA threshold spacing, DAC LSB
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic signed [7:0] vin,          // channel output sample, DAC LSB units
  input  adc_mode_e         mode,
  input  upd_alg_e          alg,
  input  logic              le_adapt,
  input  logic              qlud_en,
  input  logic              lvl_load,
  input  lvl_t              lvl_init [NLEV],
  output logic              locked,
  output logic              word_valid,
  output logic              dec      [LANES],
  output y_t                yhat     [LANES],   // equalizer outputs of the word
  output logic [$clog2(LANES+1)-1:0] sync_mismatches,
  output logic              dac_sweep_done,     // all thresholds refreshed once
  output tap_t              w        [NTAPS],
  output lvl_t              lvl      [NLEV],
  output thr_t              thr_adc  [NCMP],   // thresholds seen by the comparators
  output logic [31:0]       bit_count,
  output logic [31:0]       err_count
);
  logic [NCMP-1:0] therm;
  code_t           code;
  code_t           code_w [LANES];
  lvl_t            xr     [LANES];
  logic            ref_bit[LANES];
  logic            err    [LANES];
  logic signed [Y_W:0] e  [LANES];
  thr_t            thr_boa [NLEV-1];
  thr_t            thr_tgt [NCMP];
  logic            phi1, phi2;
  logic [DAC_BITS-1:0] dac_code;
  logic [$clog2(2*NCMP+2)-1:0] dac_addr;

  flash_adc_model u_adc (.clk, .rst_n, .vin, .vth(thr_adc), .therm);
  gray_encoder #(.B(ADC_BITS)) u_genc (.clk, .rst_n, .therm, .bin(code));
  lane_deserializer #(.LANES(LANES), .W(ADC_BITS)) u_deser (
    .clk, .rst_n, .in_valid(1'b1), .din(code), .word(code_w), .word_valid);
  level_encoder #(.LANES(LANES), .CUA_STEP(CUA_STEP << LVL_F)) u_enc (
    .mode, .code(code_w), .boa_lvl(lvl), .xr);
  lms_equalizer #(.LANES(LANES), .MU_SHIFT(MU_SHIFT)) u_le (
    .clk, .rst_n, .en(word_valid), .adapt(le_adapt), .xr, .ref_bit, .ref_ok(locked),
    .y(yhat), .dec, .e, .err, .w);
  data_sync #(.LANES(LANES)) u_sync (
    .clk, .rst_n, .en(word_valid), .dec, .ref_bit, .locked, .mismatches(sync_mismatches));
  ql_ud #(.LANES(LANES), .LMS_SHIFT(LMS_SHIFT), .AMBER_SHIFT(AMBER_SHIFT)) u_qlud (
    .clk, .rst_n, .word_valid, .en(qlud_en && locked && mode == MODE_BOA3), .alg,
    .load(lvl_load), .init_lvl(lvl_init), .code(code_w), .w, .e, .err, .lvl, .thr(thr_boa));

  // thresholds requested from the DAC
  always_comb
    for (int k = 0; k < NCMP; k++)
      if (mode == MODE_BOA3) thr_tgt[k] = (k < NLEV-1) ? thr_boa[k] : 8'sd127;
      else                   thr_tgt[k] = thr_t'((k - int'(NCMP/2)) * CUA_STEP);

  dac_sequencer #(.NREF(2*NCMP), .NSLOT(32), .DIV(DAC_DIV)) u_seq (
    .clk, .rst_n, .thr(thr_tgt), .phi1, .phi2, .code(dac_code), .addr(dac_addr), .sweep_done(dac_sweep_done));
  threshold_dac_model #(.NREF(2*NCMP)) u_dac (
    .clk, .rst_n, .phi1, .phi2, .code(dac_code), .addr(dac_addr), .vth(thr_adc));

  // BER measurement against the synchronised PRBS
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_count <= '0; err_count <= '0;
    end else if (word_valid && locked) begin
      logic [31:0] ne;
      ne = '0;
      for (int j = 0; j < LANES; j++) ne += 32'(err[j]);
      bit_count <= bit_count + LANES;
      err_count <= err_count + ne;
    end
  end
endmodule
