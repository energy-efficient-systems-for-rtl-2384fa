// Shared constants and types of the BER-optimal ADC (BOA) serial-link receiver.
// The receiver digitises a 4 GS/s channel output with a 4-bit flash ADC whose
// 15 thresholds come from an 8-bit DAC, so the same silicon runs either as a
// 4-bit conventional uniform ADC (CUA) or as a 3-bit BOA with non-uniform,
// adaptively chosen thresholds. The back end works on words of LANES samples.
// Fixed-point formats (this design's choice; the source gives none):
//   analog sample, thresholds : signed 8 bit, one DAC LSB per unit
//   representation level r    : signed LVL_W bits, LVL_F fraction bits (DAC LSB units)
//   equalizer tap w           : signed TAP_W bits, TAP_F fraction bits
// Some constants (NCMP, NLEV, NTAPS, LVL_F, TAP_F, PRBS_LEN) are not used inside
// the package itself; they are read by the modules that import it.
package boa_pkg;
  localparam int unsigned ADC_BITS = 4;                   // flash ADC resolution
  localparam int unsigned NCMP     = (1 << ADC_BITS) - 1;  // 15 comparators
  localparam int unsigned BOA_BITS = 3;                   // BOA resolution B_o
  localparam int unsigned NLEV     = 1 << BOA_BITS;       // 8 representation levels
  localparam int unsigned DAC_BITS = 8;                   // threshold DAC resolution
  localparam int unsigned NTAPS    = 3;                   // LMS equalizer taps
  localparam int unsigned LVL_W    = 12;
  localparam int unsigned LVL_F    = 4;
  localparam int unsigned TAP_W    = 16;
  localparam int unsigned TAP_F    = 12;
  localparam int unsigned Y_W      = 20;                  // equalizer output, LVL_F fraction bits
  localparam int unsigned PRBS_LEN = 23;                  // PRBS 2^23-1, taps 23 and 18

  typedef logic signed [DAC_BITS-1:0] thr_t;
  typedef logic        [ADC_BITS-1:0] code_t;
  typedef logic signed [LVL_W-1:0]    lvl_t;
  typedef logic signed [TAP_W-1:0]    tap_t;
  typedef logic signed [Y_W-1:0]      y_t;

  typedef enum logic {MODE_CUA4 = 1'b0, MODE_BOA3 = 1'b1} adc_mode_e;
  typedef enum logic {UPD_LMS = 1'b0, UPD_AMBER = 1'b1} upd_alg_e;
endpackage
