// NTAPS-tap adaptive linear equalizer (LE), LANES samples per word.
// For every lane j the estimate of the transmitted symbol is
//   y[j] = sum_k w[k] * x_r[j-k]   (samples before lane 0 come from the previous word)
// and the hard decision is dec[j] = (y[j] >= 0). With the reference bit b from
// the data-synchronisation unit the error is e[j] = b*TARGET - y[j] and the bit
// error indicator is err[j] = (dec[j] != b). When adapt is set and the reference
// is locked, the taps take one LMS step per word with the gradient summed over
// the lanes (block LMS, this design's choice for the parallel datapath):
//   w[k] += (sum_j e[j] * x_r[j-k]) >>> MU_SHIFT.
// Taps reset to a centre spike of 1.0 (decision delay of one sample).
// Timing: y, dec, e and err are combinational in the current word; taps and the
// sample history update on the clock edge where en (word valid) is high.
module lms_equalizer
  import boa_pkg::*;
#(
  parameter int unsigned LANES    = 40,
  parameter int unsigned MU_SHIFT = 20,
  parameter int          TARGET   = 32 << LVL_F    // +/-1 maps to +/-32 DAC LSB
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       adapt,
  input  lvl_t       xr      [LANES],
  input  logic       ref_bit [LANES],
  input  logic       ref_ok,
  output y_t         y       [LANES],
  output logic       dec     [LANES],
  output logic signed [Y_W:0] e [LANES],
  output logic       err     [LANES],
  output tap_t       w       [NTAPS]
);
  lvl_t xhist [NTAPS-1];     // last NTAPS-1 samples of the previous word, [0] newest

  function automatic lvl_t tap_in(input int j, input int k);
    if (j - k >= 0) return xr[j-k];
    else            return xhist[k-j-1];
  endfunction

  always_comb begin
    for (int j = 0; j < LANES; j++) begin
      logic signed [TAP_W+LVL_W+3:0] acc;
      acc = '0;
      for (int k = 0; k < NTAPS; k++) acc += w[k] * tap_in(j, k);
      y[j]   = y_t'(acc >>> TAP_F);
      dec[j] = ~y[j][Y_W-1];
    end
  end

  always_comb
    for (int j = 0; j < LANES; j++) begin
      e[j]   = (ref_bit[j] ? (Y_W+1)'(TARGET) : -(Y_W+1)'(TARGET)) - (Y_W+1)'(y[j]);
      err[j] = dec[j] ^ ref_bit[j];
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS; k++) w[k] <= (k == 1) ? tap_t'(1 << TAP_F) : '0;
      for (int k = 0; k < NTAPS-1; k++) xhist[k] <= '0;
    end else if (en) begin
      for (int k = 0; k < NTAPS-1; k++) xhist[k] <= xr[LANES-1-k];
      if (adapt && ref_ok) begin
        for (int k = 0; k < NTAPS; k++) begin
          logic signed [47:0] g;
          g = '0;
          for (int j = 0; j < LANES; j++) g += 48'(e[j]) * 48'(tap_in(j, k));
          w[k] <= w[k] + tap_t'(g >>> MU_SHIFT);
        end
      end
    end
  end
endmodule
