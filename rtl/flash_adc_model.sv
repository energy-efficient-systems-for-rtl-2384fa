// Behavioural model of the 4-bit flash ADC core: NCMP comparators, each
// comparing the same analog sample with its own threshold. The thresholds are
// not from a resistor ladder but from the storage capacitors of the threshold
// DAC, so they are arbitrary (non-uniform) values. Output is the raw thermometer
// code, bit i set when the sample exceeds threshold i, valid three cycles after
// the sample (the comparator latch pipeline). Thresholds are expected to rise
// with the index; unused comparators are parked at +127 so they never fire.
// Behavioural model of an analog part. 15 comparators with externally set
// thresholds follow the described 4-bit flash ADC; the 8-bit signed input in
// DAC LSB units is this design's representation of the analog sample.
module flash_adc_model
  import boa_pkg::*;
#(
  parameter int unsigned N = NCMP
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic signed [7:0] vin,
  input  thr_t              vth [N],
  output logic [N-1:0]      therm
);
  for (genvar i = 0; i < N; i++) begin : g_cmp
    comparator_model #(.LATCHES(3)) u_cmp (
      .clk, .rst_n, .vin, .vth(vth[i]), .dout(therm[i])
    );
  end
endmodule
