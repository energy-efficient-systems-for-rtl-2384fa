// Behavioural model of one flash-ADC comparator: a preamplifier followed by
// three cascaded latches. The preamplifier forms the sign of (input - threshold);
// each latch is one register stage, the three stages working as a pipeline as in
// the real part (one tracks while the next regenerates), so the decision appears
// LATCHES clock cycles after the sample. The analog input and threshold are
// modelled as signed 8-bit numbers in DAC LSB units; offset, bandwidth and
// metastability of the real circuit are not modelled. Written in synthesizable
// style, but it stands for an analog circuit.
// Behavioural model of an analog part. The preamplifier plus three pipelined
// latches follow the described comparator; offset, noise and metastability are
// not modelled (this design's choice).
module comparator_model #(
  parameter int unsigned LATCHES = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [7:0]       vin,    // sampled channel output
  input  logic signed [7:0]       vth,    // threshold held on the storage capacitor
  output logic                    dout    // 1 when vin > vth, LATCHES cycles later
);
  logic [LATCHES-1:0] stage;
  logic preamp;
  assign preamp = (vin > vth);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) stage <= '0;
    else        stage <= {stage[LATCHES-2:0], preamp};
  assign dout = stage[LATCHES-1];
endmodule
