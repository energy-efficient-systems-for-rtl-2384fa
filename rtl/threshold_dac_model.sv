// Behavioural model of the 8-bit single-core, multiple-output passive DAC and
// its storage-capacitor array, which together replace the resistor ladder of a
// flash ADC so that every comparator threshold can be set freely.
// One DAC core serves all NREF storage capacitors in turn. An update of one
// capacitor takes two non-overlapping phases: in phi1 the 4 MSBs of the code pick
// a segment of the resistor ladder and the 4 LSBs set how much of the 4-bit unit
// capacitor array Cu is charged to its upper tap, so Cu holds the code's voltage;
// in phi2 Cu is connected to the addressed C_ref and the charge sharing moves that
// C_ref a fixed fraction 2^-SHARE_SHIFT of the way towards the code. Repeated
// refreshes converge on the code. Voltages are modelled as numbers with 8 fraction
// bits in DAC LSB units; the capacitor ratio and the pairing of capacitors into
// differential thresholds (threshold k = C_ref[2k] - C_ref[2k+1]) are this
// model's choices. Leakage and ladder mismatch are not modelled.
module threshold_dac_model
  import boa_pkg::*;
#(
  parameter int unsigned NREF        = 2 * NCMP,  // 30 storage capacitors
  parameter int unsigned SHARE_SHIFT = 2          // Cu / (Cu + Cref) = 1/4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       phi1,
  input  logic                       phi2,
  input  logic [DAC_BITS-1:0]        code,
  input  logic [$clog2(NREF+2)-1:0]  addr,
  output thr_t                       vth [NREF/2]
);
  localparam int unsigned VW = DAC_BITS + 10;     // unsigned, 8 fraction bits
  logic [VW-1:0] cref [NREF];
  logic [VW-1:0] cu;
  logic          phi2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREF; i++) cref[i] <= VW'(128 << 8);  // mid-scale
      cu     <= VW'(128 << 8);
      phi2_q <= 1'b0;
    end else begin
      phi2_q <= phi2;
      if (phi1) cu <= VW'({code, 8'h00});
      // charge sharing happens once, when phi2 closes the switch
      if (phi2 && !phi2_q && 32'(addr) < NREF) begin
        logic signed [VW:0] diff;
        diff = $signed({1'b0, cu}) - $signed({1'b0, cref[addr]});
        cref[addr] <= VW'($signed({1'b0, cref[addr]}) + (diff >>> SHARE_SHIFT));
      end
    end
  end

  for (genvar k = 0; k < NREF/2; k++) begin : g_out
    logic signed [VW:0] d;
    always_comb begin
      d = $signed({1'b0, cref[2*k]}) - $signed({1'b0, cref[2*k+1]}) + 128;  // round
      d = d >>> 8;
      if (d > 127)       vth[k] = 8'sd127;
      else if (d < -128) vth[k] = -8'sd128;
      else               vth[k] = thr_t'(d);
    end
  end
endmodule
