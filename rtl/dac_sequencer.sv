// Threshold refresh sequencer for the shared threshold DAC. It walks through
// NSLOT time slots, one per DAC-core clock period, and in slot s refreshes
// storage capacitor s (slots NREF..NSLOT-1 are idle). A slot is four quarters of
// DIV clock cycles: phi1, gap, phi2, gap, giving the two non-overlapping phases
// the passive DAC needs. Each comparator threshold t_k is differential and is
// split over two capacitors: C[2k] = 128 + floor(t/2), C[2k+1] = 128 - ceil(t/2),
// so C[2k] - C[2k+1] = t_k. Thresholds are re-sampled at the start of every
// sweep. With the source's numbers (12 MHz DAC core, 32 slots) each capacitor is
// refreshed at 375 kHz; DIV = 83 makes one DAC-core period 332 cycles of a 4 GHz
// sample clock. A pulse on sweep_done marks the end of each full sweep.
// The sequential refresh of the storage capacitors with two phases follows the
// description; the 32-slot frame, the four equal quarters of DIV clocks and the
// code mapping are this design's choices.
module dac_sequencer
  import boa_pkg::*;
#(
  parameter int unsigned NREF  = 2 * NCMP,  // 30 capacitors to refresh
  parameter int unsigned NSLOT = 32,        // 12 MHz / 375 kHz
  parameter int unsigned DIV   = 83         // clock cycles per quarter slot
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  thr_t                       thr [NREF/2],
  output logic                       phi1,
  output logic                       phi2,
  output logic [DAC_BITS-1:0]        code,
  output logic [$clog2(NREF+2)-1:0]  addr,
  output logic                       sweep_done
);
  localparam int unsigned AW = $clog2(NREF+2);
  logic [$clog2(DIV+1)-1:0] cnt;
  logic [1:0]               quarter;
  logic [$clog2(NSLOT)-1:0] slot;
  thr_t                     thr_q [NREF/2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; quarter <= '0; slot <= '0; sweep_done <= 1'b0;
      for (int k = 0; k < NREF/2; k++) thr_q[k] <= '0;
    end else begin
      sweep_done <= 1'b0;
      if (cnt == $bits(cnt)'(DIV-1)) begin
        cnt     <= '0;
        quarter <= quarter + 2'd1;
        if (quarter == 2'd3) begin
          if (slot == $bits(slot)'(NSLOT-1)) begin
            slot       <= '0;
            sweep_done <= 1'b1;
            thr_q      <= thr;
          end else begin
            slot <= slot + 1'b1;
          end
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign phi1 = (quarter == 2'd0);
  assign phi2 = (quarter == 2'd2);
  assign addr = AW'(slot);

  // code of the addressed capacitor
  always_comb begin
    thr_t t;
    logic signed [8:0] half_lo, half_hi;
    code = 8'd128;
    t    = '0;
    if (32'(slot) < NREF) t = thr_q[slot[$clog2(NSLOT)-1:1]];
    half_lo = 9'(t) >>> 1;              // floor(t/2)
    half_hi = 9'(t) - half_lo;          // ceil(t/2)
    if (32'(slot) < NREF)
      code = slot[0] ? 8'(9'sd128 - half_hi) : 8'(9'sd128 + half_lo);
  end
endmodule
