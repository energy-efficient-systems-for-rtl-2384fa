// Subsampling layer (S-layer): reduces the spatial resolution of the C-layer
// output maps by pooling POOL consecutive output vectors (a 2x2 window when the
// C-layer outputs arrive window by window), either by max pooling or by
// averaging (POOL a power of two, the average is a right shift, rounding down).
// Each valid input vector is folded into a running result; after POOL vectors
// the pooled vector is presented with out_valid for one cycle.
// Max and average pooling follow the description; the 2x2 window of four
// consecutive vectors is this design's choice.
module s_layer
  import rdsec_pkg::*;
#(
  parameter int unsigned M    = 32,
  parameter int unsigned BZ   = 20,
  parameter int unsigned POOL = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  pool_mode_e           mode,
  input  logic                 in_valid,
  input  logic signed [BZ-1:0] z   [M],
  output logic                 out_valid,
  output logic signed [BZ-1:0] p   [M]
);
  localparam int unsigned AW = BZ + $clog2(POOL);
  logic signed [AW-1:0] acc [M];
  logic [$clog2(POOL)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; out_valid <= 1'b0;
      for (int m = 0; m < M; m++) begin acc[m] <= '0; p[m] <= '0; end
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int m = 0; m < M; m++) begin
          logic signed [AW-1:0] nxt;
          if (cnt == 0)               nxt = AW'(z[m]);
          else if (mode == POOL_AVG)  nxt = acc[m] + AW'(z[m]);
          else                        nxt = (AW'(z[m]) > acc[m]) ? AW'(z[m]) : acc[m];
          acc[m] <= nxt;
          if (cnt == $bits(cnt)'(POOL-1))
            p[m] <= (mode == POOL_AVG) ? BZ'(nxt >>> $clog2(POOL)) : BZ'(nxt);
        end
        if (cnt == $bits(cnt)'(POOL-1)) begin
          cnt <= '0; out_valid <= 1'b1;
        end else cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
