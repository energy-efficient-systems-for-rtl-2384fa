// One stage of an MVM-based CNN with RD-SEC: weight buffer, RD-SEC protected
// C-layer, bias and ReLU, and S-layer. The weight buffer holds the N x M kernel
// matrix, the round(C_e^T) estimator coefficients and the M biases; it is loaded
// one word at a time through the write ports before input vectors are streamed.
// Each input vector x (one receptive field, N = K*K*L values) that arrives with
// x_valid produces M outputs z = max(y_hat + delta, 0), registered one cycle
// later (z_valid); the S-layer pools POOL consecutive z vectors. Input vectors
// are expected to arrive window by window so that POOL consecutive vectors form
// one pooling window. Biases are in output units (BOUT bits, same scale as w*x);
// the ReLU output saturates at the largest positive BOUT-bit value.
// The C-layer / S-layer structure with weight buffer follows the description;
// the write ports, the registered ReLU and the window-by-window input order are
// this design's choices.
module rdsec_cnn_stage
  import rdsec_pkg::*;
#(
  parameter int unsigned N    = 25,
  parameter int unsigned M    = 32,
  parameter int unsigned R    = N,
  parameter int unsigned BIN  = 7,
  parameter int unsigned BW   = 8,
  parameter int unsigned POOL = 4,
  parameter int unsigned BOUT = BIN + BW + $clog2(N)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // weight buffer write ports
  input  logic                   w_wr,
  input  logic [$clog2(M)-1:0]   w_m,
  input  logic [$clog2(N)-1:0]   w_n,
  input  logic signed [BW-1:0]   w_data,
  input  logic                   c_wr,
  input  logic [$clog2((M-R) > 1 ? (M-R) : 2)-1:0] c_m,  // non-basis output index
  input  logic [$clog2(R)-1:0]   c_r,
  input  pow2_coef_t             c_data,
  input  logic                   b_wr,
  input  logic [$clog2(M)-1:0]   b_m,
  input  logic signed [BOUT-1:0] b_data,
  // configuration
  input  logic [BOUT-1:0]        th,
  input  pool_mode_e             pool_mode,
  // stream
  input  logic                   x_valid,
  input  logic signed [BIN-1:0]  x [N],
  input  logic signed [BOUT-1:0] eta [M-R],
  output logic                   z_valid,
  output logic signed [BOUT-1:0] z [M],
  output logic [31:0]            n_corrected,
  output logic                   p_valid,
  output logic signed [BOUT-1:0] p [M]
);
  localparam logic signed [BOUT:0] ZMAX = (BOUT+1)'((64'sd1 <<< (BOUT-1)) - 64'sd1);
  logic signed [BW-1:0]   wbuf [M][N];
  pow2_coef_t             cbuf [M-R][R];
  logic signed [BOUT-1:0] bbuf [M];
  logic signed [BOUT-1:0] y_hat [M];
  logic                   corrected [M-R];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < M; m++) begin
        bbuf[m] <= '0;
        for (int i = 0; i < N; i++) wbuf[m][i] <= '0;
      end
      for (int m = 0; m < M-R; m++)
        for (int r = 0; r < R; r++) cbuf[m][r] <= '{zero: 1'b1, neg: 1'b0, exp: 4'sd0};
    end else begin
      if (w_wr) wbuf[w_m][w_n] <= w_data;
      if (c_wr) cbuf[c_m][c_r] <= c_data;
      if (b_wr) bbuf[b_m]      <= b_data;
    end
  end

  rdsec_mvm #(.N(N), .M(M), .R(R), .BIN(BIN), .BW(BW), .BOUT(BOUT)) u_mvm (
    .x, .w(wbuf), .c(cbuf), .th, .eta, .y_hat, .corrected);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z_valid <= 1'b0; n_corrected <= '0;
      for (int m = 0; m < M; m++) z[m] <= '0;
    end else begin
      z_valid <= x_valid;
      if (x_valid) begin
        logic [31:0] nc;
        nc = '0;
        for (int m = 0; m < M; m++) begin
          logic signed [BOUT:0] s;
          s    = (BOUT+1)'(y_hat[m]) + (BOUT+1)'(bbuf[m]);
          // ReLU, saturating at the largest positive output
          if (s < 0)         z[m] <= '0;
          else if (s > ZMAX) z[m] <= BOUT'(ZMAX);
          else               z[m] <= BOUT'(s);
        end
        for (int m = 0; m < M-R; m++) nc += 32'(corrected[m]);
        n_corrected <= n_corrected + nc;
      end
    end
  end

  s_layer #(.M(M), .BZ(BOUT), .POOL(POOL)) u_s (
    .clk, .rst_n, .mode(pool_mode), .in_valid(z_valid), .z, .out_valid(p_valid), .p);
endmodule
