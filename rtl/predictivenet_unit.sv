// PredictiveNet output unit: computes one ReLU output z = max(w.x + delta, 0)
// of a convolutional layer, but first predicts whether it is zero. The C-MSB
// block evaluates the dot product with only the MSB parts of weights, inputs and
// bias. If that prediction y_msb is negative the output is set to zero and the
// C-LSB result is never used and the unit is free one cycle earlier;
// otherwise C-LSB supplies the remaining partial products and the unit outputs
// the exact rectified full-precision result. Because most ReLU outputs of a
// trained network are zero, most outputs cost only the cheap MSB pass.
// Handshake: start (with x, w, delta valid) is accepted when ready is high.
// The prediction takes one cycle; done pulses one cycle after start for a
// predicted zero (skipped = 1) and two cycles after start otherwise.
// z is in units of 2^-((BW-1)+(BX-1)). n_skip and n_full count the outcomes.
// The skip rule (y_msb < 0 gives z = 0) follows the description; the one-cycle
// MSB and LSB passes and the start/ready/done handshake are this design's choices.
module predictivenet_unit #(
  parameter int unsigned N      = 25,
  parameter int unsigned BX     = 7,
  parameter int unsigned BW     = 8,
  parameter int unsigned BD     = 7,
  parameter int unsigned BX_MSB = 4,
  parameter int unsigned BW_MSB = 5,
  parameter int unsigned BD_MSB = BX_MSB,
  parameter int unsigned Z_W    = BX + BW + $clog2(N) + 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  ready,
  input  logic signed [BX-1:0]  x [N],
  input  logic signed [BW-1:0]  w [N],
  input  logic signed [BD-1:0]  delta,
  output logic                  done,
  output logic                  skipped,
  output logic [Z_W-1:0]        z,
  output logic [31:0]           n_skip,
  output logic [31:0]           n_full
);
  localparam int unsigned YM_W = BX_MSB + BW_MSB + $clog2(N) + 2;
  localparam int unsigned SH   = (BW - BW_MSB) + (BX - BX_MSB);

  typedef enum logic [1:0] {S_IDLE, S_MSB, S_LSB} state_e;
  state_e state;

  logic signed [BX-1:0] xq [N];
  logic signed [BW-1:0] wq [N];
  logic signed [BD-1:0] dq;
  logic signed [YM_W-1:0] y_msb, y_msb_q;
  logic signed [Z_W-1:0]  y_lsb, y_full;

  pn_cmsb #(.N(N), .BX(BX), .BW(BW), .BD(BD), .BX_MSB(BX_MSB), .BW_MSB(BW_MSB),
            .BD_MSB(BD_MSB), .YM_W(YM_W)) u_cmsb (.x(xq), .w(wq), .delta(dq), .y_msb);
  pn_clsb #(.N(N), .BX(BX), .BW(BW), .BD(BD), .BX_MSB(BX_MSB), .BW_MSB(BW_MSB),
            .BD_MSB(BD_MSB), .YL_W(Z_W)) u_clsb (.x(xq), .w(wq), .delta(dq), .y_lsb);

  assign y_full = (Z_W'(y_msb_q) <<< SH) + y_lsb;
  assign ready  = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; done <= 1'b0; skipped <= 1'b0; z <= '0;
      n_skip <= '0; n_full <= '0; y_msb_q <= '0; dq <= '0;
      for (int i = 0; i < N; i++) begin xq[i] <= '0; wq[i] <= '0; end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          xq <= x; wq <= w; dq <= delta;
          state <= S_MSB;
        end
        S_MSB: begin
          y_msb_q <= y_msb;
          if (y_msb < 0) begin            // predicted zero: skip C-LSB
            z <= '0; skipped <= 1'b1; done <= 1'b1;
            n_skip <= n_skip + 1;
            state  <= S_IDLE;
          end else begin
            state <= S_LSB;
          end
        end
        S_LSB: begin
          z       <= y_full[Z_W-1] ? '0 : Z_W'(y_full);  // ReLU
          skipped <= 1'b0; done <= 1'b1;
          n_full  <= n_full + 1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
