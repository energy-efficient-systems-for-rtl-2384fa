// 1:LANES deserializer between the ADC, which delivers one code per clock, and
// the back-end DSP, which handles LANES samples in parallel (40 parallel channels
// turn the 4 GS/s stream into 100 MHz words). Samples shift in at lane LANES-1;
// after LANES samples the word is presented with a one-cycle word_valid pulse,
// lane 0 holding the oldest sample. The back end runs on word_valid as a clock
// enable, so the whole receiver uses a single clock.
// The 1:40 ratio follows the described 4 GS/s front end and 100 MHz back end;
// the shift-register form is this design's choice.
module lane_deserializer #(
  parameter int unsigned LANES = 40,
  parameter int unsigned W     = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] din,
  output logic [W-1:0] word [LANES],
  output logic         word_valid
);
  logic [W-1:0]               sh [LANES];
  logic [$clog2(LANES)-1:0]   cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; word_valid <= 1'b0;
      for (int i = 0; i < LANES; i++) begin sh[i] <= '0; word[i] <= '0; end
    end else begin
      word_valid <= 1'b0;
      if (in_valid) begin
        for (int i = 0; i < LANES-1; i++) sh[i] <= sh[i+1];
        sh[LANES-1] <= din;
        if (cnt == $bits(cnt)'(LANES-1)) begin
          cnt        <= '0;
          word_valid <= 1'b1;
          for (int i = 0; i < LANES-1; i++) word[i] <= sh[i+1];
          word[LANES-1] <= din;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
