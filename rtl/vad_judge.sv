// vad_judge: decision stage of the voice activity detector.
//
// At each frame end compares the frame's zero-crossing count with ZC_TH and
// renews the output state: speech when the count reaches ZC_TH (algorithm
// step 8). speech holds for the whole next frame; decided pulses with each
// renewal. ZC_TH is this design's choice.
module vad_judge #(
  parameter int unsigned CNT_W = 9,
  parameter int unsigned ZC_TH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             frame_end,
  input  logic [CNT_W-1:0] count,
  output logic             speech,
  output logic             decided
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      speech <= 1'b0; decided <= 1'b0;
    end else begin
      decided <= frame_end;
      if (frame_end) speech <= (count >= CNT_W'(ZC_TH));
    end
  end
endmodule
