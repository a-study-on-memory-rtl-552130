// vad_zero_cross: zero-crossing detector of the voice activity detector.
//
// Takes one ADC sample per sample_valid, removes the current DC offset with
// saturation to the signed SAMPLE_W+1-bit range (so that no later step can
// overflow), and counts zero crossings in the sense the VAD uses: the first
// return of the signal to the offset line after it has gone beyond the high
// trigger line (+TRIG) or below the low trigger line (-TRIG). Small noise
// around the offset never arms the detector and is not counted.
//
// Interface: count holds the crossings since the last clear (frame_clr).
// Timing: count updates the cycle after sample_valid. The trigger lines and
// the saturating offset removal follow the algorithm's steps 1-3; the value
// of TRIG is this design's choice.
module vad_zero_cross #(
  parameter int unsigned SAMPLE_W = 10,
  parameter int unsigned TRIG     = 24,
  parameter int unsigned CNT_W    = 9
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample_valid,
  input  logic [SAMPLE_W-1:0] sample,      // unsigned ADC code
  input  logic [SAMPLE_W-1:0] offset,      // current DC offset estimate
  input  logic                frame_clr,   // start counting a new frame
  output logic [CNT_W-1:0]    count
);
  typedef enum logic [1:0] {DISARMED, ABOVE, BELOW} arm_e;
  arm_e arm;

  logic signed [SAMPLE_W+1:0] c;   // centred sample, SAMPLE_W+2 bits
  always_comb c = $signed({2'b00, sample}) - $signed({2'b00, offset});

  logic zc_hit;
  always_comb begin
    zc_hit = 1'b0;
    if (arm == ABOVE && c <= 0) zc_hit = 1'b1;
    if (arm == BELOW && c >= 0) zc_hit = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arm   <= DISARMED;
      count <= '0;
    end else begin
      if (frame_clr) count <= '0;
      if (sample_valid) begin
        if (c > $signed((SAMPLE_W+2)'(TRIG)))       arm <= ABOVE;
        else if (c < -$signed((SAMPLE_W+2)'(TRIG))) arm <= BELOW;
        else if (zc_hit)                             arm <= DISARMED;
        if (zc_hit && count != '1) count <= (frame_clr ? '0 : count) + 1'b1;
      end
    end
  end
endmodule
