// zc_vad: low-power zero-crossing voice activity detector.
//
// Decides, frame by frame, whether one microphone hears speech, so that the
// rest of the sensor node can stay switched off otherwise. It runs on a
// reduced ADC stream (2 kHz, 10-bit samples by default) and uses only
// integer additions, comparisons and shifts. Three parts, as in the block
// diagram of the detector:
//   vad_zero_cross  - removes the DC offset and counts trigger-armed zero
//                     crossings (steps 1-3);
//   vad_offset_ctrl - averages each frame of FRAME_LEN samples with an adder
//                     and a shift and moves the offset line (steps 4-7);
//   vad_judge       - renews the speech/non-speech state from the count
//                     (step 8).
// The count of a frame is measured against the offset of the previous frame.
// Interface: sample_valid/sample in; speech out, renewed with decided one
// cycle after the frame's last sample (frame_end two cycles before decided
// is visible as frame_end). zc_count is the count being accumulated.
// Frame length 256 samples, 10-bit samples and the step order follow the
// design description; TRIG and ZC_TH are this design's choice.
module zc_vad #(
  parameter int unsigned SAMPLE_W  = 10,
  parameter int unsigned FRAME_LEN = 256,
  parameter int unsigned TRIG      = 24,
  parameter int unsigned ZC_TH     = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample_valid,
  input  logic [SAMPLE_W-1:0] sample,
  output logic                speech,
  output logic                decided,
  output logic                frame_end,
  output logic [SAMPLE_W-1:0] offset,
  output logic [$clog2(FRAME_LEN+1)-1:0] zc_count
);
  localparam int unsigned CNT_W = $clog2(FRAME_LEN + 1);

  vad_offset_ctrl #(.SAMPLE_W(SAMPLE_W), .FRAME_LEN(FRAME_LEN)) u_off (
    .clk(clk), .rst_n(rst_n), .sample_valid(sample_valid), .sample(sample),
    .offset(offset), .frame_end(frame_end));

  vad_zero_cross #(.SAMPLE_W(SAMPLE_W), .TRIG(TRIG), .CNT_W(CNT_W)) u_zc (
    .clk(clk), .rst_n(rst_n), .sample_valid(sample_valid), .sample(sample),
    .offset(offset), .frame_clr(frame_end), .count(zc_count));

  vad_judge #(.CNT_W(CNT_W), .ZC_TH(ZC_TH)) u_judge (
    .clk(clk), .rst_n(rst_n), .frame_end(frame_end), .count(zc_count),
    .speech(speech), .decided(decided));
endmodule
