// sensor_node: one 16-microphone sub-array node of a sound acquisition
// network.
//
// The node listens with one microphone and the voice activity detector
// (zc_vad) on the low-rate ADC stream. The power_manager wakes the rest of
// the node when speech appears: all 16 microphones, the full-rate ADC
// setting and the sound processing unit. While awake, the 16 microphone
// streams go through an in-node delay-and-sum beamformer (das_beamformer,
// N = 16), and the result is merged with the single aggregated stream coming
// from the upstream node by a second, two-input delay-and-sum stage, so the
// node always forwards one channel downstream (perfect aggregation).
//
// Interface: vad_valid/vad_sample is the low-rate, 10-bit channel of
// microphone 0; mic_valid/mic carry the 16 full-rate 16-bit channels (taken
// only while proc_en is high). mic_delay and the two aggregation delays are
// loaded by the localization step, which is outside this block.
// up_valid/up_data must be sample-aligned with mic_valid (the nodes share a
// synchronised time base). down_valid/down_data is the forwarded stream.
// Timing: down_* follow mic_valid by two cycles.
// The node's structure follows the design description; the widths, the
// sample alignment and the explicit aggregation delays are this design's.
module sensor_node #(
  parameter int unsigned NMIC      = 16,
  parameter int unsigned W         = 16,
  parameter int unsigned MAXD      = 256,
  parameter int unsigned FRAME_LEN = 256,
  parameter int unsigned HANG      = 4,
  parameter int unsigned AGG_W     = 24
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // low-rate VAD channel
  input  logic                      vad_valid,
  input  logic [9:0]                vad_sample,
  // full-rate microphone channels
  input  logic                      mic_valid,
  input  logic signed [W-1:0]       mic       [NMIC],
  input  logic [$clog2(MAXD)-1:0]   mic_delay [NMIC],
  // aggregation
  input  logic                      up_valid,
  input  logic signed [AGG_W-1:0]   up_data,
  input  logic [$clog2(MAXD)-1:0]   agg_delay_local,
  input  logic [$clog2(MAXD)-1:0]   agg_delay_up,
  output logic                      down_valid,
  output logic signed [AGG_W-1:0]   down_data,
  // power state
  output logic                      speech,
  output logic                      proc_en,
  output logic [NMIC-1:0]           mic_en,
  output logic                      adc_hi_mode,
  output logic [31:0]               wakeups,
  output logic [31:0]               active_frames,
  output logic                      up_unaligned
);
  localparam int unsigned BW = W + $clog2(NMIC);

  logic decided, frame_end;
  logic [9:0] offset;
  logic [$clog2(FRAME_LEN+1)-1:0] zc_count;

  zc_vad #(.SAMPLE_W(10), .FRAME_LEN(FRAME_LEN)) u_vad (
    .clk(clk), .rst_n(rst_n), .sample_valid(vad_valid), .sample(vad_sample),
    .speech(speech), .decided(decided), .frame_end(frame_end), .offset(offset),
    .zc_count(zc_count));

  power_manager #(.NMIC(NMIC), .HANG(HANG)) u_pm (
    .clk(clk), .rst_n(rst_n), .decided(decided), .speech(speech),
    .proc_en(proc_en), .mic_en(mic_en), .adc_hi_mode(adc_hi_mode),
    .wakeups(wakeups), .active_frames(active_frames));

  // in-node beamformer, clocked only by samples taken while awake
  logic                 bf_valid;
  logic signed [BW-1:0] bf_y;
  das_beamformer #(.N(NMIC), .W(W), .MAXD(MAXD)) u_bf (
    .clk(clk), .rst_n(rst_n), .in_valid(mic_valid && proc_en), .x(mic), .delay(mic_delay),
    .y_valid(bf_valid), .y(bf_y));

  // inter-node perfect aggregation: local stream + upstream stream
  logic signed [AGG_W-1:0]        agg_x [2];
  logic [$clog2(MAXD)-1:0]        agg_d [2];
  logic signed [AGG_W:0]          agg_y;
  logic signed [AGG_W-1:0]        up_q;
  logic                           agg_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_q <= '0; up_unaligned <= 1'b0;
    end else begin
      if (up_valid) up_q <= up_data;
      if (up_valid && !(mic_valid && proc_en)) up_unaligned <= 1'b1;
    end
  end

  assign agg_x[0] = AGG_W'(bf_y);
  assign agg_x[1] = up_q;
  assign agg_d[0] = agg_delay_local;
  assign agg_d[1] = agg_delay_up;

  das_beamformer #(.N(2), .W(AGG_W), .MAXD(MAXD)) u_agg (
    .clk(clk), .rst_n(rst_n), .in_valid(bf_valid), .x(agg_x), .delay(agg_d),
    .y_valid(agg_v), .y(agg_y));

  assign down_valid = agg_v;
  assign down_data  = agg_y[AGG_W-1:0];
endmodule
