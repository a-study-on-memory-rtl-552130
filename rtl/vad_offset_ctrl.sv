// vad_offset_ctrl: DC offset controller of the voice activity detector.
//
// Tracks the DC level of the ADC output with integer arithmetic only: the
// samples of a frame are added into a running sum and counted; when
// FRAME_LEN samples (a power of two) have been seen, the sum shifted right by
// log2(FRAME_LEN) is the frame mean, which becomes the offset line used in
// the next frame (algorithm steps 4-7). frame_end pulses with that update.
//
// Timing: frame_end and the new offset appear the cycle after the
// FRAME_LEN-th sample_valid. The offset starts at mid-scale after reset.
module vad_offset_ctrl #(
  parameter int unsigned SAMPLE_W  = 10,
  parameter int unsigned FRAME_LEN = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sample_valid,
  input  logic [SAMPLE_W-1:0] sample,
  output logic [SAMPLE_W-1:0] offset,
  output logic                frame_end
);
  localparam int unsigned LW = $clog2(FRAME_LEN);
  logic [SAMPLE_W+LW-1:0] sum;
  logic [LW-1:0]          n;
  logic [SAMPLE_W+LW-1:0] total;

  assign total = sum + (SAMPLE_W+LW)'(sample);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum <= '0; n <= '0; frame_end <= 1'b0;
      offset <= SAMPLE_W'(1) << (SAMPLE_W - 1);
    end else begin
      frame_end <= 1'b0;
      if (sample_valid) begin
        if (n == LW'(FRAME_LEN - 1)) begin
          offset    <= total[LW +: SAMPLE_W];    // total >> log2(FRAME_LEN)
          sum       <= '0;
          n         <= '0;
          frame_end <= 1'b1;
        end else begin
          sum <= total;
          n   <= n + 1'b1;
        end
      end
    end
  end
endmodule
