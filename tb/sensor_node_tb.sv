// sensor_node_tb: one 16-microphone node of the sound acquisition network.
// The VAD channel receives quiet frames, then tone (speech-like) frames,
// then quiet frames again; all microphones stream random samples every
// cycle, and an upstream node's aggregated stream arrives with them.
// Checks: asleep, only microphone 0 is powered and no beamformed output
// leaves the node; after a speech frame the node wakes (processing unit and
// all microphones on), and every output equals the delay-and-sum of the
// 16 local channels (samples taken while awake) added to the delayed
// upstream stream, per the perfect-aggregation rule; after HANG quiet frames
// it sleeps again.
`include "tb/tb_util.svh"
module sensor_node_tb;
  localparam int NMIC = 16, W = 16, MAXD = 256, AGG_W = 24, FL = 256;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic vad_valid = 0, mic_valid = 0, up_valid = 0;
  logic [9:0] vad_sample = 512;
  logic signed [W-1:0] mic [NMIC];
  logic [7:0] mic_delay [NMIC];
  logic signed [AGG_W-1:0] up_data = 0;
  logic [7:0] agg_delay_local = 3, agg_delay_up = 0;
  logic down_valid, speech, proc_en, adc_hi_mode, up_unaligned;
  logic signed [AGG_W-1:0] down_data;
  logic [NMIC-1:0] mic_en;
  logic [31:0] wakeups, active_frames;
  always #5 clk = ~clk;

  sensor_node #(.NMIC(NMIC), .W(W), .MAXD(MAXD), .FRAME_LEN(FL), .HANG(2), .AGG_W(AGG_W)) dut (.*);

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    `TB_END
  end

  // reference: histories indexed by awake-sample number
  int mic_h [NMIC][20000];
  longint loc_h [20000], up_h [20000];
  int k = 0;                    // samples taken while awake
  longint exp_q [$];
  int n_out = 0, n_sleep_out = 0, n_checked = 0;
  bit was_awake = 0, slept_again = 0;

  always @(posedge clk) if (rst_n) begin
    if (down_valid) begin
      longint e;
      n_out++;
      e = exp_q.pop_front();
      if (e != 64'h7fffffffffffffff) begin
        n_checked++;
        `CHECK(longint'(down_data) == e, $sformatf("aggregated output %0d expected %0d", down_data, e))
      end
    end
    if (proc_en) was_awake = 1;
    if (was_awake && !proc_en) slept_again = 1;
  end

  // drive one cycle of microphone data; model the node when it is awake
  task automatic mic_cycle(bit vad, int vs);
    bit awake;
    @(negedge clk);
    awake = proc_en;
    mic_valid = 1; up_valid = awake;
    vad_valid = vad; vad_sample = 10'(vs);
    foreach (mic[i]) mic[i] = W'(int'($urandom_range(0, 2000)) - 1000);
    up_data = AGG_W'(int'($urandom_range(0, 20000)) - 10000);
    if (awake) begin
      longint s;
      bit ok;
      s = 0;
      ok = 1;
      foreach (mic[i]) mic_h[i][k] = int'(mic[i]);
      foreach (mic[i]) begin
        if (k >= int'(mic_delay[i])) s += mic_h[i][k - int'(mic_delay[i])];
        else ok = 0;
      end
      loc_h[k] = ok ? s : 64'h7fffffffffffffff;
      up_h[k]  = longint'(up_data);
      if (k >= 3 && loc_h[k - 3] != 64'h7fffffffffffffff) exp_q.push_back(loc_h[k - 3] + up_h[k]);
      else exp_q.push_back(64'h7fffffffffffffff);
      k++;
    end
    @(posedge clk);
    #1;
    mic_valid = 0; up_valid = 0; vad_valid = 0;
  endtask

  task automatic vad_frame(bit tone);
    for (int s = 0; s < FL; s++) begin
      int v;
      v = tone ? 512 + int'(150.0 * $sin(2.0 * 3.14159265 * real'(s) / 10.0))
               : 512 + $urandom_range(0, 20) - 10;
      for (int c = 0; c < 3; c++) mic_cycle(c == 0, v);
    end
  endtask

  initial begin
    foreach (mic[i]) begin mic[i] = 0; mic_delay[i] = 8'($urandom_range(0, 20)); end
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    `CHECK(!proc_en && mic_en == 16'h0001 && !adc_hi_mode, "node asleep after reset")
    for (int f = 0; f < 3; f++) vad_frame(0);
    `CHECK(!proc_en && n_out == 0, "no wake-up and no output on silence")
    vad_frame(1);
    repeat (3) @(negedge clk);
    `CHECK(proc_en && mic_en == 16'hffff && adc_hi_mode, "speech wakes the node and all microphones")
    for (int f = 0; f < 3; f++) vad_frame(1);
    for (int f = 0; f < 5; f++) vad_frame(0);
    repeat (3) @(negedge clk);
    `CHECK(!proc_en && mic_en == 16'h0001, "node sleeps after the hang-over frames")
    `CHECK(wakeups == 1, "one wake-up")
    `CHECK(n_out == k, $sformatf("%0d outputs for %0d awake samples", n_out, k))
    `CHECK(n_checked > 1000, "aggregated outputs checked")
    `CHECK(slept_again, "returned to sleep")
    `CHECK(!up_unaligned, "upstream data always aligned with local samples")
    `TB_END
  end
endmodule
