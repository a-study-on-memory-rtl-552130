// zc_vad_tb: drives the zero-crossing voice activity detector with frames of
// 256 ten-bit samples: quiet frames (noise inside the trigger band), tone
// frames at several pitches and amplitudes, and a DC offset that changes
// part way. A testbench model of the documented steps (offset = mean of the
// previous frame, a crossing counted when the centred signal returns to the
// offset line after leaving the +/-TRIG band, speech when the count reaches
// ZC_TH) gives the expected offset, count and decision for every frame.
// Checks that the decision follows the frame's last sample by two cycles.
`include "tb/tb_util.svh"
module zc_vad_tb;
  localparam int SW = 10, FL = 256, TRIG = 24, ZTH = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sample_valid = 0;
  logic [SW-1:0] sample = 0, offset;
  logic speech, decided, frame_end;
  logic [8:0] zc_count;
  always #5 clk = ~clk;

  zc_vad #(.SAMPLE_W(SW), .FRAME_LEN(FL), .TRIG(TRIG), .ZC_TH(ZTH)) dut (.*);

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    `TB_END
  end

  int m_off = 512;
  int arm = 0;            // 0 disarmed, 1 above, -1 below
  int n_speech = 0, n_quiet = 0, n_dec = 0;

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      int dc, amp, per, cnt, sum, kind;
      int last_cyc;
      dc   = (f < 20) ? 512 : 300;
      kind = f % 4;                        // 0,3 quiet; 1,2 tone
      amp  = (kind == 1) ? 200 : (kind == 2) ? 60 : 0;
      per  = 8 + 4 * (f % 5);
      cnt  = 0; sum = 0;
      for (int s = 0; s < FL; s++) begin
        int v, c;
        v = dc + int'(real'(amp) * $sin(2.0 * 3.14159265 * real'(s) / real'(per)));
        if (amp == 0) v = dc + $urandom_range(0, 2 * TRIG - 2) - (TRIG - 1);
        if (v < 0) v = 0;
        if (v > 1023) v = 1023;
        sum += v;
        c = v - m_off;
        if ((arm == 1 && c <= 0) || (arm == -1 && c >= 0)) cnt++;
        if (c > TRIG) arm = 1;
        else if (c < -TRIG) arm = -1;
        else if ((arm == 1 && c <= 0) || (arm == -1 && c >= 0)) arm = 0;
        @(negedge clk);
        sample_valid = 1; sample = SW'(v);
        @(negedge clk);
        sample_valid = 0;
        if (s != FL - 1) repeat (2) @(negedge clk);
      end
      // one cycle after the last sample: frame_end with the count
      `CHECK(frame_end, "frame_end after the 256th sample")
      `CHECK(int'(zc_count) == cnt, $sformatf("frame %0d crossings %0d expected %0d", f, zc_count, cnt))
      m_off = sum / FL;
      `CHECK(int'(offset) == m_off, $sformatf("offset %0d expected %0d", offset, m_off))
      @(negedge clk);
      `CHECK(decided, "decision one cycle after frame_end")
      `CHECK(speech == (cnt >= ZTH), $sformatf("frame %0d decision", f))
      if (decided) n_dec++;
      if (speech) n_speech++; else n_quiet++;
    end
    `CHECK(n_dec == 40, "one decision per frame")
    `CHECK(n_speech >= 10 && n_quiet >= 10, "both speech and silence decided")
    `TB_END
  end
endmodule
