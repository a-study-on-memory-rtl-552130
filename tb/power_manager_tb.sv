// power_manager_tb: drives random VAD decisions into the power manager and
// compares its state with a testbench model: it wakes on the first speech
// decision (processing unit and all 16 microphones on, ADC in high-rate
// mode), stays awake while speech continues and returns to sleep after HANG
// further silent frames, leaving only microphone 0 powered. Counts wake-ups
// and active frames and checks both transitions occur.
`include "tb/tb_util.svh"
module power_manager_tb;
  localparam int NMIC = 16, HANG = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, decided = 0, speech = 0;
  logic proc_en, adc_hi_mode;
  logic [NMIC-1:0] mic_en;
  logic [31:0] wakeups, active_frames;
  always #5 clk = ~clk;

  power_manager #(.NMIC(NMIC), .HANG(HANG)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    `TB_END
  end

  bit act = 0;
  int quiet = 0, m_wake = 0, m_act = 0, n_sleep = 0;

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    `CHECK(!proc_en && mic_en == 16'h0001 && !adc_hi_mode, "asleep after reset with one microphone")
    for (int i = 0; i < 2000; i++) begin
      bit sp;
      sp = ($urandom_range(0, 9) < ((i / 200) % 2 ? 7 : 2));
      @(negedge clk);
      decided = 1; speech = sp;
      if (!act) begin
        if (sp) begin act = 1; quiet = 0; m_wake++; end
      end else begin
        m_act++;
        if (sp) quiet = 0;
        else if (quiet == HANG) begin act = 0; n_sleep++; end
        else quiet++;
      end
      @(negedge clk);
      decided = 0;
      `CHECK(proc_en == act, "processing unit enable")
      `CHECK(adc_hi_mode == act, "ADC mode")
      `CHECK(mic_en == (act ? 16'hffff : 16'h0001), "microphone enables")
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    `CHECK(wakeups == 32'(m_wake), "wake-up count")
    `CHECK(active_frames == 32'(m_act), "active frame count")
    `CHECK(m_wake > 5 && n_sleep > 5, "woke and slept several times")
    `TB_END
  end
endmodule
