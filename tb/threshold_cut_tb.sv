// threshold_cut_tb: drives end-of-frame survivor sums and counts into the
// adaptive threshold unit and compares threshold, average and margin with a
// testbench model of the rule: the margin shrinks by one step when more than
// BEAM hypotheses survived, grows by one step when fewer did (clamped), and
// the next threshold is the average score minus the margin. Checks the
// two-cycle update latency, the pass comparison, the reopening of the
// threshold when nothing survived, and init.
`include "tb/tb_util.svh"
module threshold_cut_tb;
  import sr_pkg::*;
  localparam int BEAM = 40, STEP = 256, M0 = 20 * 256, MMAX = 200 * 256;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, init = 0, frame_end = 0, pass;
  logic signed [47:0] sum = 0;
  logic [19:0] count = 0;
  score_t cand = 0, thr, avg, margin;
  always #5 clk = ~clk;

  threshold_cut #(.BEAM(BEAM), .STEP(STEP), .MARGIN0(M0), .MARGIN_MAX(MMAX)) dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    `TB_END
  end

  longint m_thr, m_avg, m_margin;
  int n_up = 0, n_down = 0, n_reopen = 0;

  task automatic frame(longint s, int c);
    @(negedge clk);
    sum = 48'(s); count = 20'(c); frame_end = 1;
    @(negedge clk);
    frame_end = 0;
    `CHECK(longint'(thr) == m_thr, "threshold unchanged one cycle after frame_end")
    if (c == 0) begin
      m_thr = longint'(SCORE_MIN);
      n_reopen++;
    end else begin
      m_avg = s / c;
      if (c > BEAM) begin m_margin -= STEP; n_down++; end
      else if (c < BEAM) begin m_margin += STEP; n_up++; end
      if (m_margin < STEP) m_margin = STEP;
      if (m_margin > MMAX) m_margin = MMAX;
      m_thr = m_avg - m_margin;
    end
    @(negedge clk);
    `CHECK(longint'(thr) == m_thr, $sformatf("thr %0d expected %0d", thr, m_thr))
    `CHECK(longint'(avg) == m_avg, $sformatf("avg %0d expected %0d", avg, m_avg))
    `CHECK(longint'(margin) == m_margin, $sformatf("margin %0d expected %0d", margin, m_margin))
    cand = score_t'(m_thr);
    #1 `CHECK(pass, "candidate equal to threshold passes")
    cand = score_t'(m_thr - 1);
    #1 `CHECK(!pass || m_thr == longint'(SCORE_MIN), "candidate below threshold is cut")
  endtask

  initial begin
    m_thr = longint'(SCORE_MIN); m_avg = 0; m_margin = M0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    `CHECK(thr == SCORE_MIN, "threshold open after reset")
    cand = SCORE_MIN; #1 `CHECK(pass, "everything passes after reset")
    for (int k = 0; k < 120; k++) begin
      int c;
      longint s;
      c = (k < 60) ? BEAM + 1 + $urandom_range(0, 30) : $urandom_range(1, BEAM);
      if (k % 17 == 5) c = BEAM;
      s = -longint'(c) * longint'($urandom_range(0, 100000));
      frame(s, c);
    end
    frame(0, 0);
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    m_thr = longint'(SCORE_MIN); m_avg = 0; m_margin = M0;
    `CHECK(thr == SCORE_MIN && margin == score_t'(M0), "init restores the open threshold")
    frame(-longint'(BEAM + 5) * 1000, BEAM + 5);
    `CHECK(n_up > 0 && n_down > 0 && n_reopen > 0, "margin moved both ways and reopened")
    `TB_END
  end
endmodule
