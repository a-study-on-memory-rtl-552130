// gmm_processor_tb: runs bursts of a reduced GMM processor (6 states,
// 4 frames, 5 dimensions, 4 mixtures) against a parameter memory model and
// a result capture. Every log b_j(x_t) is compared with
// logsumexp_i(w_i + sum_s (x_s - mu)^2 sigma) computed from the same Q.8
// terms in floating point (tolerance 100/256 for the table approximation).
// Checks that each state/frame result is written once into the chosen bank,
// that each state's parameters are read exactly once per burst (burst
// sharing), and, with the parameter stream never stalling, that a burst
// takes no more than states x frames x dims cycles plus the load and
// pipeline latency. A second burst stalls the parameter stream at random to
// exercise back-pressure.
`include "tb/tb_util.svh"
module gmm_processor_tb;
  import sr_pkg::*;
  localparam int S = 6, F = 4, D = 5, M = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, feat_bank = 0, res_bank = 0, busy, done;
  logic [$clog2(S+1)-1:0] num_states = 0;
  logic fb_wr_en = 0, fb_wr_bank = 0;
  logic [$clog2(F)-1:0] fb_wr_frame = 0;
  logic [$clog2(D)-1:0] fb_wr_dim = 0;
  feat_t fb_wr_data = 0;
  logic p_valid = 0, p_ready;
  score_t p_w [M];
  feat_t p_mu [M], p_sigma [M];
  logic res_we, res_wbank;
  logic [$clog2(S)-1:0] res_state;
  logic [$clog2(F)-1:0] res_frame;
  score_t res_data;
  always #5 clk = ~clk;

  gmm_processor #(.STATES(S), .FRAMES(F), .DIMS(D), .MIX(M)) dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    `TB_END
  end

  int w [S][M], mu [S][D][M], sg [S][D][M], xf [2][F][D];
  int got [S][F];
  score_t val [S][F];
  int beats = 0, bstate = 0, bbeat = 0;
  bit stall_mode = 0;

  // parameter memory: presents beat bbeat of state bstate
  always_comb begin
    foreach (p_w[m]) begin
      p_w[m]     = score_t'(w[bstate % S][m]);
      p_mu[m]    = feat_t'((bbeat == 0) ? 0 : mu[bstate % S][(bbeat + D - 1) % D][m]);
      p_sigma[m] = feat_t'((bbeat == 0) ? 0 : sg[bstate % S][(bbeat + D - 1) % D][m]);
    end
  end
  always @(posedge clk) begin
    if (p_valid && p_ready) begin
      beats++;
      if (bbeat == D) begin bbeat <= 0; bstate <= bstate + 1; end
      else bbeat <= bbeat + 1;
    end
    p_valid <= stall_mode ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  always @(posedge clk) if (rst_n && res_we) begin
    `CHECK(res_wbank == res_bank, "result goes to the selected bank")
    got[res_state][res_frame]++;
    val[res_state][res_frame] = res_data;
  end

  function automatic real ref_b(int fb, int s, int f);
    real t [M];
    real mx, sum;
    foreach (t[m]) begin
      longint acc;
      acc = w[s][m];
      for (int d = 0; d < D; d++) begin
        longint dd, sq;
        dd = xf[fb][f][d] - mu[s][d][m];
        sq = (dd * dd) >>> 8;
        acc += (sq * sg[s][d][m]) >>> 8;
      end
      t[m] = real'(acc);
    end
    mx = t[0];
    foreach (t[m]) if (t[m] > mx) mx = t[m];
    sum = 0.0;
    foreach (t[m]) sum += $exp((t[m] - mx) / 256.0);
    return mx + 256.0 * $ln(sum);
  endfunction

  task automatic burst(int fb, int rb, bit stall);
    int cyc;
    foreach (got[s, f]) got[s][f] = 0;
    stall_mode = stall;
    beats = 0;
    @(negedge clk);
    start = 1; num_states = ($clog2(S+1))'(S); feat_bank = fb[0]; res_bank = rb[0];
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    if (!stall)
      `CHECK(cyc <= S * F * D + (D + 1) + 8 && cyc >= S * F * D,
             $sformatf("burst took %0d cycles, expected about %0d", cyc, S * F * D + D + 1 + 4))
    `CHECK(beats == S * (D + 1), $sformatf("%0d parameter beats, expected one load per state (%0d)", beats, S * (D + 1)))
    foreach (got[s, f]) begin
      real r;
      r = ref_b(fb, s, f);
      `CHECK(got[s][f] == 1, $sformatf("state %0d frame %0d written %0d times", s, f, got[s][f]))
      `CHECK((real'(val[s][f]) - r) < 100.0 && (r - real'(val[s][f])) < 100.0,
             $sformatf("state %0d frame %0d: %0d expected %0.1f", s, f, val[s][f], r))
    end
    @(negedge clk);
    `CHECK(!busy, "idle after done")
  endtask

  initial begin
    foreach (w[s, m]) w[s][m] = -int'($urandom_range(0, 3000));
    foreach (mu[s, d, m]) mu[s][d][m] = int'($urandom_range(0, 3000)) - 1500;
    foreach (sg[s, d, m]) sg[s][d][m] = -int'($urandom_range(1, 200));
    foreach (xf[b, f, d]) xf[b][f][d] = int'($urandom_range(0, 3000)) - 1500;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int b = 0; b < 2; b++)
      for (int f = 0; f < F; f++)
        for (int d = 0; d < D; d++) begin
          @(negedge clk);
          fb_wr_en = 1; fb_wr_bank = b[0]; fb_wr_frame = f[$clog2(F)-1:0];
          fb_wr_dim = d[$clog2(D)-1:0]; fb_wr_data = feat_t'(xf[b][f][d]);
        end
    @(negedge clk); fb_wr_en = 0;
    repeat (3) @(negedge clk);
    bstate = 0; bbeat = 0;
    burst(0, 1, 0);
    bstate = 0; bbeat = 0;
    burst(1, 0, 1);
    `TB_END
  end
endmodule
