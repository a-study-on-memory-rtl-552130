// speech_recognizer_tb: end-to-end test of a reduced recognizer (8 GMM
// states, 6-frame bursts, 4 dimensions, 4 mixtures, 18-node dictionary)
// over 5 bursts. Every GMM result written to the result RAM is compared with
// the floating-point log-sum-exp of the Gaussian terms; the Viterbi side is
// compared counter by counter with the reference model (vit_model.svh) run
// on those same GMM results after each burst. Checks that each state's
// parameters are fetched once per burst, that GMM and Viterbi were busy at
// the same time (two-stage pipeline through the two result banks), and that
// the whole run took fewer cycles than the two stages would one after the
// other.
`include "tb/tb_util.svh"
`include "tb/vit_model.svh"
module speech_recognizer_tb;
  import sr_pkg::*;
  localparam int S = 8, F = 6, D = 4, M = 4, TOPN = 3, NS = 6, DP = 3, BEAM = 6, QD = 32;
  localparam int NW = 6, NB = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    `TB_END
  end

  logic search_init = 0, burst_valid = 0, burst_fbank = 0, burst_accept, idle;
  logic [$clog2(S+1)-1:0] num_states = S;
  logic [31:0] bursts_done, overlap_cycles;
  logic fb_wr_en = 0, fb_wr_bank = 0;
  logic [$clog2(F)-1:0] fb_wr_frame = 0;
  logic [$clog2(D)-1:0] fb_wr_dim = 0;
  feat_t fb_wr_data = 0;
  logic p_valid = 1, p_ready;
  score_t p_w [M];
  feat_t p_mu [M], p_sigma [M];
  logic dict_req, dict_ack, bd_req, bd_ack, bl_mem_req, bl_mem_rvalid;
  logic tk_mem_req, tk_mem_we, tk_mem_ack, tr_valid;
  node_t dict_node, tk_mem_node;
  dict_node_t dict_rdata;
  word_t bd_word, bl_mem_word, tr_word;
  logic [15:0] bd_start, tr_stamp;
  logic signed [15:0] bd_logp;
  bigram_entry_t bl_mem_line [TOPN];
  token_t tk_mem_wdata, tk_mem_rdata;
  score_t tr_score, thr;
  logic [19:0] n_active;
  vit_stats_t stats;
  logic [31:0] bc_hits, bc_misses, tk_hits, tk_misses;
  score_t unused_res;

  speech_recognizer #(.STATES(S), .FRAMES(F), .DIMS(D), .MIX(M), .QDEPTH(QD), .BEAM(BEAM),
                      .TOPN(TOPN), .DETAIL_PERIOD(DP), .N_START(NS), .BC_SETS(2),
                      .TK_LINES(4)) dut (.*);

  vit_mem #(.STATES(S), .FRAMES(F), .TOPN(TOPN), .LAT(2)) u_mem (
    .clk, .rst_n, .dict_req, .dict_node, .dict_ack, .dict_rdata,
    .res_rd_en(1'b0), .res_rd_bank(1'b0), .res_rd_state('0), .res_rd_frame('0),
    .res_rd_data(unused_res),
    .bd_req, .bd_word, .bd_start, .bd_ack, .bd_logp,
    .bl_mem_req, .bl_mem_word, .bl_mem_rvalid, .bl_mem_line,
    .tk_mem_req, .tk_mem_we, .tk_mem_node, .tk_mem_wdata, .tk_mem_ack, .tk_mem_rdata);

  // ---------------- Gaussian parameter memory ----------------
  int w [S][M], mu [S][D][M], sg [S][D][M], xf [NB][F][D];
  int beats = 0, bstate = 0, bbeat = 0;
  always_comb
    foreach (p_w[m]) begin
      p_w[m]     = score_t'(w[bstate % S][m]);
      p_mu[m]    = feat_t'((bbeat == 0) ? 0 : mu[bstate % S][(bbeat + D - 1) % D][m]);
      p_sigma[m] = feat_t'((bbeat == 0) ? 0 : sg[bstate % S][(bbeat + D - 1) % D][m]);
    end
  always @(posedge clk) if (rst_n) begin
    if (p_valid && p_ready) begin
      beats++;
      if (bbeat == D) begin bbeat <= 0; bstate <= bstate + 1; end
      else bbeat <= bbeat + 1;
    end
    p_valid <= ($urandom_range(0, 7) != 0);
  end

  function automatic real ref_b(int k, int s, int f);
    real t [M];
    real mx, sum;
    foreach (t[m]) begin
      longint acc;
      acc = w[s][m];
      for (int d = 0; d < D; d++) begin
        longint dd, sq;
        dd = xf[k][f][d] - mu[s][d][m];
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

  // ---------------- monitors ----------------
  vit_model mdl;
  int g_burst = -1, v_burst = 0, n_gmm_res = 0;
  int gmm_cyc = 0, vit_cyc = 0;
  longint tr_sum = 0, tr_wsum = 0;

  always @(posedge clk) if (rst_n) begin
    if (burst_accept) g_burst++;
    if (dut.u_gmm.busy) gmm_cyc++;
    if (dut.u_vit.busy) vit_cyc++;
    if (dut.res_we) begin
      real r;
      r = ref_b(g_burst, int'(dut.res_state), int'(dut.res_frame));
      `CHECK((real'(dut.res_data) - r) < 100.0 && (r - real'(dut.res_data)) < 100.0,
             $sformatf("burst %0d state %0d frame %0d: %0d expected %0.1f", g_burst,
                       dut.res_state, dut.res_frame, dut.res_data, r))
      mdl.gmm[(g_burst * 65536 + int'(dut.res_state)) * 256 + int'(dut.res_frame)] = longint'(dut.res_data);
      n_gmm_res++;
    end
    if (tr_valid) begin tr_sum += longint'(tr_score); tr_wsum += longint'(tr_word); end
    if (dut.u_vit.done && dut.vit_active) begin
      mdl.run(v_burst);
      `CHECK(longint'(stats.created) == mdl.created, $sformatf("burst %0d created %0d/%0d", v_burst, stats.created, mdl.created))
      `CHECK(longint'(stats.overwritten) == mdl.overwritten, $sformatf("burst %0d overwritten", v_burst))
      `CHECK(longint'(stats.pruned) == mdl.pruned, $sformatf("burst %0d pruned %0d/%0d", v_burst, stats.pruned, mdl.pruned))
      `CHECK(longint'(stats.trellis) == mdl.trellis, $sformatf("burst %0d trellis", v_burst))
      `CHECK(longint'(stats.xword) == mdl.xword, $sformatf("burst %0d cross-word", v_burst))
      `CHECK(longint'(stats.frames) == mdl.frames, $sformatf("burst %0d frames", v_burst))
      `CHECK(longint'(thr) == mdl.thr, $sformatf("burst %0d threshold %0d/%0d", v_burst, thr, mdl.thr))
      `CHECK(int'(n_active) == mdl.q_node.size(), $sformatf("burst %0d active nodes", v_burst))
      v_burst++;
    end
  end

  task automatic build();
    for (int r = 0; r < NW; r++) begin
      dict_node_t d;
      for (int lvl = 0; lvl < 3; lvl++) begin
        d = '0;
        d.succ      = node_t'((lvl + 1) * NS + r);
        d.gmm_id    = GMMID_W'($urandom_range(0, S - 1));
        d.log_aself = -16'($urandom_range(0, 200));
        d.log_anext = -16'($urandom_range(0, 400));
        d.uni_diff  = -16'($urandom_range(0, 300));
        d.word_end  = (lvl == 2);
        d.word_id   = word_t'(r);
        mdl.dict[lvl * NS + r] = d;
      end
      for (int k = 0; k < TOPN; k++) begin
        bigram_entry_t e;
        e.word = word_t'($urandom_range(0, NS - 1));
        e.logp = -16'($urandom_range(0, 2000));
        mdl.topl[r].push_back(e);
      end
      for (int s = 0; s < NS; s++) mdl.bd[r * 65536 + s] = -longint'($urandom_range(0, 3000));
    end
    foreach (w[s, m]) w[s][m] = -int'($urandom_range(0, 1500));
    foreach (mu[s, d, m]) mu[s][d][m] = int'($urandom_range(0, 1000)) - 500;
    foreach (sg[s, d, m]) sg[s][d][m] = -int'($urandom_range(1, 300));
    foreach (xf[k, f, d]) xf[k][f][d] = int'($urandom_range(0, 1000)) - 500;
  endtask

  task automatic write_features(int k);
    for (int f = 0; f < F; f++)
      for (int d = 0; d < D; d++) begin
        @(negedge clk);
        fb_wr_en = 1; fb_wr_bank = k[0]; fb_wr_frame = f[$clog2(F)-1:0];
        fb_wr_dim = d[$clog2(D)-1:0]; fb_wr_data = feat_t'(xf[k][f][d]);
      end
    @(negedge clk); fb_wr_en = 0;
  endtask

  initial begin
    int t0, t1;
    mdl = new(QD, BEAM, TOPN, NS, DP, F);
    build();
    u_mem.m = mdl;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); search_init = 1;
    @(negedge clk); search_init = 0;
    mdl.init();
    t0 = $time / 10;
    write_features(0);
    for (int k = 0; k < NB; k++) begin
      @(negedge clk);
      burst_valid = 1; burst_fbank = k[0];
      @(posedge clk);
      while (!burst_accept) @(posedge clk);
      @(negedge clk);
      burst_valid = 0;
      if (k + 1 < NB) write_features(k + 1);
      // the next feature bank may only be refilled once this burst's GMM is done
      while (dut.u_gmm.busy) @(negedge clk);
    end
    while (!idle) @(negedge clk);
    t1 = $time / 10;
    `CHECK(bursts_done == NB, $sformatf("%0d bursts searched", bursts_done))
    `CHECK(n_gmm_res == NB * S * F, "every state/frame computed once per burst")
    `CHECK(beats == NB * S * (D + 1), $sformatf("%0d parameter beats, expected %0d", beats, NB * S * (D + 1)))
    `CHECK(overlap_cycles > 0, "GMM and Viterbi worked at the same time")
    `CHECK(t1 - t0 < gmm_cyc + vit_cyc, $sformatf("pipelined run %0d cycles vs %0d sequential", t1 - t0, gmm_cyc + vit_cyc))
    `CHECK(tr_sum == mdl.tr_sum && tr_wsum == mdl.tr_wsum, "trellis stream")
    `CHECK(stats.pruned > 0 && stats.overwritten > 0 && stats.detail_frames > 0, "search mechanisms exercised")
    $display("cycles %0d gmm %0d vit %0d overlap %0d", t1 - t0, gmm_cyc, vit_cyc, overlap_cycles);
    `TB_END
  end
endmodule
