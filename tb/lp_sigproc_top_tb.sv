// lp_sigproc_top_tb: end-to-end test of the four designs side by side in the
// top level, with the recognizer reduced (8 GMM states, 6-frame bursts,
// 4 dimensions, 4 mixtures, top-3 lists, 4-entry node queue, beam 3,
// detailed language-model stage every 3rd frame, 6 start nodes, small
// caches) so that every mechanism occurs in a short run. The three stimulus
// threads run at the same time:
//   recognizer: 4 bursts with a stalling parameter stream; GMM results are
//     checked against floating point and the search counter by counter
//     against the reference model (vit_model.svh);
//   10T-S SRAM: random two-port traffic checked against a model, including
//     read-during-write, and the bitline-transition count;
//   9T/18T SRAM: traffic on both ports with blocks switched between normal
//     and dependable mode, checked against a model;
//   sensor node: silence, speech and silence on the VAD channel; wake-up,
//     beamformed/aggregated output checked against a model, sleep.
// Each mechanism is counted, and one that never happened is a failure.
`include "tb/tb_util.svh"
`include "tb/vit_model.svh"
module lp_sigproc_top_tb;
  import sr_pkg::*;
  localparam int S = 8, F = 6, D = 4, M = 4, TOPN = 3, NS = 6, DP = 3, BEAM = 3, QD = 4;
  localparam int NW = 6, NB = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    `TB_END
  end

  // ---------------- recognizer signals ----------------
  logic sr_search_init = 0, sr_burst_valid = 0, sr_burst_fbank = 0, sr_burst_accept, sr_idle;
  logic [$clog2(S+1)-1:0] sr_num_states = S;
  logic [31:0] sr_bursts_done, sr_overlap_cycles;
  logic sr_fb_wr_en = 0, sr_fb_wr_bank = 0;
  logic [$clog2(F)-1:0] sr_fb_wr_frame = 0;
  logic [$clog2(D)-1:0] sr_fb_wr_dim = 0;
  feat_t sr_fb_wr_data = 0;
  logic sr_p_valid = 1, sr_p_ready;
  score_t sr_p_w [M];
  feat_t sr_p_mu [M], sr_p_sigma [M];
  logic sr_dict_req, sr_dict_ack, sr_bd_req, sr_bd_ack, sr_bl_mem_req, sr_bl_mem_rvalid;
  logic sr_tk_mem_req, sr_tk_mem_we, sr_tk_mem_ack, sr_tr_valid;
  node_t sr_dict_node, sr_tk_mem_node;
  dict_node_t sr_dict_rdata;
  word_t sr_bd_word, sr_bl_mem_word, sr_tr_word;
  logic [15:0] sr_bd_start, sr_tr_stamp;
  logic signed [15:0] sr_bd_logp;
  bigram_entry_t sr_bl_mem_line [TOPN];
  token_t sr_tk_mem_wdata, sr_tk_mem_rdata;
  score_t sr_tr_score, sr_thr, unused_res;
  logic [19:0] sr_n_active;
  vit_stats_t sr_stats;
  logic [31:0] sr_bc_hits, sr_bc_misses, sr_tk_hits, sr_tk_misses;
  // ---------------- 10T-S SRAM ----------------
  logic s10_we = 0, s10_re = 0;
  logic [8:0] s10_waddr = 0, s10_raddr = 0;
  logic [127:0] s10_wdata = 0, s10_rdata;
  logic [31:0] s10_rbl_toggles;
  // ---------------- 9T/18T SRAM ----------------
  logic s9_cfg_we = 0, s9_cfg_mode = 0, s9_a_en = 0, s9_a_we = 0, s9_a_err, s9_b_en = 0;
  logic s9_b_diff, s9_b_err;
  logic [2:0] s9_cfg_block = 0;
  logic [7:0] s9_mode;
  logic [12:0] s9_a_addr = 0, s9_b_addr = 0;
  logic [15:0] s9_a_wdata = 0, s9_a_rdata, s9_b_rdata;
  // ---------------- sensor node ----------------
  logic sn_vad_valid = 0, sn_mic_valid = 0, sn_up_valid = 0;
  logic [9:0] sn_vad_sample = 512;
  logic signed [15:0] sn_mic [16];
  logic [7:0] sn_mic_delay [16];
  logic signed [23:0] sn_up_data = 0;
  logic [7:0] sn_agg_delay_local = 2, sn_agg_delay_up = 0;
  logic sn_down_valid, sn_speech, sn_proc_en, sn_adc_hi_mode, sn_up_unaligned;
  logic signed [23:0] sn_down_data;
  logic [15:0] sn_mic_en;
  logic [31:0] sn_wakeups, sn_active_frames;

  lp_sigproc_top #(.SR_STATES(S), .SR_FRAMES(F), .SR_DIMS(D), .SR_MIX(M), .SR_TOPN(TOPN),
                   .SR_QDEPTH(QD), .SR_BEAM(BEAM), .SR_DETAIL(DP), .SR_NSTART(NS),
                   .SR_BC_SETS(2), .SR_TK_LINES(4)) dut (.*);

  vit_mem #(.STATES(S), .FRAMES(F), .TOPN(TOPN), .LAT(2)) u_mem (
    .clk, .rst_n, .dict_req(sr_dict_req), .dict_node(sr_dict_node), .dict_ack(sr_dict_ack),
    .dict_rdata(sr_dict_rdata),
    .res_rd_en(1'b0), .res_rd_bank(1'b0), .res_rd_state('0), .res_rd_frame('0),
    .res_rd_data(unused_res),
    .bd_req(sr_bd_req), .bd_word(sr_bd_word), .bd_start(sr_bd_start), .bd_ack(sr_bd_ack),
    .bd_logp(sr_bd_logp),
    .bl_mem_req(sr_bl_mem_req), .bl_mem_word(sr_bl_mem_word), .bl_mem_rvalid(sr_bl_mem_rvalid),
    .bl_mem_line(sr_bl_mem_line),
    .tk_mem_req(sr_tk_mem_req), .tk_mem_we(sr_tk_mem_we), .tk_mem_node(sr_tk_mem_node),
    .tk_mem_wdata(sr_tk_mem_wdata), .tk_mem_ack(sr_tk_mem_ack), .tk_mem_rdata(sr_tk_mem_rdata));

  // ---------------- mechanism counters ----------------
  int n_param_stall = 0, n_burst_wait = 0, n_s10_rdw = 0, n_s9_switch = 0, n_s9_err = 0;
  int n_s9_diff = 0, n_sn_out = 0, n_sn_sleep = 0;

  // ---------------- Gaussian parameter memory ----------------
  int w [S][M], mu [S][D][M], sg [S][D][M], xf [NB][F][D];
  int beats = 0, bstate = 0, bbeat = 0;
  always_comb
    foreach (sr_p_w[m]) begin
      sr_p_w[m]     = score_t'(w[bstate % S][m]);
      sr_p_mu[m]    = feat_t'((bbeat == 0) ? 0 : mu[bstate % S][(bbeat + D - 1) % D][m]);
      sr_p_sigma[m] = feat_t'((bbeat == 0) ? 0 : sg[bstate % S][(bbeat + D - 1) % D][m]);
    end
  always @(posedge clk) if (rst_n) begin
    if (sr_p_valid && sr_p_ready) begin
      beats++;
      if (bbeat == D) begin bbeat <= 0; bstate <= bstate + 1; end
      else bbeat <= bbeat + 1;
    end
    if (sr_p_ready && !sr_p_valid) n_param_stall++;
    if (sr_burst_valid && !sr_burst_accept) n_burst_wait++;
    sr_p_valid <= ($urandom_range(0, 5) != 0);
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

  vit_model mdl;
  int g_burst = -1, v_burst = 0;
  longint tr_sum = 0;
  always @(posedge clk) if (rst_n) begin
    if (sr_burst_accept) g_burst++;
    if (dut.u_sr.res_we) begin
      real r;
      r = ref_b(g_burst, int'(dut.u_sr.res_state), int'(dut.u_sr.res_frame));
      `CHECK((real'(dut.u_sr.res_data) - r) < 100.0 && (r - real'(dut.u_sr.res_data)) < 100.0,
             "GMM output probability")
      mdl.gmm[(g_burst * 65536 + int'(dut.u_sr.res_state)) * 256 + int'(dut.u_sr.res_frame)] =
        longint'(dut.u_sr.res_data);
    end
    if (sr_tr_valid) tr_sum += longint'(sr_tr_score);
    if (dut.u_sr.u_vit.done && dut.u_sr.vit_active) begin
      mdl.run(v_burst);
      `CHECK(longint'(sr_stats.created) == mdl.created, $sformatf("burst %0d created", v_burst))
      `CHECK(longint'(sr_stats.overwritten) == mdl.overwritten, $sformatf("burst %0d overwritten", v_burst))
      `CHECK(longint'(sr_stats.pruned) == mdl.pruned, $sformatf("burst %0d pruned", v_burst))
      `CHECK(longint'(sr_stats.overflow) == mdl.overflow, $sformatf("burst %0d overflow", v_burst))
      `CHECK(longint'(sr_stats.trellis) == mdl.trellis, $sformatf("burst %0d trellis", v_burst))
      `CHECK(longint'(sr_thr) == mdl.thr, $sformatf("burst %0d threshold", v_burst))
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
        sr_fb_wr_en = 1; sr_fb_wr_bank = k[0]; sr_fb_wr_frame = f[$clog2(F)-1:0];
        sr_fb_wr_dim = d[$clog2(D)-1:0]; sr_fb_wr_data = feat_t'(xf[k][f][d]);
      end
    @(negedge clk); sr_fb_wr_en = 0;
  endtask

  task automatic recognizer_thread();
    @(negedge clk); sr_search_init = 1;
    @(negedge clk); sr_search_init = 0;
    mdl.init();
    write_features(0);
    for (int k = 0; k < NB; k++) begin
      @(negedge clk);
      sr_burst_valid = 1; sr_burst_fbank = k[0];
      @(posedge clk);
      while (!sr_burst_accept) @(posedge clk);
      @(negedge clk);
      sr_burst_valid = 0;
      if (k + 1 < NB) write_features(k + 1);
      while (dut.u_sr.u_gmm.busy) @(negedge clk);
    end
    while (!sr_idle) @(negedge clk);
    `CHECK(sr_bursts_done == NB, "all bursts searched")
    `CHECK(beats == NB * S * (D + 1), "parameters fetched once per state per burst")
    `CHECK(tr_sum == mdl.tr_sum, "trellis stream")
  endtask

  // ---------------- 10T-S SRAM thread ----------------
  logic [127:0] m10 [512];
  task automatic s10_thread();
    logic [127:0] last;
    longint tog;
    last = '0; tog = 0;
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      s10_we = 1; s10_waddr = 9'(a);
      s10_wdata = {$urandom, $urandom, $urandom, $urandom};
      m10[a] = s10_wdata;
    end
    @(negedge clk); s10_we = 0;
    for (int i = 0; i < 3000; i++) begin
      int ra, wa;
      logic [127:0] e, wd;
      ra = $urandom_range(0, 511);
      wa = ($urandom_range(0, 5) == 0) ? ra : $urandom_range(0, 511);
      wd = {$urandom, $urandom, $urandom, $urandom};
      if (wa == ra) n_s10_rdw++;
      e = m10[ra];
      s10_re = 1; s10_raddr = 9'(ra); s10_we = 1; s10_waddr = 9'(wa); s10_wdata = wd;
      @(negedge clk);
      s10_re = 0; s10_we = 0;
      m10[wa] = wd;
      `CHECK(s10_rdata == e, "10T-S read data")
      tog += $countones(e ^ last);
      last = e;
    end
    `CHECK(s10_rbl_toggles == 32'(tog), "10T-S bitline transitions")
  endtask

  // ---------------- 9T/18T SRAM thread ----------------
  logic [15:0] m9 [8192];
  logic [7:0] mm9;
  function automatic int p9(int a);
    if (mm9[a / 1024]) return (a / 1024) * 1024 + ((((a / 8) % 128) * 2) % 128) * 8 + a % 8;
    return a;
  endfunction
  function automatic bit bad9(int a);
    return mm9[a / 1024] && ((a / 8) % 128) >= 64;
  endfunction
  task automatic s9_wr(int a, logic [15:0] d);
    @(negedge clk);
    s9_a_en = 1; s9_a_we = 1; s9_a_addr = 13'(a); s9_a_wdata = d;
    @(negedge clk);
    s9_a_en = 0; s9_a_we = 0;
    `CHECK(s9_a_err == bad9(a), "9T/18T write error flag")
    if (bad9(a)) n_s9_err++;
    else begin
      m9[p9(a)] = d;
      if (mm9[a / 1024]) m9[p9(a) + 8] = d;
    end
  endtask
  task automatic s9_rd(int a, int b);
    @(negedge clk);
    s9_a_en = 1; s9_a_addr = 13'(a); s9_b_en = 1; s9_b_addr = 13'(b);
    @(negedge clk);
    s9_a_en = 0; s9_b_en = 0;
    if (!bad9(a)) `CHECK(s9_a_rdata == m9[p9(a)], "9T/18T port A read")
    if (!bad9(b)) `CHECK(s9_b_rdata == m9[p9(b)], "9T/18T port B read")
    `CHECK(s9_b_diff == mm9[b / 1024], "9T/18T port B readout mode")
    if (s9_b_diff && !bad9(b)) n_s9_diff++;
  endtask
  task automatic s9_thread();
    mm9 = '0;
    for (int a = 0; a < 8192; a++) s9_wr(a, 16'($urandom));
    for (int k = 0; k < 8; k++) begin
      int bl;
      bl = $urandom_range(0, 7);
      @(negedge clk);
      s9_cfg_we = 1; s9_cfg_block = 3'(bl); s9_cfg_mode = !mm9[bl];
      @(negedge clk);
      s9_cfg_we = 0;
      mm9[bl] = !mm9[bl];
      n_s9_switch++;
      `CHECK(s9_mode == mm9, "9T/18T mode register")
      for (int a = bl * 1024; a < (bl + 1) * 1024; a++) if (!bad9(a)) s9_wr(a, 16'($urandom));
      for (int i = 0; i < 300; i++) begin
        int a;
        a = $urandom_range(0, 8191);
        if ($urandom_range(0, 3) == 0) s9_wr(a, 16'($urandom));
        s9_rd(a, $urandom_range(0, 8191));
      end
    end
  endtask

  // ---------------- sensor node thread ----------------
  int mic_h [16][20000];
  longint loc_h [20000];
  int kk = 0;
  longint sn_q [$];
  always @(posedge clk) if (rst_n && sn_down_valid) begin
    longint e;
    n_sn_out++;
    e = sn_q.pop_front();
    if (e != 64'h7fffffffffffffff) `CHECK(longint'(sn_down_data) == e, "aggregated node output")
  end
  always @(posedge clk) if (rst_n && $past(sn_proc_en) && !sn_proc_en) n_sn_sleep++;

  task automatic sn_cycle(bit vad, int vs);
    bit awake;
    @(negedge clk);
    awake = sn_proc_en;
    sn_mic_valid = 1; sn_up_valid = awake; sn_vad_valid = vad; sn_vad_sample = 10'(vs);
    foreach (sn_mic[i]) sn_mic[i] = 16'(int'($urandom_range(0, 2000)) - 1000);
    sn_up_data = 24'(int'($urandom_range(0, 20000)) - 10000);
    if (awake) begin
      longint s;
      bit ok;
      s = 0; ok = 1;
      foreach (sn_mic[i]) mic_h[i][kk] = int'(sn_mic[i]);
      foreach (sn_mic[i])
        if (kk >= int'(sn_mic_delay[i])) s += mic_h[i][kk - int'(sn_mic_delay[i])];
        else ok = 0;
      loc_h[kk] = ok ? s : 64'h7fffffffffffffff;
      if (kk >= 2 && loc_h[kk - 2] != 64'h7fffffffffffffff)
        sn_q.push_back(loc_h[kk - 2] + longint'(sn_up_data));
      else sn_q.push_back(64'h7fffffffffffffff);
      kk++;
    end
    @(posedge clk);
    #1;
    sn_mic_valid = 0; sn_up_valid = 0; sn_vad_valid = 0;
  endtask

  task automatic sn_frame(bit tone);
    for (int s = 0; s < 256; s++) begin
      int v;
      v = tone ? 512 + int'(150.0 * $sin(2.0 * 3.14159265 * real'(s) / 10.0))
               : 512 + $urandom_range(0, 20) - 10;
      for (int c = 0; c < 2; c++) sn_cycle(c == 0, v);
    end
  endtask

  task automatic sn_thread();
    for (int f = 0; f < 2; f++) sn_frame(0);
    for (int f = 0; f < 3; f++) sn_frame(1);
    for (int f = 0; f < 7; f++) sn_frame(0);
    `CHECK(sn_wakeups == 1, "sensor node woke once")
    `CHECK(n_sn_out == kk, "one aggregated output per awake sample")
    `CHECK(!sn_up_unaligned, "upstream stream aligned")
  endtask

  initial begin
    foreach (sn_mic[i]) begin sn_mic[i] = 0; sn_mic_delay[i] = 8'($urandom_range(0, 30)); end
    mdl = new(QD, BEAM, TOPN, NS, DP, F);
    build();
    u_mem.m = mdl;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (2) @(negedge clk);
    fork
      recognizer_thread();
      s10_thread();
      s9_thread();
      sn_thread();
    join
    // every mechanism must have happened at least once
    `CHECK(sr_overlap_cycles > 0, "mechanism: GMM / Viterbi pipeline overlap")
    `CHECK(n_param_stall > 0, "mechanism: parameter stream stall")
    `CHECK(n_burst_wait > 0, "mechanism: burst held back while both result banks busy")
    `CHECK(sr_stats.pruned > 0, "mechanism: threshold cut")
    `CHECK(sr_stats.overwritten > 0, "mechanism: token overwrite")
    `CHECK(sr_stats.overflow > 0, "mechanism: node queue overflow")
    `CHECK(sr_stats.detail_frames > 0, "mechanism: detailed language-model stage")
    `CHECK(sr_stats.trellis > 0, "mechanism: trellis save")
    `CHECK(sr_bc_hits > 0 && sr_bc_misses > 0, "mechanism: bigram cache hit and miss")
    `CHECK(sr_tk_hits > 0 && sr_tk_misses > 0, "mechanism: token cache hit and miss")
    `CHECK(u_mem.n_tk_wr > 0, "mechanism: token cache write-back")
    `CHECK(n_s10_rdw > 0, "mechanism: 10T-S read during write")
    `CHECK(s10_rbl_toggles > 0, "mechanism: 10T-S bitline transitions")
    `CHECK(n_s9_switch > 0, "mechanism: 9T/18T mode switch")
    `CHECK(n_s9_err > 0, "mechanism: 9T/18T out-of-range dependable access")
    `CHECK(n_s9_diff > 0, "mechanism: 9T/18T differential readout")
    `CHECK(sn_wakeups > 0, "mechanism: VAD wake-up")
    `CHECK(n_sn_sleep > 0, "mechanism: return to sleep")
    `CHECK(n_sn_out > 0, "mechanism: beamformed aggregated output")
    $display("mech: overlap=%0d pstall=%0d bwait=%0d pruned=%0d ow=%0d ovf=%0d det=%0d tr=%0d bc=%0d/%0d tk=%0d/%0d wb=%0d rdw=%0d sw=%0d err=%0d diff=%0d wake=%0d sleep=%0d out=%0d",
             sr_overlap_cycles, n_param_stall, n_burst_wait, sr_stats.pruned, sr_stats.overwritten,
             sr_stats.overflow, sr_stats.detail_frames, sr_stats.trellis, sr_bc_hits, sr_bc_misses,
             sr_tk_hits, sr_tk_misses, u_mem.n_tk_wr, n_s10_rdw, n_s9_switch, n_s9_err, n_s9_diff,
             sn_wakeups, n_sn_sleep, n_sn_out);
    `TB_END
  end
endmodule
