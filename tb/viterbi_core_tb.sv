// viterbi_core_tb: runs two reduced Viterbi processors (6 start nodes,
// 18-node dictionary of 6 three-node words, 6 frames per run, top-3 successor
// lists, detailed stage every 3rd frame, beam 6, 2-set bigram cache and
// 4-line token cache so that both caches miss and evict) against the
// reference model in vit_model.svh. Instance 0 has a 32-entry queue that
// never fills; instance 1 has a 4-entry queue so that new nodes overflow.
// After every run of 6 frames, all event counters, the number of active
// nodes, the threshold and the trellis stream (count, score sum, word sum)
// must equal the model's. A second init checks that a new search starts
// clean although the token list still holds the old one.
`include "tb/tb_util.svh"
`include "tb/vit_model.svh"
module viterbi_core_tb;
  import sr_pkg::*;
  localparam int S = 8, F = 6, TOPN = 3, NS = 6, DP = 3, BEAM = 6;
  localparam int NW = 6, NN = 18;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, init = 0, run = 0, res_bank = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    `TB_END
  end

  logic       busy [2], done [2];
  vit_stats_t stats [2];
  score_t     thr [2];
  logic [19:0] n_active [2];
  logic [31:0] bc_hits [2], bc_misses [2], tk_hits [2], tk_misses [2];
  longint tr_n [2], tr_sum [2], tr_wsum [2];

  for (genvar g = 0; g < 2; g++) begin : inst
    localparam int QD = (g == 0) ? 32 : 4;
    logic dict_req, dict_ack, res_rd_en, res_rd_bank, bd_req, bd_ack;
    logic bl_mem_req, bl_mem_rvalid, tk_mem_req, tk_mem_we, tk_mem_ack, tr_valid;
    node_t dict_node, tk_mem_node;
    dict_node_t dict_rdata;
    logic [$clog2(S)-1:0] res_rd_state;
    logic [$clog2(F)-1:0] res_rd_frame;
    score_t res_rd_data, tr_score;
    word_t bd_word, bl_mem_word, tr_word;
    logic [15:0] bd_start, tr_stamp;
    logic signed [15:0] bd_logp;
    bigram_entry_t bl_mem_line [TOPN];
    token_t tk_mem_wdata, tk_mem_rdata;

    viterbi_core #(.STATES(S), .FRAMES(F), .QDEPTH(QD), .BEAM(BEAM), .TOPN(TOPN),
                   .DETAIL_PERIOD(DP), .N_START(NS), .BC_SETS(2), .TK_LINES(4)) dut (
      .clk, .rst_n, .init, .run, .res_bank, .busy(busy[g]), .done(done[g]),
      .dict_req, .dict_node, .dict_ack, .dict_rdata,
      .res_rd_en, .res_rd_bank, .res_rd_state, .res_rd_frame, .res_rd_data,
      .bd_req, .bd_word, .bd_start, .bd_ack, .bd_logp,
      .bl_mem_req, .bl_mem_word, .bl_mem_rvalid, .bl_mem_line,
      .tk_mem_req, .tk_mem_we, .tk_mem_node, .tk_mem_wdata, .tk_mem_ack, .tk_mem_rdata,
      .tr_valid, .tr_stamp, .tr_word, .tr_score,
      .thr(thr[g]), .n_active(n_active[g]), .stats(stats[g]),
      .bc_hits(bc_hits[g]), .bc_misses(bc_misses[g]), .tk_hits(tk_hits[g]), .tk_misses(tk_misses[g]));

    vit_mem #(.STATES(S), .FRAMES(F), .TOPN(TOPN), .LAT(2)) u_mem (
      .clk, .rst_n, .dict_req, .dict_node, .dict_ack, .dict_rdata,
      .res_rd_en, .res_rd_bank, .res_rd_state, .res_rd_frame, .res_rd_data,
      .bd_req, .bd_word, .bd_start, .bd_ack, .bd_logp,
      .bl_mem_req, .bl_mem_word, .bl_mem_rvalid, .bl_mem_line,
      .tk_mem_req, .tk_mem_we, .tk_mem_node, .tk_mem_wdata, .tk_mem_ack, .tk_mem_rdata);

    always @(posedge clk) if (tr_valid) begin
      tr_n[g]++; tr_sum[g] += longint'(tr_score); tr_wsum[g] += longint'(tr_word);
    end
  end

  vit_model mdl [2];

  task automatic build(vit_model x);
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
        x.dict[lvl * NS + r] = d;
      end
      for (int k = 0; k < TOPN; k++) begin
        bigram_entry_t e;
        e.word = word_t'($urandom_range(0, NS - 1));
        e.logp = -16'($urandom_range(0, 2000));
        x.topl[r].push_back(e);
      end
      for (int s = 0; s < NS; s++) x.bd[r * 65536 + s] = -longint'($urandom_range(0, 3000));
    end
    for (int b = 0; b < 2; b++)
      for (int s = 0; s < S; s++)
        for (int f = 0; f < F; f++) x.gmm[(b * 65536 + s) * 256 + f] = -longint'($urandom_range(0, 5000));
  endtask

  task automatic compare(int g, string tag);
    vit_model x;
    x = mdl[g];
    `CHECK(longint'(stats[g].frames) == x.frames, $sformatf("%s[%0d] frames %0d/%0d", tag, g, stats[g].frames, x.frames))
    `CHECK(longint'(stats[g].created) == x.created, $sformatf("%s[%0d] created %0d/%0d", tag, g, stats[g].created, x.created))
    `CHECK(longint'(stats[g].overwritten) == x.overwritten, $sformatf("%s[%0d] overwritten %0d/%0d", tag, g, stats[g].overwritten, x.overwritten))
    `CHECK(longint'(stats[g].pruned) == x.pruned, $sformatf("%s[%0d] pruned %0d/%0d", tag, g, stats[g].pruned, x.pruned))
    `CHECK(longint'(stats[g].overflow) == x.overflow, $sformatf("%s[%0d] overflow %0d/%0d", tag, g, stats[g].overflow, x.overflow))
    `CHECK(longint'(stats[g].trellis) == x.trellis, $sformatf("%s[%0d] trellis %0d/%0d", tag, g, stats[g].trellis, x.trellis))
    `CHECK(longint'(stats[g].detail_frames) == x.detail_frames, $sformatf("%s[%0d] detail frames", tag, g))
    `CHECK(longint'(stats[g].xword) == x.xword, $sformatf("%s[%0d] cross-word %0d/%0d", tag, g, stats[g].xword, x.xword))
    `CHECK(int'(n_active[g]) == x.q_node.size(), $sformatf("%s[%0d] active %0d/%0d", tag, g, n_active[g], x.q_node.size()))
    `CHECK(longint'(thr[g]) == x.thr, $sformatf("%s[%0d] threshold %0d/%0d", tag, g, thr[g], x.thr))
    `CHECK(tr_sum[g] == x.tr_sum && tr_wsum[g] == x.tr_wsum, $sformatf("%s[%0d] trellis stream", tag, g))
  endtask

  task automatic pulse_init();
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    `CHECK(done[0] && done[1], "init completes in one cycle")
    foreach (mdl[g]) mdl[g].init();
    foreach (tr_n[g]) begin tr_n[g] = 0; tr_sum[g] = 0; tr_wsum[g] = 0; end
  endtask

  task automatic do_run(int b);
    bit d0, d1;
    @(negedge clk); run = 1; res_bank = b[0];
    @(negedge clk); run = 0;
    d0 = 0; d1 = 0;
    while (!(d0 && d1)) begin
      @(posedge clk);
      d0 |= done[0]; d1 |= done[1];
    end
    @(negedge clk);
    foreach (mdl[g]) mdl[g].run(b);
  endtask

  initial begin
    mdl[0] = new(32, BEAM, TOPN, NS, DP, F);
    mdl[1] = new(4, BEAM, TOPN, NS, DP, F);
    build(mdl[0]);
    mdl[1].dict = mdl[0].dict; mdl[1].topl = mdl[0].topl;
    mdl[1].bd = mdl[0].bd; mdl[1].gmm = mdl[0].gmm;
    inst[0].u_mem.m = mdl[0];
    inst[1].u_mem.m = mdl[1];
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (2) @(negedge clk);
    pulse_init();
    for (int r = 0; r < 6; r++) begin
      do_run(r % 2);
      compare(0, $sformatf("run%0d", r));
      compare(1, $sformatf("run%0d", r));
    end
    // a new search on top of the old token list
    pulse_init();
    do_run(1);
    compare(0, "restart");
    compare(1, "restart");
    do_run(0);
    compare(0, "restart2");
    compare(1, "restart2");
    // the mechanisms under test must all have occurred
    `CHECK(stats[0].pruned > 0, "threshold cut pruned candidates")
    `CHECK(stats[0].overwritten > 0, "better paths overwrote tokens")
    `CHECK(stats[0].overflow == 0, "large queue never overflowed")
    `CHECK(stats[1].overflow > 0, "small queue overflowed")
    `CHECK(stats[0].detail_frames > 0, "detailed language-model stage ran")
    `CHECK(bc_hits[0] > 0 && bc_misses[0] > 0, "bigram cache hit and missed")
    `CHECK(tk_hits[0] > 0 && tk_misses[0] > 0, "token cache hit and missed")
    `CHECK(inst[0].u_mem.n_tk_wr > 0, "token cache wrote back dirty lines")
    $display("stats0 created=%0d ow=%0d pruned=%0d trellis=%0d xword=%0d bc=%0d/%0d tk=%0d/%0d",
             stats[0].created, stats[0].overwritten, stats[0].pruned, stats[0].trellis,
             stats[0].xword, bc_hits[0], bc_misses[0], tk_hits[0], tk_misses[0]);
    `TB_END
  end
endmodule
