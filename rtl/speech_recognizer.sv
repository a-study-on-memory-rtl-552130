// speech_recognizer: low-memory-bandwidth continuous speech recognition
// back end (GMM output probabilities + Viterbi beam search).
//
// Feature vectors arrive in bursts of FRAMES frames. For each burst the
// gmm_processor computes the output probability of every GMM state for every
// frame, reading each state's Gaussian parameters from external memory only
// once per burst, and writes them into one bank of the gmm_result_ram. The
// viterbi_core then runs the beam search over those FRAMES frames from that
// bank while the gmm_processor already computes the next burst into the other
// bank: GMM and Viterbi form a two-stage pipeline.
//
// Control: search_init clears the search (run it once before the first
// burst). The host writes a burst's feature vectors through fb_* into a
// feature bank, then holds burst_valid with burst_fbank until burst_accept.
// A burst is accepted when the GMM side is idle and a result bank is free.
// bursts_done counts bursts finished by the Viterbi side; overlap_cycles
// counts cycles in which both sides were busy.
// External memories (Gaussian parameters, tree dictionary, bigram data,
// token list) and the trellis output are ports; see gmm_processor and
// viterbi_core for their protocols.
// Defaults are the 60k-word configuration of the design description: 2,000
// states, 16 mixtures, 25 dimensions, 50-frame bursts, beam 4,000, stage-2
// language-model search every 5 frames, 1,000 start nodes.
module speech_recognizer
  import sr_pkg::*;
#(
  parameter int unsigned STATES        = 2000,
  parameter int unsigned FRAMES        = 50,
  parameter int unsigned DIMS          = 25,
  parameter int unsigned MIX           = 16,
  parameter int unsigned QDEPTH        = 8192,
  parameter int unsigned BEAM          = 4000,
  parameter int unsigned TOPN          = 10,
  parameter int unsigned DETAIL_PERIOD = 5,
  parameter int unsigned N_START       = 1000,
  parameter int unsigned BC_SETS       = 1024,
  parameter int unsigned TK_LINES      = 8192
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       search_init,
  input  logic [$clog2(STATES+1)-1:0] num_states,
  input  logic                       burst_valid,
  input  logic                       burst_fbank,
  output logic                       burst_accept,
  output logic [31:0]                bursts_done,
  output logic [31:0]                overlap_cycles,
  output logic                       idle,
  // feature vectors
  input  logic                       fb_wr_en,
  input  logic                       fb_wr_bank,
  input  logic [$clog2(FRAMES)-1:0]  fb_wr_frame,
  input  logic [$clog2(DIMS)-1:0]    fb_wr_dim,
  input  feat_t                      fb_wr_data,
  // Gaussian parameters
  input  logic                       p_valid,
  output logic                       p_ready,
  input  score_t                     p_w     [MIX],
  input  feat_t                      p_mu    [MIX],
  input  feat_t                      p_sigma [MIX],
  // tree dictionary
  output logic                       dict_req,
  output node_t                      dict_node,
  input  logic                       dict_ack,
  input  dict_node_t                 dict_rdata,
  // detailed bigram values
  output logic                       bd_req,
  output word_t                      bd_word,
  output logic [15:0]                bd_start,
  input  logic                       bd_ack,
  input  logic signed [15:0]         bd_logp,
  // bigram cache fills
  output logic                       bl_mem_req,
  output word_t                      bl_mem_word,
  input  logic                       bl_mem_rvalid,
  input  bigram_entry_t              bl_mem_line [TOPN],
  // token list
  output logic                       tk_mem_req,
  output logic                       tk_mem_we,
  output node_t                      tk_mem_node,
  output token_t                     tk_mem_wdata,
  input  logic                       tk_mem_ack,
  input  token_t                     tk_mem_rdata,
  // trellis
  output logic                       tr_valid,
  output logic [STAMP_W-1:0]         tr_stamp,
  output word_t                      tr_word,
  output score_t                     tr_score,
  // status
  output score_t                     thr,
  output logic [19:0]                n_active,
  output vit_stats_t                 stats,
  output logic [31:0]                bc_hits,
  output logic [31:0]                bc_misses,
  output logic [31:0]                tk_hits,
  output logic [31:0]                tk_misses
);
  // ---------------- burst sequencing ----------------
  logic gmm_busy, gmm_done, gmm_start;
  logic vit_busy, vit_done, vit_run, vit_init;
  logic gb, vb;                 // next bank for GMM, next bank for Viterbi
  logic pend [2];               // bank holds results not yet searched
  logic gmm_bank_q;             // bank the running GMM burst writes
  logic vit_active;             // Viterbi is searching bank vb

  assign gmm_start    = burst_valid && !gmm_busy && !pend[gb] && !(vit_active && vb == gb)
                        && !search_init;
  assign burst_accept = gmm_start;
  assign vit_run      = pend[vb] && !vit_busy && !vit_active && !search_init;
  assign vit_init     = search_init;
  assign idle         = !gmm_busy && !gmm_done && !vit_busy && !pend[0] && !pend[1] && !vit_active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gb <= 1'b0; vb <= 1'b0; pend[0] <= 1'b0; pend[1] <= 1'b0; gmm_bank_q <= 1'b0;
      vit_active <= 1'b0; bursts_done <= '0; overlap_cycles <= '0;
    end else if (search_init) begin
      gb <= 1'b0; vb <= 1'b0; pend[0] <= 1'b0; pend[1] <= 1'b0;
      vit_active <= 1'b0; bursts_done <= '0; overlap_cycles <= '0;
    end else begin
      if (gmm_start) begin gmm_bank_q <= gb; gb <= ~gb; end
      if (gmm_done) pend[gmm_bank_q] <= 1'b1;
      if (vit_run) vit_active <= 1'b1;
      if (vit_done && vit_active) begin
        vit_active  <= 1'b0;
        pend[vb]    <= 1'b0;
        vb          <= ~vb;
        bursts_done <= bursts_done + 1'b1;
      end
      if (gmm_busy && vit_busy) overlap_cycles <= overlap_cycles + 1'b1;
    end
  end

  // ---------------- GMM processor ----------------
  logic                      res_we, res_wbank;
  logic [$clog2(STATES)-1:0] res_state;
  logic [$clog2(FRAMES)-1:0] res_frame;
  score_t                    res_data;

  gmm_processor #(.STATES(STATES), .FRAMES(FRAMES), .DIMS(DIMS), .MIX(MIX)) u_gmm (
    .clk(clk), .rst_n(rst_n), .start(gmm_start), .num_states(num_states),
    .feat_bank(burst_fbank), .res_bank(gb), .busy(gmm_busy), .done(gmm_done),
    .fb_wr_en(fb_wr_en), .fb_wr_bank(fb_wr_bank), .fb_wr_frame(fb_wr_frame),
    .fb_wr_dim(fb_wr_dim), .fb_wr_data(fb_wr_data),
    .p_valid(p_valid), .p_ready(p_ready), .p_w(p_w), .p_mu(p_mu), .p_sigma(p_sigma),
    .res_we(res_we), .res_wbank(res_wbank), .res_state(res_state), .res_frame(res_frame),
    .res_data(res_data));

  // ---------------- GMM result RAM ----------------
  logic                      rr_en, rr_bank;
  logic [$clog2(STATES)-1:0] rr_state;
  logic [$clog2(FRAMES)-1:0] rr_frame;
  score_t                    rr_data;

  gmm_result_ram #(.STATES(STATES), .FRAMES(FRAMES)) u_res (
    .clk(clk), .wr_en(res_we), .wr_bank(res_wbank), .wr_state(res_state),
    .wr_frame(res_frame), .wr_data(res_data),
    .rd_en(rr_en), .rd_bank(rr_bank), .rd_state(rr_state), .rd_frame(rr_frame),
    .rd_data(rr_data));

  // ---------------- Viterbi processor ----------------
  viterbi_core #(.STATES(STATES), .FRAMES(FRAMES), .QDEPTH(QDEPTH), .BEAM(BEAM),
                 .TOPN(TOPN), .DETAIL_PERIOD(DETAIL_PERIOD), .N_START(N_START),
                 .BC_SETS(BC_SETS), .TK_LINES(TK_LINES)) u_vit (
    .clk(clk), .rst_n(rst_n), .init(vit_init), .run(vit_run), .res_bank(vb),
    .busy(vit_busy), .done(vit_done),
    .dict_req(dict_req), .dict_node(dict_node), .dict_ack(dict_ack), .dict_rdata(dict_rdata),
    .res_rd_en(rr_en), .res_rd_bank(rr_bank), .res_rd_state(rr_state), .res_rd_frame(rr_frame),
    .res_rd_data(rr_data),
    .bd_req(bd_req), .bd_word(bd_word), .bd_start(bd_start), .bd_ack(bd_ack), .bd_logp(bd_logp),
    .bl_mem_req(bl_mem_req), .bl_mem_word(bl_mem_word), .bl_mem_rvalid(bl_mem_rvalid),
    .bl_mem_line(bl_mem_line),
    .tk_mem_req(tk_mem_req), .tk_mem_we(tk_mem_we), .tk_mem_node(tk_mem_node),
    .tk_mem_wdata(tk_mem_wdata), .tk_mem_ack(tk_mem_ack), .tk_mem_rdata(tk_mem_rdata),
    .tr_valid(tr_valid), .tr_stamp(tr_stamp), .tr_word(tr_word), .tr_score(tr_score),
    .thr(thr), .n_active(n_active), .stats(stats),
    .bc_hits(bc_hits), .bc_misses(bc_misses), .tk_hits(tk_hits), .tk_misses(tk_misses));
endmodule
