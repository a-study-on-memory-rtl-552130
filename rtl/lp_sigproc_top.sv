// lp_sigproc_top: the four designs of this project side by side.
//
//   sr_*  speech_recognizer - GMM + Viterbi back end for 60k-word continuous
//                             speech recognition with burst GMM computation,
//                             threshold-cut beam pruning, two-stage
//                             language-model search and two caches;
//   s10_* sram_10ts         - 64-kb two-port non-precharge SRAM (512 x 128 b);
//   s9_*  sram_9t18t        - 128-kb dependable dual-port SRAM with per-block
//                             normal / dependable modes;
//   sn_*  sensor_node       - microphone-array node: zero-crossing VAD, power
//                             manager, delay-and-sum beamforming and
//                             aggregation.
// The designs share only the clock and the active-low asynchronous reset.
// Every port of each design is brought out unchanged under its prefix; the
// external memories of the recognizer (Gaussian parameters, dictionary,
// bigram data, token list) and the microphone ADCs sit outside.
module lp_sigproc_top
  import sr_pkg::*;
#(
  parameter int unsigned SR_STATES = 2000,
  parameter int unsigned SR_FRAMES = 50,
  parameter int unsigned SR_DIMS   = 25,
  parameter int unsigned SR_MIX    = 16,
  parameter int unsigned SR_TOPN   = 10,
  parameter int unsigned SR_QDEPTH = 8192,
  parameter int unsigned SR_BEAM   = 4000,
  parameter int unsigned SR_DETAIL = 5,
  parameter int unsigned SR_NSTART = 1000,
  parameter int unsigned SR_BC_SETS  = 1024,
  parameter int unsigned SR_TK_LINES = 8192
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // ---------------- speech recognizer ----------------
  input  logic                          sr_search_init,
  input  logic [$clog2(SR_STATES+1)-1:0] sr_num_states,
  input  logic                          sr_burst_valid,
  input  logic                          sr_burst_fbank,
  output logic                          sr_burst_accept,
  output logic [31:0]                   sr_bursts_done,
  output logic [31:0]                   sr_overlap_cycles,
  output logic                          sr_idle,
  input  logic                          sr_fb_wr_en,
  input  logic                          sr_fb_wr_bank,
  input  logic [$clog2(SR_FRAMES)-1:0]  sr_fb_wr_frame,
  input  logic [$clog2(SR_DIMS)-1:0]    sr_fb_wr_dim,
  input  feat_t                         sr_fb_wr_data,
  input  logic                          sr_p_valid,
  output logic                          sr_p_ready,
  input  score_t                        sr_p_w     [SR_MIX],
  input  feat_t                         sr_p_mu    [SR_MIX],
  input  feat_t                         sr_p_sigma [SR_MIX],
  output logic                          sr_dict_req,
  output node_t                         sr_dict_node,
  input  logic                          sr_dict_ack,
  input  dict_node_t                    sr_dict_rdata,
  output logic                          sr_bd_req,
  output word_t                         sr_bd_word,
  output logic [15:0]                   sr_bd_start,
  input  logic                          sr_bd_ack,
  input  logic signed [15:0]            sr_bd_logp,
  output logic                          sr_bl_mem_req,
  output word_t                         sr_bl_mem_word,
  input  logic                          sr_bl_mem_rvalid,
  input  bigram_entry_t                 sr_bl_mem_line [SR_TOPN],
  output logic                          sr_tk_mem_req,
  output logic                          sr_tk_mem_we,
  output node_t                         sr_tk_mem_node,
  output token_t                        sr_tk_mem_wdata,
  input  logic                          sr_tk_mem_ack,
  input  token_t                        sr_tk_mem_rdata,
  output logic                          sr_tr_valid,
  output logic [STAMP_W-1:0]            sr_tr_stamp,
  output word_t                         sr_tr_word,
  output score_t                        sr_tr_score,
  output score_t                        sr_thr,
  output logic [19:0]                   sr_n_active,
  output vit_stats_t                    sr_stats,
  output logic [31:0]                   sr_bc_hits,
  output logic [31:0]                   sr_bc_misses,
  output logic [31:0]                   sr_tk_hits,
  output logic [31:0]                   sr_tk_misses,
  // ---------------- 10T-S SRAM ----------------
  input  logic                          s10_we,
  input  logic [8:0]                    s10_waddr,
  input  logic [127:0]                  s10_wdata,
  input  logic                          s10_re,
  input  logic [8:0]                    s10_raddr,
  output logic [127:0]                  s10_rdata,
  output logic [31:0]                   s10_rbl_toggles,
  // ---------------- 9T/18T SRAM ----------------
  input  logic                          s9_cfg_we,
  input  logic [2:0]                    s9_cfg_block,
  input  logic                          s9_cfg_mode,
  output logic [7:0]                    s9_mode,
  input  logic                          s9_a_en,
  input  logic                          s9_a_we,
  input  logic [12:0]                   s9_a_addr,
  input  logic [15:0]                   s9_a_wdata,
  output logic [15:0]                   s9_a_rdata,
  output logic                          s9_a_err,
  input  logic                          s9_b_en,
  input  logic [12:0]                   s9_b_addr,
  output logic [15:0]                   s9_b_rdata,
  output logic                          s9_b_diff,
  output logic                          s9_b_err,
  // ---------------- sensor node ----------------
  input  logic                          sn_vad_valid,
  input  logic [9:0]                    sn_vad_sample,
  input  logic                          sn_mic_valid,
  input  logic signed [15:0]            sn_mic       [16],
  input  logic [7:0]                    sn_mic_delay [16],
  input  logic                          sn_up_valid,
  input  logic signed [23:0]            sn_up_data,
  input  logic [7:0]                    sn_agg_delay_local,
  input  logic [7:0]                    sn_agg_delay_up,
  output logic                          sn_down_valid,
  output logic signed [23:0]            sn_down_data,
  output logic                          sn_speech,
  output logic                          sn_proc_en,
  output logic [15:0]                   sn_mic_en,
  output logic                          sn_adc_hi_mode,
  output logic [31:0]                   sn_wakeups,
  output logic [31:0]                   sn_active_frames,
  output logic                          sn_up_unaligned
);
  speech_recognizer #(.STATES(SR_STATES), .FRAMES(SR_FRAMES), .DIMS(SR_DIMS),
                      .MIX(SR_MIX), .TOPN(SR_TOPN), .QDEPTH(SR_QDEPTH), .BEAM(SR_BEAM),
                      .DETAIL_PERIOD(SR_DETAIL), .N_START(SR_NSTART), .BC_SETS(SR_BC_SETS),
                      .TK_LINES(SR_TK_LINES)) u_sr (
    .clk(clk), .rst_n(rst_n), .search_init(sr_search_init), .num_states(sr_num_states),
    .burst_valid(sr_burst_valid), .burst_fbank(sr_burst_fbank), .burst_accept(sr_burst_accept),
    .bursts_done(sr_bursts_done), .overlap_cycles(sr_overlap_cycles), .idle(sr_idle),
    .fb_wr_en(sr_fb_wr_en), .fb_wr_bank(sr_fb_wr_bank), .fb_wr_frame(sr_fb_wr_frame),
    .fb_wr_dim(sr_fb_wr_dim), .fb_wr_data(sr_fb_wr_data),
    .p_valid(sr_p_valid), .p_ready(sr_p_ready), .p_w(sr_p_w), .p_mu(sr_p_mu), .p_sigma(sr_p_sigma),
    .dict_req(sr_dict_req), .dict_node(sr_dict_node), .dict_ack(sr_dict_ack),
    .dict_rdata(sr_dict_rdata),
    .bd_req(sr_bd_req), .bd_word(sr_bd_word), .bd_start(sr_bd_start), .bd_ack(sr_bd_ack),
    .bd_logp(sr_bd_logp),
    .bl_mem_req(sr_bl_mem_req), .bl_mem_word(sr_bl_mem_word), .bl_mem_rvalid(sr_bl_mem_rvalid),
    .bl_mem_line(sr_bl_mem_line),
    .tk_mem_req(sr_tk_mem_req), .tk_mem_we(sr_tk_mem_we), .tk_mem_node(sr_tk_mem_node),
    .tk_mem_wdata(sr_tk_mem_wdata), .tk_mem_ack(sr_tk_mem_ack), .tk_mem_rdata(sr_tk_mem_rdata),
    .tr_valid(sr_tr_valid), .tr_stamp(sr_tr_stamp), .tr_word(sr_tr_word), .tr_score(sr_tr_score),
    .thr(sr_thr), .n_active(sr_n_active), .stats(sr_stats),
    .bc_hits(sr_bc_hits), .bc_misses(sr_bc_misses), .tk_hits(sr_tk_hits), .tk_misses(sr_tk_misses));

  sram_10ts u_s10 (
    .clk(clk), .rst_n(rst_n), .we(s10_we), .waddr(s10_waddr), .wdata(s10_wdata),
    .re(s10_re), .raddr(s10_raddr), .rdata(s10_rdata), .rbl_toggles(s10_rbl_toggles));

  sram_9t18t u_s9 (
    .clk(clk), .rst_n(rst_n), .cfg_we(s9_cfg_we), .cfg_block(s9_cfg_block),
    .cfg_mode(s9_cfg_mode), .mode(s9_mode),
    .a_en(s9_a_en), .a_we(s9_a_we), .a_addr(s9_a_addr), .a_wdata(s9_a_wdata),
    .a_rdata(s9_a_rdata), .a_err(s9_a_err),
    .b_en(s9_b_en), .b_addr(s9_b_addr), .b_rdata(s9_b_rdata), .b_diff(s9_b_diff),
    .b_err(s9_b_err));

  sensor_node u_sn (
    .clk(clk), .rst_n(rst_n), .vad_valid(sn_vad_valid), .vad_sample(sn_vad_sample),
    .mic_valid(sn_mic_valid), .mic(sn_mic), .mic_delay(sn_mic_delay),
    .up_valid(sn_up_valid), .up_data(sn_up_data),
    .agg_delay_local(sn_agg_delay_local), .agg_delay_up(sn_agg_delay_up),
    .down_valid(sn_down_valid), .down_data(sn_down_data),
    .speech(sn_speech), .proc_en(sn_proc_en), .mic_en(sn_mic_en), .adc_hi_mode(sn_adc_hi_mode),
    .wakeups(sn_wakeups), .active_frames(sn_active_frames), .up_unaligned(sn_up_unaligned));
endmodule
