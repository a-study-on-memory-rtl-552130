// viterbi_core: time-synchronous Viterbi beam search with a two-stage
// language-model search, threshold cut and caches.
//
// Each frame, every active node of the previous frame is expanded:
//   1. word-internal transitions: the self loop (score + log a_self) and the
//      move to the next node of the left-right HMM / tree dictionary
//      (score + log a_next + unigram difference), each plus the output
//      probability log b_j(x_t) of the destination read from the GMM result
//      RAM;
//   2. trellis save: a word-end node emits {frame, word, score};
//   3. cross-word transitions from a word-end node to word-start nodes with a
//      bigram probability. Stage 1, every frame, uses the top-TOPN successor
//      list of the word from the bigram_cache; stage 2, every DETAIL_PERIOD-th
//      frame instead, visits all N_START start nodes with bigram values read
//      from external memory.
// A new score below the threshold_cut threshold is dropped at once. Otherwise
// the destination's token (token_list_cache) tells whether the node is already
// active in the next frame: if not, it is created (node and score queued,
// token written with its queue slot); if so and the new score is higher, the
// token and the queued score are overwritten. The current frame's scores are
// read from the queue, so a node that is still waiting to be expanded keeps
// its own score even after its token has moved on to the next frame. At the end of a
// frame the threshold is updated and the next-frame queue becomes current.
// The modified unigram (difference values only) means a transition adds one
// stored value; no earlier probability is fetched and subtracted.
//
// Interface: init seeds the search with node 0 (score 0) and pulses done in
// the next cycle; the frame stamp is never reset, so tokens left by an
// earlier search stay inactive (it wraps after 65,536 frames). run (with res_bank)
// processes the FRAMES frames of one GMM result bank; busy falls and done
// pulses after the last. External memories use req/ack handshakes holding the
// request until ack: dict_* (tree dictionary), bd_* (detailed bigram values,
// one per (word, start node)), bl_mem_* (40-byte top-N lines for the bigram
// cache), tk_mem_* (token list). Trellis entries stream out on tr_*.
// The search steps follow the design description (Figs. 5.15-5.16); the
// one-transition-at-a-time sequencing, the memory formats and the queue size
// are this design's choices. Only one Viterbi lane is built.
// Some outputs of submodules and fields of fetched dictionary records are
// not needed here (the threshold unit's average and margin, the bigram
// cache's hit flag, record fields a given state does not use); lint reports
// them as unused and they are left connected for observation.
module viterbi_core
  import sr_pkg::*;
#(
  parameter int unsigned STATES        = 2000,   // GMM states
  parameter int unsigned FRAMES        = 50,     // frames per GMM burst
  parameter int unsigned QDEPTH        = 8192,   // active-node queue entries
  parameter int unsigned BEAM          = 4000,
  parameter int unsigned TOPN          = 10,
  parameter int unsigned DETAIL_PERIOD = 5,
  parameter int unsigned N_START       = 1000,
  parameter int unsigned BC_SETS       = 1024,
  parameter int unsigned TK_LINES      = 8192
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      init,
  input  logic                      run,
  input  logic                      res_bank,
  output logic                      busy,
  output logic                      done,
  // tree dictionary
  output logic                      dict_req,
  output node_t                     dict_node,
  input  logic                      dict_ack,
  input  dict_node_t                dict_rdata,
  // GMM result RAM read port (1-cycle latency)
  output logic                      res_rd_en,
  output logic                      res_rd_bank,
  output logic [$clog2(STATES)-1:0] res_rd_state,
  output logic [$clog2(FRAMES)-1:0] res_rd_frame,
  input  score_t                    res_rd_data,
  // detailed bigram values
  output logic                      bd_req,
  output word_t                     bd_word,
  output logic [15:0]               bd_start,
  input  logic                      bd_ack,
  input  logic signed [15:0]        bd_logp,
  // bigram cache line fills
  output logic                      bl_mem_req,
  output word_t                     bl_mem_word,
  input  logic                      bl_mem_rvalid,
  input  bigram_entry_t             bl_mem_line [TOPN],
  // token list memory
  output logic                      tk_mem_req,
  output logic                      tk_mem_we,
  output node_t                     tk_mem_node,
  output token_t                    tk_mem_wdata,
  input  logic                      tk_mem_ack,
  input  token_t                    tk_mem_rdata,
  // trellis output
  output logic                      tr_valid,
  output logic [STAMP_W-1:0]        tr_stamp,
  output word_t                     tr_word,
  output score_t                    tr_score,
  // status
  output score_t                    thr,
  output logic [19:0]               n_active,
  output vit_stats_t                stats,
  output logic [31:0]               bc_hits,
  output logic [31:0]               bc_misses,
  output logic [31:0]               tk_hits,
  output logic [31:0]               tk_misses
);
  localparam int unsigned QW = $clog2(QDEPTH + 1);
  localparam int unsigned FW = $clog2(FRAMES);

  typedef enum logic [4:0] {
    S_IDLE, S_FRAME, S_POP_DICT,
    S_R_DICT, S_R_GMM, S_R_CUT, S_R_TOK, S_R_TOKW, S_R_WR, S_R_WRW, S_NEXTOP,
    S_TRELLIS, S_BC_REQ, S_BC_WAIT, S_BD_REQ, S_NODE_END, S_FEND, S_FEND2, S_FEND3
  } state_e;
  typedef enum logic [2:0] {PH_SELF, PH_NEXT, PH_XW1, PH_XW2} phase_e;

  state_e st;
  phase_e ph;

  // active-node queues: q[cur] is being expanded, q[~cur] collects the next
  // frame. Each entry holds the node and its score; the score of a next-frame
  // entry is improved in place when a better path reaches the node.
  // (both queues share one memory each: the bank is the top address bit)
  node_t          q_node  [2*QDEPTH];
  score_t         q_score [2*QDEPTH];
  logic [QW-1:0]  q_n [2];
  logic           cur;
  logic [QW-1:0]  rd_ptr;

  logic [STAMP_W-1:0] stamp;
  logic [FW-1:0]      fl;
  logic               bank_q;
  logic [$clog2(DETAIL_PERIOD)-1:0] dcnt;
  logic               detail;

  node_t        n_node;
  score_t       n_score;
  dict_node_t   n_dict;
  node_t        r_dest;
  score_t       r_base;
  dict_node_t   r_dict;
  score_t       r_cand;
  logic [SLOT_W-1:0] r_slot;
  logic [15:0]  xk;
  bigram_entry_t bl_line [TOPN];
  logic signed [47:0] fsum;

  // ---------------- threshold cut ----------------
  logic tc_pass, tc_fend;
  score_t tc_avg, tc_margin;
  threshold_cut #(.BEAM(BEAM)) u_tc (
    .clk(clk), .rst_n(rst_n), .init(init && st == S_IDLE), .frame_end(tc_fend),
    .sum(fsum), .count(20'(q_n[~cur])), .cand(r_cand), .pass(tc_pass),
    .thr(thr), .avg(tc_avg), .margin(tc_margin));

  // ---------------- token list cache ----------------
  logic   tk_req, tk_we, tk_ready, tk_rv;
  node_t  tk_node;
  token_t tk_wdata, tk_rdata;
  token_list_cache #(.LINES(TK_LINES), .N_START(N_START)) u_tk (
    .clk(clk), .rst_n(rst_n), .req_valid(tk_req), .req_ready(tk_ready), .req_we(tk_we),
    .req_node(tk_node), .req_wdata(tk_wdata), .resp_valid(tk_rv), .resp_data(tk_rdata),
    .mem_req(tk_mem_req), .mem_we(tk_mem_we), .mem_node(tk_mem_node), .mem_wdata(tk_mem_wdata),
    .mem_ack(tk_mem_ack), .mem_rdata(tk_mem_rdata), .hits(tk_hits), .misses(tk_misses));

  // ---------------- bigram cache ----------------
  logic          bc_req, bc_ready, bc_rv, bc_hit;
  bigram_entry_t bc_line [TOPN];
  bigram_cache #(.SETS(BC_SETS), .TOPN(TOPN)) u_bc (
    .clk(clk), .rst_n(rst_n), .req_valid(bc_req), .req_ready(bc_ready), .req_word(n_dict.word_id),
    .resp_valid(bc_rv), .resp_hit(bc_hit), .resp_line(bc_line),
    .mem_req(bl_mem_req), .mem_word(bl_mem_word), .mem_rvalid(bl_mem_rvalid), .mem_line(bl_mem_line),
    .hits(bc_hits), .misses(bc_misses));

  // ---------------- combinational request signals ----------------
  always_comb begin
    tk_req   = 1'b0;
    tk_we    = 1'b0;
    tk_node  = r_dest;
    tk_wdata = '{stamp: stamp + 1'b1, slot: r_slot, score: r_cand};
    case (st)
      S_R_TOK:    begin tk_req = tk_ready; end
      S_R_WR:     begin tk_req = tk_ready; tk_we = 1'b1; end
      default: ;
    endcase
    dict_req     = (st == S_POP_DICT) || (st == S_R_DICT);
    dict_node    = (st == S_POP_DICT) ? n_node : r_dest;
    res_rd_en    = (st == S_R_GMM);
    res_rd_bank  = bank_q;
    res_rd_state = r_dict.gmm_id[$clog2(STATES)-1:0];
    res_rd_frame = fl;
    bd_req       = (st == S_BD_REQ);
    bd_word      = n_dict.word_id;
    bd_start     = xk;
    bc_req       = (st == S_BC_REQ) && bc_ready;
    tc_fend      = (st == S_FEND);
    n_active     = 20'(q_n[cur]);
    detail       = (dcnt == $bits(dcnt)'(DETAIL_PERIOD - 1));
  end

  assign r_cand = sat_add(r_base, res_rd_data);

  // ---------------- queue writes ----------------
  // init seeds node 0 with score 0; a created node is appended to the
  // next-frame queue; an improved node gets its queued score replaced
  localparam int unsigned QA = $clog2(QDEPTH);
  logic          qn_we, qs_we, q_wb;
  logic [QA-1:0] q_wa;
  node_t         q_wnode;
  score_t        q_wscore;
  always_comb begin
    qn_we    = 1'b0;
    qs_we    = 1'b0;
    q_wb     = ~cur;
    q_wa     = q_n[~cur][QA-1:0];
    q_wnode  = r_dest;
    q_wscore = r_cand;
    if (st == S_IDLE && init) begin
      qn_we = 1'b1; qs_we = 1'b1; q_wb = 1'b0; q_wa = '0; q_wnode = '0; q_wscore = '0;
    end else if (st == S_R_TOKW && tk_rv) begin
      if (tk_rdata.stamp != stamp + 1'b1) begin
        if (q_n[~cur] < QW'(QDEPTH)) begin qn_we = 1'b1; qs_we = 1'b1; end
      end else if (r_cand > tk_rdata.score) begin
        qs_we = 1'b1;
        q_wa  = tk_rdata.slot[QA-1:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (qn_we) q_node[{q_wb, q_wa}]  <= q_wnode;
    if (qs_we) q_score[{q_wb, q_wa}] <= q_wscore;
    // the top-N line stays available while its successors are visited
    if (st == S_BC_WAIT && bc_rv) bl_line <= bc_line;
  end

  node_t  q_rnode;
  score_t q_rscore;
  assign q_rnode  = q_node[{cur, rd_ptr[QA-1:0]}];
  assign q_rscore = q_score[{cur, rd_ptr[QA-1:0]}];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ph <= PH_SELF; busy <= 1'b0; done <= 1'b0;
      q_n[0] <= '0; q_n[1] <= '0; cur <= 1'b0; rd_ptr <= '0;
      stamp <= 16'd1; fl <= '0; bank_q <= 1'b0; dcnt <= '0;
      n_node <= '0; n_score <= '0; n_dict <= '0; r_dest <= '0; r_base <= '0; r_dict <= '0;
      r_slot <= '0; xk <= '0; fsum <= '0; stats <= '0;
      tr_valid <= 1'b0; tr_stamp <= '0; tr_word <= '0; tr_score <= '0;
    end else begin
      done     <= 1'b0;
      tr_valid <= 1'b0;
      case (st)
        S_IDLE: begin
          if (init) begin
            // the frame stamp keeps counting so that tokens of an earlier
            // search never look active
            q_n[0] <= QW'(1); q_n[1] <= '0; cur <= 1'b0; rd_ptr <= '0;
            fl <= '0; dcnt <= '0; fsum <= '0; stats <= '0;
            done <= 1'b1;
          end else if (run) begin
            bank_q <= res_bank; fl <= '0; busy <= 1'b1; rd_ptr <= '0;
            st <= S_FRAME;
          end
        end
        S_FRAME: begin
          if (rd_ptr == q_n[cur]) st <= S_FEND;
          else begin
            n_node  <= q_rnode;
            n_score <= q_rscore;
            st <= S_POP_DICT;
          end
        end
        S_POP_DICT: if (dict_ack) begin
          n_dict <= dict_rdata;
          r_dict <= dict_rdata;
          r_dest <= n_node;
          r_base <= sat_add(n_score, score_t'(dict_rdata.log_aself));
          ph     <= PH_SELF;
          st     <= S_R_GMM;
        end
        // ---- relax(r_dest, r_base) ----
        S_R_DICT: if (dict_ack) begin r_dict <= dict_rdata; st <= S_R_GMM; end
        S_R_GMM: st <= S_R_CUT;
        S_R_CUT: begin
          if (!tc_pass) begin
            stats.pruned <= stats.pruned + 1'b1;
            st <= S_NEXTOP;
          end else st <= S_R_TOK;
        end
        S_R_TOK: if (tk_ready) st <= S_R_TOKW;
        S_R_TOKW: if (tk_rv) begin
          if (tk_rdata.stamp != stamp + 1'b1) begin
            if (q_n[~cur] < QW'(QDEPTH)) begin
              r_slot    <= SLOT_W'(q_n[~cur]);
              q_n[~cur] <= q_n[~cur] + 1'b1;
              fsum <= fsum + 48'(r_cand);
              stats.created <= stats.created + 1'b1;
              st <= S_R_WR;
            end else begin
              stats.overflow <= stats.overflow + 1'b1;
              st <= S_NEXTOP;
            end
          end else if (r_cand > tk_rdata.score) begin
            r_slot <= tk_rdata.slot;
            fsum <= fsum + 48'(r_cand) - 48'(tk_rdata.score);
            stats.overwritten <= stats.overwritten + 1'b1;
            st <= S_R_WR;
          end else st <= S_NEXTOP;
        end
        S_R_WR: if (tk_ready) st <= S_R_WRW;
        S_R_WRW: if (tk_rv) st <= S_NEXTOP;
        // ---- what comes after a transition ----
        S_NEXTOP: begin
          case (ph)
            PH_SELF: begin
              if (!n_dict.word_end) begin
                ph     <= PH_NEXT;
                r_dest <= n_dict.succ;
                r_base <= sat_add(sat_add(n_score, score_t'(n_dict.log_anext)),
                                  score_t'(n_dict.uni_diff));
                st     <= S_R_DICT;
              end else st <= S_TRELLIS;
            end
            PH_NEXT: st <= S_NODE_END;
            PH_XW1: begin
              if (xk + 1'b1 < 16'(TOPN)) begin
                xk     <= xk + 1'b1;
                r_dest <= node_t'(bl_line[$clog2(TOPN)'(xk + 1'b1)].word);
                r_base <= sat_add(n_score, score_t'(bl_line[$clog2(TOPN)'(xk + 1'b1)].logp));
                stats.xword <= stats.xword + 1'b1;
                st     <= S_R_DICT;
              end else st <= S_NODE_END;
            end
            PH_XW2: begin
              if (xk + 1'b1 < 16'(N_START)) begin
                xk <= xk + 1'b1;
                st <= S_BD_REQ;
              end else st <= S_NODE_END;
            end
            default: st <= S_NODE_END;
          endcase
        end
        S_TRELLIS: begin
          tr_valid <= 1'b1; tr_stamp <= stamp; tr_word <= n_dict.word_id; tr_score <= n_score;
          stats.trellis <= stats.trellis + 1'b1;
          xk <= '0;
          if (detail) begin ph <= PH_XW2; st <= S_BD_REQ; end
          else st <= S_BC_REQ;
        end
        S_BC_REQ: if (bc_ready) st <= S_BC_WAIT;
        S_BC_WAIT: if (bc_rv) begin
          ph      <= PH_XW1;
          r_dest  <= node_t'(bc_line[0].word);
          r_base  <= sat_add(n_score, score_t'(bc_line[0].logp));
          stats.xword <= stats.xword + 1'b1;
          st      <= S_R_DICT;
        end
        S_BD_REQ: if (bd_ack) begin
          r_dest <= node_t'(xk);
          r_base <= sat_add(n_score, score_t'(bd_logp));
          stats.xword <= stats.xword + 1'b1;
          st     <= S_R_DICT;
        end
        S_NODE_END: begin rd_ptr <= rd_ptr + 1'b1; st <= S_FRAME; end
        S_FEND: begin
          // threshold_cut samples fsum and the next-queue count in this cycle
          st <= S_FEND2;
        end
        S_FEND2: st <= S_FEND3;
        S_FEND3: begin
          q_n[cur] <= '0;
          cur      <= ~cur;
          rd_ptr   <= '0;
          fsum     <= '0;
          stamp    <= stamp + 1'b1;
          stats.frames <= stats.frames + 1'b1;
          if (detail) stats.detail_frames <= stats.detail_frames + 1'b1;
          dcnt     <= detail ? '0 : dcnt + 1'b1;
          if (fl == FW'(FRAMES - 1)) begin
            fl <= '0; busy <= 1'b0; done <= 1'b1; st <= S_IDLE;
          end else begin
            fl <= fl + 1'b1; st <= S_FRAME;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
