// vit_model.svh: reference model of the Viterbi search used by the Viterbi,
// recognizer and top-level testbenches.
//
// It follows the same search as the processor, in the same order: active
// nodes are expanded in the order they were created; each node tries its
// self loop, then either the move to its successor or, at a word end, the
// trellis save and the cross-word transitions (top-N successor list, or all
// start nodes in every DETAIL-th frame). A candidate below the frame's
// threshold is counted as pruned; otherwise it creates the destination (if
// the queue has room, else it counts an overflow) or improves it. At the end
// of a frame the threshold becomes average survivor score minus a margin that
// moves one step towards keeping BEAM survivors. Because the order is the
// same, every counter of the processor must match exactly.
`ifndef VIT_MODEL_SVH
`define VIT_MODEL_SVH
class vit_model;
  int qdepth, beam, topn, nstart, dperiod, nframes;
  longint step = 256, margin0 = 20 * 256, mmax = 200 * 256;

  sr_pkg::dict_node_t dict [int];
  sr_pkg::bigram_entry_t topl [int][$];   // word -> successor list
  longint bd [int];                        // word * 65536 + start node
  longint gmm [int];                       // (bank * 65536 + state) * 256 + frame

  int     q_node [$];
  longint q_score [$];
  longint thr, margin, avg;
  int     dcnt;
  longint frames, created, overwritten, pruned, overflow, trellis, detail_frames, xword;
  longint tr_sum, tr_wsum;

  function new(int qd, int bm, int tn, int ns, int dp, int nf);
    qdepth = qd; beam = bm; topn = tn; nstart = ns; dperiod = dp; nframes = nf;
    thr = longint'(sr_pkg::SCORE_MIN); margin = margin0; avg = 0;
    frames = 0; tr_sum = 0; tr_wsum = 0;
  endfunction

  static function longint sat(longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction

  function longint b(int bank, int gid, int fl);
    int k;
    k = (bank * 65536 + gid) * 256 + fl;
    return gmm.exists(k) ? gmm[k] : 0;
  endfunction

  // detailed bigram value of (word, start node); a testbench may derive it
  // from a formula instead of filling bd
  virtual function longint bdv(int wd, int st);
    return bd[wd * 65536 + st];
  endfunction

  function void init();
    q_node.delete(); q_score.delete();
    q_node.push_back(0); q_score.push_back(0);
    dcnt = 0;
    thr = longint'(sr_pkg::SCORE_MIN); margin = margin0; avg = 0;
    frames = 0; created = 0; overwritten = 0; pruned = 0; overflow = 0;
    trellis = 0; detail_frames = 0; xword = 0; tr_sum = 0; tr_wsum = 0;
  endfunction

  // one frame: nq/nqs collect the next frame, pos maps node -> slot
  int     nq [$];
  longint nqs [$];
  int     pos [int];
  longint fsum;

  function void relax(int bank, int fl, int d, longint base);
    longint c;
    c = sat(base + b(bank, int'(dict[d].gmm_id), fl));
    if (c < thr) begin pruned++; return; end
    if (pos.exists(d)) begin
      if (c > nqs[pos[d]]) begin
        fsum += c - nqs[pos[d]];
        nqs[pos[d]] = c;
        overwritten++;
      end
    end else if (nq.size() < qdepth) begin
      pos[d] = nq.size();
      nq.push_back(d); nqs.push_back(c);
      fsum += c;
      created++;
    end else overflow++;
  endfunction

  function void frame(int bank, int fl);
    bit detail;
    detail = (dcnt == dperiod - 1);
    nq.delete(); nqs.delete(); pos.delete(); fsum = 0;
    foreach (q_node[i]) begin
      int n;
      longint sc;
      sr_pkg::dict_node_t d;
      n = q_node[i]; sc = q_score[i]; d = dict[n];
      relax(bank, fl, n, sat(sc + longint'(d.log_aself)));
      if (!d.word_end) begin
        relax(bank, fl, int'(d.succ), sat(sat(sc + longint'(d.log_anext)) + longint'(d.uni_diff)));
      end else begin
        trellis++; tr_sum += sc; tr_wsum += longint'(d.word_id);
        if (detail) begin
          for (int s = 0; s < nstart; s++) begin
            xword++;
            relax(bank, fl, s, sat(sc + bdv(int'(d.word_id), s)));
          end
        end else begin
          for (int k = 0; k < topn; k++) begin
            xword++;
            relax(bank, fl, int'(topl[int'(d.word_id)][k].word),
                  sat(sc + longint'(topl[int'(d.word_id)][k].logp)));
          end
        end
      end
    end
    // threshold for the next frame
    if (nq.size() == 0) thr = longint'(sr_pkg::SCORE_MIN);
    else begin
      avg = longint'(int'(fsum / longint'(nq.size())));
      if (nq.size() > beam) margin -= step;
      else if (nq.size() < beam) margin += step;
      if (margin < step) margin = step;
      if (margin > mmax) margin = mmax;
      thr = avg - margin;
    end
    q_node = nq; q_score = nqs;
    frames++;
    if (detail) begin detail_frames++; dcnt = 0; end else dcnt++;
  endfunction

  function void run(int bank);
    for (int fl = 0; fl < nframes; fl++) frame(bank, fl);
  endfunction
endclass
`endif
