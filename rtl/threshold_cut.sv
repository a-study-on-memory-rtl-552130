// threshold_cut: adaptive beam-pruning threshold.
//
// Replaces the per-frame sort of the conventional beam search. During a frame
// every new score is compared with a fixed threshold (pass = cand >= thr) and
// only passing transitions are kept, so no workspace for all temporary scores
// is needed. At the end of each frame the threshold for the next frame is
// set from two observations, as the design description prescribes: how the
// average survivor score moved between the previous frame and this one, and
// how the number of survivors compares with the target beam width.
//
// Rule used here: thr(t+1) = avg(t) - margin(t+1), with
//   margin(t+1) = margin(t) - STEP  if count(t) > BEAM  (too many survivors)
//               = margin(t) + STEP  if count(t) < BEAM  (too few)
// clamped to [STEP, MARGIN_MAX]. This equals thr(t) + (avg(t) - avg(t-1))
// plus a count correction. The survivor count therefore wanders around BEAM
// rather than matching it, which the description accepts (about +-500 around
// a 1,500 target). STEP, MARGIN0 and MARGIN_MAX are this design's choice.
//
// Interface: frame_end pulses with sum (of survivor scores) and count; thr is
// updated two cycles later (a divide, then the update). init loads
// thr = SCORE_MIN (keep all) and margin = MARGIN0.
// The quotient of the 48-bit sum by the count always fits a score, so only
// its low SCORE_W bits are used (lint lists the upper bits as unused).
module threshold_cut
  import sr_pkg::*;
#(
  parameter int unsigned BEAM       = 4000,
  parameter int          STEP       = 256,        // 1.0 in Q.8
  parameter int          MARGIN0    = 20 * 256,
  parameter int          MARGIN_MAX = 200 * 256
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               init,
  input  logic               frame_end,
  input  logic signed [47:0] sum,
  input  logic [19:0]        count,
  input  score_t             cand,
  output logic               pass,
  output score_t             thr,
  output score_t             avg,
  output score_t             margin
);
  logic               upd;
  logic [19:0]        cnt_q;
  logic signed [47:0] avg_w;
  score_t             m_next;

  always_comb begin
    avg_w  = (count != '0) ? sum / $signed({28'd0, count}) : 48'sd0;
    m_next = margin;
    if (cnt_q > 20'(BEAM))      m_next = margin - score_t'(STEP);
    else if (cnt_q < 20'(BEAM)) m_next = margin + score_t'(STEP);
    if (m_next < score_t'(STEP))       m_next = score_t'(STEP);
    if (m_next > score_t'(MARGIN_MAX)) m_next = score_t'(MARGIN_MAX);
  end

  assign pass = (cand >= thr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thr <= SCORE_MIN; avg <= '0; margin <= score_t'(MARGIN0); upd <= 1'b0; cnt_q <= '0;
    end else if (init) begin
      thr <= SCORE_MIN; avg <= '0; margin <= score_t'(MARGIN0); upd <= 1'b0; cnt_q <= '0;
    end else begin
      upd <= 1'b0;
      if (frame_end) begin
        cnt_q <= count;
        upd   <= 1'b1;
        if (count != '0) avg <= avg_w[SCORE_W-1:0];
      end
      if (upd) begin
        if (cnt_q == '0) begin
          thr <= SCORE_MIN;                       // everything was pruned: reopen
        end else begin
          margin <= m_next;
          thr    <= avg - m_next;
        end
      end
    end
  end
endmodule
