// sr_pkg: types and constants shared by the speech-recognition datapath.
//
// All probabilities are natural-log values in signed fixed point with
// SCORE_FRAC fractional bits (Q.8), held in SCORE_W bits. Larger is more
// likely. SCORE_MIN stands for log(0) and is what a pruned or empty score
// holds. The fixed-point format is this design's choice; the recognizer
// only requires log-domain arithmetic with additions (log-Viterbi).
package sr_pkg;
  localparam int unsigned SCORE_W    = 32;
  localparam int unsigned SCORE_FRAC = 8;
  typedef logic signed [SCORE_W-1:0] score_t;
  localparam score_t SCORE_MIN = -32'sd1073741824;

  // Feature vector elements and Gaussian parameters, signed Q.8.
  localparam int unsigned FEAT_W = 16;
  typedef logic signed [FEAT_W-1:0] feat_t;

  // One entry of a top-N bigram list: successor word and log P(v|w).
  localparam int unsigned WORD_W = 16;
  typedef logic [WORD_W-1:0] word_t;
  typedef struct packed {
    word_t                 word;
    logic signed [15:0]    logp;   // Q.8 log probability
  } bigram_entry_t;              // 4 bytes, as the cache line is 10 x 4 B

  // Token list entry: the frame in which a node was last activated and the
  // best score it holds in that frame.
  localparam int unsigned STAMP_W = 16;
  localparam int unsigned SLOT_W = 16;
  typedef struct packed {
    logic [STAMP_W-1:0] stamp;
    logic [SLOT_W-1:0]  slot;    // position of the node in the next-frame queue
    score_t             score;
  } token_t;

  // One HMM tree-dictionary node, as fetched from external memory.
  localparam int unsigned NODE_W = 20;
  localparam int unsigned GMMID_W = 11;
  typedef logic [NODE_W-1:0] node_t;
  typedef struct packed {
    node_t               succ;       // next node in the left-right HMM / tree
    logic [GMMID_W-1:0]  gmm_id;     // output-probability state of this node
    logic signed [15:0]  log_aself;  // self-transition log probability
    logic signed [15:0]  log_anext;  // transition to succ
    logic signed [15:0]  uni_diff;   // modified unigram: difference to succ
    logic                word_end;   // node ends a word
    word_t               word_id;    // the word this node belongs to
  } dict_node_t;

  // Event counters of the Viterbi processor.
  typedef struct packed {
    logic [31:0] frames;         // frames processed
    logic [31:0] created;        // new active nodes
    logic [31:0] overwritten;    // active nodes improved by a better path
    logic [31:0] pruned;         // transitions below the threshold
    logic [31:0] overflow;       // new nodes dropped because the queue was full
    logic [31:0] trellis;        // word ends saved to the trellis
    logic [31:0] detail_frames;  // frames with the detailed language-model stage
    logic [31:0] xword;          // cross-word transitions evaluated
  } vit_stats_t;

  // Saturating add of two scores.
  function automatic score_t sat_add(score_t a, score_t b);
    logic signed [SCORE_W:0] s;
    s = {a[SCORE_W-1], a} + {b[SCORE_W-1], b};
    // overflow when the two top bits of the 33-bit sum differ
    if (s[SCORE_W] != s[SCORE_W-1])
      return s[SCORE_W] ? {1'b1, {(SCORE_W-1){1'b0}}} : {1'b0, {(SCORE_W-1){1'b1}}};
    else
      return s[SCORE_W-1:0];
  endfunction
endpackage
