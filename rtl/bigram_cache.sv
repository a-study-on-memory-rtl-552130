// bigram_cache: two-way set-associative cache of top-N bigram lists.
//
// For a predecessor word w, one cache line holds the TOPN most probable
// cross-word successors and their bigram log probabilities, TOPN x 4 B = 40 B
// with the default TOPN = 10: exactly what the first, simplified stage of the
// two-stage language-model search reads every frame. The low bits of w form
// the set index and the whole word ID is kept as the tag.
//
// Replacement follows the observation that a score written late in a frame
// tends to be the higher one: each set has a "high" way and a "low" way; on a
// miss the line fetched from memory goes into the high way and the line that
// was there moves down into the low way, pushing out the old low line. Hits in
// either way are served without a change.
//
// Interface: req_valid/req_ready with req_word; one cycle later, or after the
// memory fill on a miss, resp_valid pulses with resp_line and resp_hit.
// Memory side: mem_req stays high with mem_word until mem_rvalid brings
// mem_line. hits/misses count lookups since reset.
// Default SETS = 1024 (2 x 1024 x 40 B = 80 kB); the design description sizes
// the cache at 100 kB, which the power-of-two index from the word's low
// bits cannot give exactly. The handshake is this design's choice.
// After reset the tag memories are cleared one set per cycle (SETS cycles)
// with req_ready low.
module bigram_cache
  import sr_pkg::*;
#(
  parameter int unsigned SETS = 1024,
  parameter int unsigned TOPN = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  output logic          req_ready,
  input  word_t         req_word,
  output logic          resp_valid,
  output logic          resp_hit,
  output bigram_entry_t resp_line [TOPN],
  output logic          mem_req,
  output word_t         mem_word,
  input  logic          mem_rvalid,
  input  bigram_entry_t mem_line  [TOPN],
  output logic [31:0]   hits,
  output logic [31:0]   misses
);
  localparam int unsigned IW = $clog2(SETS);

  typedef struct packed {
    logic  valid;
    word_t tag;
  } tag_t;

  tag_t          hi_tag  [SETS];
  tag_t          lo_tag  [SETS];
  bigram_entry_t hi_line [SETS][TOPN];
  bigram_entry_t lo_line [SETS][TOPN];

  typedef enum logic [1:0] {CLEAR, IDLE, MISS} state_e;
  state_e         st;
  logic [IW:0]    clr;
  word_t          cur;
  logic [IW-1:0]  idx;
  tag_t           th, tl;
  logic           hit_hi, hit_lo, fill;

  assign idx       = (st == IDLE) ? req_word[IW-1:0] : cur[IW-1:0];
  assign th        = hi_tag[idx];
  assign tl        = lo_tag[idx];
  assign hit_hi    = th.valid && th.tag == req_word;
  assign hit_lo    = tl.valid && tl.tag == req_word;
  assign req_ready = (st == IDLE);
  assign mem_req   = (st == MISS);
  assign mem_word  = cur;
  assign fill      = (st == MISS) && mem_rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= CLEAR; clr <= '0; cur <= '0; resp_valid <= 1'b0; resp_hit <= 1'b0;
      hits <= '0; misses <= '0;
    end else begin
      resp_valid <= 1'b0;
      case (st)
        CLEAR: begin
          clr <= clr + 1'b1;
          if (clr == (IW+1)'(SETS - 1)) st <= IDLE;
        end
        IDLE: if (req_valid) begin
          cur <= req_word;
          if (hit_hi || hit_lo) begin
            resp_valid <= 1'b1;
            resp_hit   <= 1'b1;
            hits       <= hits + 1'b1;
          end else begin
            st     <= MISS;
            misses <= misses + 1'b1;
          end
        end
        MISS: if (mem_rvalid) begin
          resp_valid <= 1'b1;
          resp_hit   <= 1'b0;
          st         <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

  // tag and line memories: a fill puts the new line into the high way and
  // moves the old high line down into the low way
  always_ff @(posedge clk) begin
    if (st == CLEAR) begin
      hi_tag[clr[IW-1:0]] <= '0;
      lo_tag[clr[IW-1:0]] <= '0;
    end else if (fill) begin
      lo_tag[idx] <= th;
      hi_tag[idx] <= '{valid: 1'b1, tag: cur};
    end
  end

  always_ff @(posedge clk) begin
    if (st == IDLE && req_valid) begin
      resp_line <= hit_hi ? hi_line[idx] : lo_line[idx];
    end else if (fill) begin
      lo_line[idx] <= hi_line[idx];
      hi_line[idx] <= mem_line;
      resp_line    <= mem_line;
    end
  end
endmodule
