// token_list_cache: direct-mapped write-back cache of the token list.
//
// The token list records, for every node of the HMM tree dictionary, the
// frame in which it was last made active and the best score it holds then
// (sr_pkg::token_t). The Viterbi processor reads it to decide whether a
// transition creates a new active node or overwrites a worse one, and writes
// it back. The list lives in external memory; this cache sits in front of it.
//
// Organisation: one token per line. Nodes 0..N_START-1 are the word-start
// nodes, which cross-word transitions reach most often; their tokens are held
// permanently in a dedicated resident array and always hit. Other nodes map
// direct to LINES lines by their low bits, tagged by the high bits. A write
// replaces the whole token, so a write miss allocates without a fetch; a
// dirty victim is written back first.
//
// Interface: req_valid/req_ready, req_we, req_node, req_wdata. A read answers
// with resp_valid/resp_data; a write completes with resp_valid as well.
// A hit takes one cycle. Memory side: mem_req/mem_we/mem_node/mem_wdata held
// until mem_ack; read data in mem_rdata with mem_ack.
// Direct mapping, resident start nodes and the 1,000 start nodes follow the
// design description. LINES = 8192 is this design's reading of its 75 kB
// (8192 lines x (64 b token + 9 b tag, valid, dirty)
// is about 75 kB); the write-back policy
// and the handshake are this design's choice.
// After reset the cache clears its tag memory and the resident tokens, one
// entry per cycle (max(LINES, N_START) cycles), with req_ready low; tags,
// valid and dirty bits live in one memory word per line so that the arrays
// stay plain memories.
module token_list_cache
  import sr_pkg::*;
#(
  parameter int unsigned LINES   = 8192,
  parameter int unsigned N_START = 1000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_we,
  input  node_t       req_node,
  input  token_t      req_wdata,
  output logic        resp_valid,
  output token_t      resp_data,
  output logic        mem_req,
  output logic        mem_we,
  output node_t       mem_node,
  output token_t      mem_wdata,
  input  logic        mem_ack,
  input  token_t      mem_rdata,
  output logic [31:0] hits,
  output logic [31:0] misses
);
  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned TW = NODE_W - IW;
  localparam int unsigned RW = $clog2(N_START);
  localparam int unsigned CLR_N = (LINES > N_START) ? LINES : N_START;
  localparam int unsigned CW = $clog2(CLR_N + 1);

  typedef struct packed {
    logic          valid;
    logic          dirty;
    logic [TW-1:0] tag;
  } meta_t;

  token_t res_tok [N_START];
  token_t line    [LINES];
  meta_t  meta    [LINES];

  typedef enum logic [1:0] {CLEAR, IDLE, WBACK, FILL} state_e;
  state_e     st;
  logic [CW-1:0] clr;
  logic       c_we;
  node_t      c_node;
  token_t     c_wdata;

  logic          is_res;
  logic [IW-1:0] idx;
  logic [RW-1:0] ridx;
  meta_t         m;
  logic          hit;

  assign is_res    = (32'(req_node) < N_START);
  assign idx       = (st == IDLE) ? req_node[IW-1:0] : c_node[IW-1:0];
  assign ridx      = req_node[RW-1:0];
  assign m         = meta[idx];
  assign hit       = m.valid && m.tag == req_node[NODE_W-1:IW];
  assign req_ready = (st == IDLE);

  always_comb begin
    mem_req   = (st == WBACK) || (st == FILL);
    mem_we    = (st == WBACK);
    mem_node  = (st == WBACK) ? {m.tag, idx} : c_node;
    mem_wdata = line[idx];
  end

  // what happens to the line at idx this cycle
  logic   line_we, meta_we, res_we;
  token_t line_d;
  meta_t  meta_d;
  always_comb begin
    line_we = 1'b0; meta_we = 1'b0; res_we = 1'b0;
    line_d  = req_wdata;
    meta_d  = '{valid: 1'b1, dirty: 1'b1, tag: req_node[NODE_W-1:IW]};
    case (st)
      IDLE: if (req_valid) begin
        if (is_res) res_we = req_we;
        else if (hit) begin
          line_we = req_we; meta_we = req_we;
        end else if (!(m.valid && m.dirty) && req_we) begin
          line_we = 1'b1; meta_we = 1'b1;
        end
      end
      WBACK: if (mem_ack) begin
        meta_we = 1'b1;
        if (c_we) begin
          line_we = 1'b1; line_d = c_wdata;
          meta_d  = '{valid: 1'b1, dirty: 1'b1, tag: c_node[NODE_W-1:IW]};
        end else begin
          meta_d  = '{valid: m.valid, dirty: 1'b0, tag: m.tag};
        end
      end
      FILL: if (mem_ack) begin
        line_we = 1'b1; meta_we = 1'b1; line_d = mem_rdata;
        meta_d  = '{valid: 1'b1, dirty: 1'b0, tag: c_node[NODE_W-1:IW]};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (st == CLEAR) begin
      if (32'(clr) < LINES)   meta[clr[IW-1:0]]   <= '0;
      if (32'(clr) < N_START) res_tok[clr[RW-1:0]] <= '0;
    end else begin
      if (line_we) line[idx] <= line_d;
      if (meta_we) meta[idx] <= meta_d;
      if (res_we)  res_tok[ridx] <= req_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= CLEAR; clr <= '0; resp_valid <= 1'b0; resp_data <= '0;
      c_we <= 1'b0; c_node <= '0; c_wdata <= '0; hits <= '0; misses <= '0;
    end else begin
      resp_valid <= 1'b0;
      case (st)
        CLEAR: begin
          clr <= clr + 1'b1;
          if (32'(clr) == CLR_N - 1) st <= IDLE;
        end
        IDLE: if (req_valid) begin
          c_we <= req_we; c_node <= req_node; c_wdata <= req_wdata;
          if (is_res) begin
            if (!req_we) resp_data <= res_tok[ridx];
            resp_valid <= 1'b1;
            hits       <= hits + 1'b1;
          end else if (hit) begin
            if (!req_we) resp_data <= line[idx];
            resp_valid <= 1'b1;
            hits       <= hits + 1'b1;
          end else begin
            misses <= misses + 1'b1;
            if (m.valid && m.dirty) st <= WBACK;
            else if (req_we)        resp_valid <= 1'b1;
            else                    st <= FILL;
          end
        end
        WBACK: if (mem_ack) begin
          if (c_we) begin resp_valid <= 1'b1; st <= IDLE; end
          else st <= FILL;
        end
        FILL: if (mem_ack) begin
          resp_data <= mem_rdata; resp_valid <= 1'b1;
          st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
