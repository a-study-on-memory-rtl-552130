// vit_mem: behavioural external memories for the Viterbi processor, used by
// the Viterbi, recognizer and top-level testbenches. Its contents come from a
// vit_model object that the testbench assigns to the handle m before use:
// the tree dictionary, detailed bigram values, top-N successor lines, GMM
// results (for a stand-alone Viterbi processor) and a token list that starts
// all zero. Each request is answered after a random 0..LAT cycle delay, so
// the caches and state machines are tested with irregular memory latency.
// Requests are ignored while rst_n is low. Counts token-list writes
// (write-backs) for the testbench.
`include "tb/vit_model.svh"
module vit_mem
  import sr_pkg::*;
#(
  parameter int STATES = 8,
  parameter int FRAMES = 6,
  parameter int TOPN   = 3,
  parameter int LAT    = 2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      dict_req,
  input  node_t                     dict_node,
  output logic                      dict_ack,
  output dict_node_t                dict_rdata,
  input  logic                      res_rd_en,
  input  logic                      res_rd_bank,
  input  logic [$clog2(STATES)-1:0] res_rd_state,
  input  logic [$clog2(FRAMES)-1:0] res_rd_frame,
  output score_t                    res_rd_data,
  input  logic                      bd_req,
  input  word_t                     bd_word,
  input  logic [15:0]               bd_start,
  output logic                      bd_ack,
  output logic signed [15:0]        bd_logp,
  input  logic                      bl_mem_req,
  input  word_t                     bl_mem_word,
  output logic                      bl_mem_rvalid,
  output bigram_entry_t             bl_mem_line [TOPN],
  input  logic                      tk_mem_req,
  input  logic                      tk_mem_we,
  input  node_t                     tk_mem_node,
  input  token_t                    tk_mem_wdata,
  output logic                      tk_mem_ack,
  output token_t                    tk_mem_rdata
);
  vit_model m;
  token_t   tok [int];
  int       n_tk_wr = 0, n_tk_rd = 0, n_bd = 0, n_bl = 0, n_dict = 0;
  int       d_dict = 0, d_bd = 0, d_bl = 0, d_tk = 0;

  initial begin
    dict_ack = 0; bd_ack = 0; bl_mem_rvalid = 0; tk_mem_ack = 0;
    dict_rdata = '0; res_rd_data = '0; bd_logp = '0; tk_mem_rdata = '0;
    foreach (bl_mem_line[k]) bl_mem_line[k] = '0;
  end

  always @(posedge clk) begin
    if (dict_ack) dict_ack <= 1'b0;
    else if (rst_n && dict_req) begin
      if (d_dict == 0) begin
        dict_ack   <= 1'b1;
        dict_rdata <= m.dict.exists(int'(dict_node)) ? m.dict[int'(dict_node)] : '0;
        n_dict++;
        d_dict = $urandom_range(0, LAT);
      end else d_dict--;
    end
  end

  always @(posedge clk)
    if (rst_n && res_rd_en) res_rd_data <= score_t'(m.b(int'(res_rd_bank), int'(res_rd_state), int'(res_rd_frame)));

  always @(posedge clk) begin
    if (bd_ack) bd_ack <= 1'b0;
    else if (rst_n && bd_req) begin
      if (d_bd == 0) begin
        bd_ack  <= 1'b1;
        bd_logp <= 16'(m.bdv(int'(bd_word), int'(bd_start)));
        n_bd++;
        d_bd = $urandom_range(0, LAT);
      end else d_bd--;
    end
  end

  always @(posedge clk) begin
    if (bl_mem_rvalid) bl_mem_rvalid <= 1'b0;
    else if (rst_n && bl_mem_req) begin
      if (d_bl == 0) begin
        bl_mem_rvalid <= 1'b1;
        foreach (bl_mem_line[k]) bl_mem_line[k] <= m.topl[int'(bl_mem_word)][k];
        n_bl++;
        d_bl = $urandom_range(0, LAT);
      end else d_bl--;
    end
  end

  always @(posedge clk) begin
    if (tk_mem_ack) tk_mem_ack <= 1'b0;
    else if (rst_n && tk_mem_req) begin
      if (d_tk == 0) begin
        tk_mem_ack <= 1'b1;
        if (tk_mem_we) begin
          tok[int'(tk_mem_node)] = tk_mem_wdata;
          n_tk_wr++;
        end else begin
          tk_mem_rdata <= tok.exists(int'(tk_mem_node)) ? tok[int'(tk_mem_node)] : '0;
          n_tk_rd++;
        end
        d_tk = $urandom_range(0, LAT);
      end else d_tk--;
    end
  end
endmodule
