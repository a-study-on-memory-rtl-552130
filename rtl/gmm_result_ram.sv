// gmm_result_ram: GMM result RAM.
//
// Stores the output probability log b_j(x_t) of every GMM state j for every
// frame t of a burst. It has two banks: the GMM processor fills one burst
// while the Viterbi processor reads the previous one, which is what lets the
// two run as a two-stage pipeline. Default size 2 x 2,000 states x 50 frames
// of 32-bit scores. The design description sizes the RAM for 2,000 states and
// 50 frames; the second bank and the 32-bit entry are this design's choice.
//
// Interface: synchronous write port; synchronous read port with rd_data one
// cycle after rd_en and the address.
module gmm_result_ram
  import sr_pkg::*;
#(
  parameter int unsigned STATES = 2000,
  parameter int unsigned FRAMES = 50
) (
  input  logic                       clk,
  input  logic                       wr_en,
  input  logic                       wr_bank,
  input  logic [$clog2(STATES)-1:0]  wr_state,
  input  logic [$clog2(FRAMES)-1:0]  wr_frame,
  input  score_t                     wr_data,
  input  logic                       rd_en,
  input  logic                       rd_bank,
  input  logic [$clog2(STATES)-1:0]  rd_state,
  input  logic [$clog2(FRAMES)-1:0]  rd_frame,
  output score_t                     rd_data
);
  localparam int unsigned DEPTH = 2 * STATES * FRAMES;
  localparam int unsigned AW    = $clog2(DEPTH);
  score_t mem [DEPTH];

  function automatic logic [AW-1:0] addr(logic b, logic [$clog2(STATES)-1:0] s,
                                         logic [$clog2(FRAMES)-1:0] f);
    return AW'((32'(b) * STATES + 32'(s)) * FRAMES + 32'(f));
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) mem[addr(wr_bank, wr_state, wr_frame)] <= wr_data;
    if (rd_en) rd_data <= mem[addr(rd_bank, rd_state, rd_frame)];
  end
endmodule
