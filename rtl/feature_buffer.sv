// feature_buffer: MFCC input buffer of the GMM processor.
//
// Holds the feature vectors of one burst of FRAMES frames, DIMS elements
// each, so that one fetch of a state's Gaussian parameters can be shared by
// all of them (burst GMM calculation). Because one dimension of one frame is
// read per cycle while the next burst is written, the buffer has two banks:
// the writer fills bank wr_bank while the reader uses the other one.
//
// Interface: synchronous write (wr_en, wr_bank, wr_frame, wr_dim, wr_data);
// synchronous read (rd_bank, rd_frame, rd_dim) with rd_data valid one cycle
// after the address. Sizes are the design description's (50 frames); 25
// dimensions follows its comparison table, the double banking is this
// design's choice.
module feature_buffer
  import sr_pkg::*;
#(
  parameter int unsigned FRAMES = 50,
  parameter int unsigned DIMS   = 25
) (
  input  logic                       clk,
  input  logic                       wr_en,
  input  logic                       wr_bank,
  input  logic [$clog2(FRAMES)-1:0]  wr_frame,
  input  logic [$clog2(DIMS)-1:0]    wr_dim,
  input  feat_t                      wr_data,
  input  logic                       rd_bank,
  input  logic [$clog2(FRAMES)-1:0]  rd_frame,
  input  logic [$clog2(DIMS)-1:0]    rd_dim,
  output feat_t                      rd_data
);
  localparam int unsigned DEPTH = 2 * FRAMES * DIMS;
  localparam int unsigned AW    = $clog2(DEPTH);
  feat_t mem [DEPTH];

  function automatic logic [AW-1:0] addr(logic b, logic [$clog2(FRAMES)-1:0] f,
                                         logic [$clog2(DIMS)-1:0] d);
    return AW'((32'(b) * FRAMES + 32'(f)) * DIMS + 32'(d));
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) mem[addr(wr_bank, wr_frame, wr_dim)] <= wr_data;
    rd_data <= mem[addr(rd_bank, rd_frame, rd_dim)];
  end
endmodule
