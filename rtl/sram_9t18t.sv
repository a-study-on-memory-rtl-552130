// sram_9t18t: 128-kb dependable dual-port SRAM with per-block 9T/18T modes.
//
// Each bit cell pair can work as two independent cells (normal mode, "9T")
// or be joined into one more reliable bit (dependable mode, "18T"): the two
// internal nodes are tied together, a write drives both cells and a read
// senses the pair differentially, which lowers the minimum supply voltage at
// the price of half the capacity. The mode is chosen block by block at run
// time, so an operating system can put critical data in dependable blocks.
//
// Organisation (defaults): BLOCKS = 8 blocks of 128 rows x 8 columns x 16 b
// (1,024 words of 16 b per block). Port A is the read/write port on the inside
// bitlines; port B is the dedicated read-only port on the outside bitlines.
// Address = {block, row, column}. In a dependable block the pair (rows 2k and
// 2k+1) holds one word: the logical address {block, k, column} (row MSB must
// be 0, else a_err/b_err) writes both rows and reads row 2k.
// b_diff tells whether port B's read used the differential sense amplifier
// (dependable) or the single-ended inverter (normal): the read-path select
// the design needs. Mode changes come in through cfg_we/cfg_block/cfg_mode;
// data of a block whose mode changes must be rewritten.
// Timing: port A write and both reads take one cycle; read data is registered
// and holds when the port is idle. A port B read of a word port A writes in
// the same cycle returns the old word.
// The organisation and the two modes follow the design description; the
// address mapping of the pair and the port handshakes are this design's.
module sram_9t18t #(
  parameter int unsigned BLOCKS = 8,
  parameter int unsigned ROWS   = 128,
  parameter int unsigned COLS   = 8,
  parameter int unsigned WIDTH  = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // mode configuration
  input  logic                     cfg_we,
  input  logic [$clog2(BLOCKS)-1:0] cfg_block,
  input  logic                     cfg_mode,     // 1 = dependable
  output logic [BLOCKS-1:0]        mode,
  // port A: inside bitlines, read/write
  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [$clog2(BLOCKS*ROWS*COLS)-1:0] a_addr,
  input  logic [WIDTH-1:0]         a_wdata,
  output logic [WIDTH-1:0]         a_rdata,
  output logic                     a_err,
  // port B: outside bitlines, read only
  input  logic                     b_en,
  input  logic [$clog2(BLOCKS*ROWS*COLS)-1:0] b_addr,
  output logic [WIDTH-1:0]         b_rdata,
  output logic                     b_diff,
  output logic                     b_err
);
  localparam int unsigned CW = $clog2(COLS);
  localparam int unsigned RW = $clog2(ROWS);
  localparam int unsigned BW = $clog2(BLOCKS);
  localparam int unsigned AW = BW + RW + CW;

  logic [WIDTH-1:0] mc [BLOCKS][ROWS][COLS];

  function automatic logic [BW-1:0] blk(logic [AW-1:0] a); return a[AW-1 -: BW]; endfunction
  function automatic logic [RW-1:0] row(logic [AW-1:0] a); return a[CW +: RW];    endfunction
  function automatic logic [CW-1:0] col(logic [AW-1:0] a); return a[CW-1:0];     endfunction

  // physical row of a read: dependable pairs are rows {k,0} and {k,1}
  function automatic logic [RW-1:0] prow(logic [AW-1:0] a, logic dep);
    return dep ? {row(a)[RW-2:0], 1'b0} : row(a);
  endfunction

  logic a_dep, b_dep, a_bad, b_bad;
  assign a_dep = mode[blk(a_addr)];
  assign b_dep = mode[blk(b_addr)];
  assign a_bad = a_dep && row(a_addr)[RW-1];
  assign b_bad = b_dep && row(b_addr)[RW-1];

  always_ff @(posedge clk) begin
    if (a_en && a_we && !a_bad) begin
      mc[blk(a_addr)][prow(a_addr, a_dep)][col(a_addr)] <= a_wdata;
      if (a_dep)  // both word lines of the pair are raised
        mc[blk(a_addr)][prow(a_addr, 1'b1) | RW'(1)][col(a_addr)] <= a_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= '0; a_rdata <= '0; b_rdata <= '0; a_err <= 1'b0; b_err <= 1'b0; b_diff <= 1'b0;
    end else begin
      if (cfg_we) mode[cfg_block] <= cfg_mode;
      if (a_en) begin
        a_err <= a_bad;
        if (!a_we && !a_bad) a_rdata <= mc[blk(a_addr)][prow(a_addr, a_dep)][col(a_addr)];
      end
      if (b_en) begin
        b_err  <= b_bad;
        b_diff <= b_dep;
        if (!b_bad) b_rdata <= mc[blk(b_addr)][prow(b_addr, b_dep)][col(b_addr)];
      end
    end
  end
endmodule
