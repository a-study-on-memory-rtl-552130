// sram_10ts: 64-kb two-port non-precharge SRAM (10T single-ended read cell).
//
// A memory with one write port and one read port that work in the same cycle,
// intended as a reconstructed-image buffer for video. Its cells drive the
// read bitline through an inverter and a transmission gate, so the bitline is
// never precharged: it keeps the last value read and switches only when the
// next value differs. Reading correlated data (neighbouring pixels, scanned
// as 256x1 blocks) therefore costs little bitline energy.
//
// Organisation (default 512 words x 128 b): 16 cell blocks of 64 words x
// 64 b. A read wordline is shared by a pair of rows; both rows of the pair
// drive their local read bitlines and a global-bitline driver picks the even
// or odd row with the address LSB. This RTL models those steps: row pair,
// 64-bit column half, then the even/odd selection.
//
// Because nothing precharges the bitlines, rdata holds the last word read
// when re is low, and a read of the address being written returns the old
// word. rbl_toggles counts read-bitline transitions (bits of rdata that
// changed on a read), the quantity that sets this memory's read power; it is
// an observation aid of this design.
// Timing: write and read are registered on the same clock edge; rdata is
// valid the cycle after re.
module sram_10ts #(
  parameter int unsigned WORDS = 512,
  parameter int unsigned WIDTH = 128,
  parameter int unsigned BLK_W = 64     // bits per cell block column group
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata,
  output logic [31:0]              rbl_toggles
);
  localparam int unsigned AW     = $clog2(WORDS);
  localparam int unsigned NGROUP = WIDTH / BLK_W;

  // cells stored as [row pair][odd row][column group]
  logic [BLK_W-1:0] mc [WORDS/2][2][NGROUP];

  // shared read wordline: both rows of the pair reach their local bitlines
  logic [BLK_W-1:0] lrbl0 [NGROUP];
  logic [BLK_W-1:0] lrbl1 [NGROUP];
  logic [WIDTH-1:0] grbl;
  always_comb begin
    for (int g = 0; g < NGROUP; g++) begin
      lrbl0[g] = mc[raddr[AW-1:1]][0][g];
      lrbl1[g] = mc[raddr[AW-1:1]][1][g];
      // global-bitline driver selects the LRBL0 or LRBL1 group
      grbl[g*BLK_W +: BLK_W] = raddr[0] ? lrbl1[g] : lrbl0[g];
    end
  end

  always_ff @(posedge clk) begin
    if (we)
      for (int g = 0; g < NGROUP; g++)
        mc[waddr[AW-1:1]][waddr[0]][g] <= wdata[g*BLK_W +: BLK_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata       <= '0;
      rbl_toggles <= '0;
    end else if (re) begin
      rdata       <= grbl;
      rbl_toggles <= rbl_toggles + 32'($countones(grbl ^ rdata));
    end
  end
endmodule
