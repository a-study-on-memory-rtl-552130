// sram_9t18t_tb: test of the 128-kb dependable dual-port SRAM model
// (8 blocks x 128 rows x 8 columns x 16 b). In normal mode every address
// holds its own word and both ports read it. A block switched to dependable
// mode pairs rows 2k and 2k+1 into one 18T cell: only the lower half of its
// address space is valid (upper half flags an error and does not write),
// a write stores the word in both rows, and both ports read it with the
// differential flag set. Switching one block must leave the others alone,
// and a block returned to normal mode shows the word in both rows of a pair.
`include "tb/tb_util.svh"
module sram_9t18t_tb;
  localparam int B = 8, R = 128, C = 8, W = 16, AW = 13;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_mode = 0;
  logic [2:0] cfg_block = 0;
  logic [B-1:0] mode;
  logic a_en = 0, a_we = 0, a_err, b_en = 0, b_diff, b_err;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic [W-1:0] a_wdata = 0, a_rdata, b_rdata;
  always #5 clk = ~clk;

  sram_9t18t dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    `TB_END
  end

  logic [W-1:0] model [B*R*C];
  logic [B-1:0] m_mode = '0;

  function automatic int blk(int a); return a / (R * C); endfunction
  function automatic int row(int a); return (a / C) % R; endfunction
  // the physical word a read of address a returns
  function automatic int phys(int a);
    if (m_mode[blk(a)]) return blk(a) * R * C + ((row(a) * 2) % R) * C + a % C;
    return a;
  endfunction
  function automatic bit bad(int a);
    return m_mode[blk(a)] && row(a) >= R / 2;
  endfunction

  task automatic wr(int a, logic [W-1:0] d);
    @(negedge clk);
    a_en = 1; a_we = 1; a_addr = AW'(a); a_wdata = d;
    @(negedge clk);
    a_en = 0; a_we = 0;
    `CHECK(a_err == bad(a), $sformatf("write error flag at %0d", a))
    if (!bad(a)) begin
      int p;
      p = phys(a);
      model[p] = d;
      if (m_mode[blk(a)]) model[p + C] = d;
    end
  endtask

  task automatic rd2(int a, int b);
    @(negedge clk);
    a_en = 1; a_we = 0; a_addr = AW'(a);
    b_en = 1; b_addr = AW'(b);
    @(negedge clk);
    a_en = 0; b_en = 0;
    `CHECK(a_err == bad(a), "port A error flag")
    `CHECK(b_err == bad(b), "port B error flag")
    if (!bad(a)) `CHECK(a_rdata == model[phys(a)], $sformatf("port A read %0d", a))
    if (!bad(b)) `CHECK(b_rdata == model[phys(b)], $sformatf("port B read %0d", b))
    `CHECK(b_diff == m_mode[blk(b)], "port B differential flag follows the mode")
  endtask

  task automatic set_mode(int bl, bit m);
    @(negedge clk);
    cfg_we = 1; cfg_block = 3'(bl); cfg_mode = m;
    @(negedge clk);
    cfg_we = 0;
    m_mode[bl] = m;
    `CHECK(mode == m_mode, "mode register")
  endtask

  int n_switch = 0;

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    `CHECK(mode == '0, "all blocks start in normal mode")
    for (int a = 0; a < B * R * C; a++) wr(a, W'($urandom));
    for (int i = 0; i < 2000; i++) rd2($urandom_range(0, B*R*C-1), $urandom_range(0, B*R*C-1));
    for (int k = 0; k < 12; k++) begin
      int bl;
      bl = $urandom_range(0, B - 1);
      set_mode(bl, !m_mode[bl]);
      n_switch++;
      // rewrite the block after a mode change, as the cell pairing changes
      for (int a = bl * R * C; a < (bl + 1) * R * C; a++) if (!bad(a)) wr(a, W'($urandom));
      for (int i = 0; i < 300; i++) begin
        int a;
        a = $urandom_range(0, B*R*C-1);
        if ($urandom_range(0, 3) == 0) wr(a, W'($urandom));
        rd2(a, $urandom_range(0, B*R*C-1));
      end
    end
    // an erroneous write must not disturb the lower half
    set_mode(2, 1);
    for (int a = 2 * R * C; a < 3 * R * C; a++) if (!bad(a)) wr(a, W'(a));
    wr(2 * R * C + (R / 2) * C + 3, 16'hdead);
    for (int a = 2 * R * C; a < 2 * R * C + (R / 2) * C; a++) rd2(a, a);
    // back to normal mode without rewriting: both rows of every pair hold
    // the word written in dependable mode
    set_mode(2, 0);
    for (int a = 2 * R * C; a < 3 * R * C; a++) rd2(a, a);
    `CHECK(n_switch == 12, "mode switches exercised")
    `TB_END
  end
endmodule
