// sram_10ts_tb: two-port (one write, one read) test of the 64-kb 10T-S SRAM
// model (512 words x 128 b). Writes random words, reads them back in random
// order with writes to other addresses in the same cycle, checks read-during-
// write returns the old word, that the output holds while no read is issued,
// and that the read-bitline transition counter equals the number of output
// bits that changed, which is the quantity read power follows in a
// non-precharge array (all-zero and all-one patterns give zero transitions).
`include "tb/tb_util.svh"
module sram_10ts_tb;
  localparam int WORDS = 512, WIDTH = 128;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0, re = 0;
  logic [8:0] waddr = 0, raddr = 0;
  logic [WIDTH-1:0] wdata = 0, rdata;
  logic [31:0] rbl_toggles;
  always #5 clk = ~clk;

  sram_10ts dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    `TB_END
  end

  logic [WIDTH-1:0] model [WORDS];
  logic [WIDTH-1:0] last;
  longint exp_tog = 0;

  function automatic logic [WIDTH-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic rd(int a);
    logic [WIDTH-1:0] e;
    e = model[a];
    re = 1; raddr = 9'(a);
    @(negedge clk);
    re = 0;
    `CHECK(rdata == e, $sformatf("read address %0d", a))
    exp_tog += $countones(e ^ last);
    last = e;
    `CHECK(rbl_toggles == 32'(exp_tog), "bitline transitions follow data changes")
  endtask

  initial begin
    last = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      we = 1; waddr = 9'(a); wdata = rnd(); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < WORDS; a++) rd(a);
    // random reads with simultaneous writes elsewhere and to the same word
    for (int i = 0; i < 2000; i++) begin
      int ra, wa;
      logic [WIDTH-1:0] wd;
      ra = $urandom_range(0, WORDS - 1);
      wa = ($urandom_range(0, 7) == 0) ? ra : $urandom_range(0, WORDS - 1);
      wd = rnd();
      we = 1; waddr = 9'(wa); wdata = wd;
      rd(ra);            // read sees the word before this cycle's write
      we = 0;
      model[wa] = wd;
    end
    // hold: output keeps its value while re is low
    begin
      logic [WIDTH-1:0] h;
      h = rdata;
      raddr = 9'($urandom_range(0, WORDS - 1));
      repeat (5) @(negedge clk);
      `CHECK(rdata == h, "output holds without a read")
    end
    // repeated reads of identical data cause no bitline transitions
    @(negedge clk);
    we = 1; waddr = 0; wdata = '0; model[0] = '0;
    @(negedge clk);
    we = 1; waddr = 1; wdata = '0; model[1] = '0;
    @(negedge clk);
    we = 0;
    rd(0);
    begin
      logic [31:0] t0;
      t0 = rbl_toggles;
      for (int i = 0; i < 20; i++) rd(i % 2);
      `CHECK(rbl_toggles == t0, "constant data gives no transitions")
    end
    `TB_END
  end
endmodule
