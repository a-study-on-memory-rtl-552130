// bigram_cache_tb: sends a stream of word IDs (a small hot set plus random
// cold words) into a reduced bigram cache (16 sets, 10 entries per line) with
// a memory model whose latency is random, and compares hit/miss decisions,
// returned lines and counters with a testbench model of the two-way policy
// (a miss fills the high-score way and moves the old high line to the
// low-score way). Checks that a hit answers in one cycle.
`include "tb/tb_util.svh"
module bigram_cache_tb;
  import sr_pkg::*;
  localparam int SETS = 16, TOPN = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, resp_valid, resp_hit, mem_req, mem_rvalid = 0;
  word_t req_word = 0, mem_word;
  bigram_entry_t resp_line [TOPN];
  bigram_entry_t mem_line [TOPN];
  logic [31:0] hits, misses;
  always #5 clk = ~clk;

  bigram_cache #(.SETS(SETS), .TOPN(TOPN)) dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    `TB_END
  end

  function automatic bigram_entry_t ent(word_t w, int k);
    bigram_entry_t e;
    e.word = word_t'(w * 13 + k * 7 + 1);
    e.logp = 16'(-(int'(w) * 3 + k * 11 + 5));
    return e;
  endfunction

  // memory model: answers a held request after 1..6 cycles
  always @(posedge clk) begin
    mem_rvalid <= 1'b0;
    if (mem_req && !mem_rvalid) begin
      repeat ($urandom_range(0, 5)) @(posedge clk);
      foreach (mem_line[k]) mem_line[k] <= ent(mem_word, k);
      mem_rvalid <= 1'b1;
    end
  end

  // reference model
  int  hi_t [SETS], lo_t [SETS];
  int  m_hits = 0, m_misses = 0;

  task automatic req(word_t w);
    int s;
    bit h;
    int t0;
    s = int'(w) % SETS;
    h = (hi_t[s] == int'(w)) || (lo_t[s] == int'(w));
    if (h) m_hits++;
    else begin
      m_misses++;
      lo_t[s] = hi_t[s];
      hi_t[s] = int'(w);
    end
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_word = w;
    t0 = 0;
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) begin @(negedge clk); t0++; end
    `CHECK(resp_hit == h, $sformatf("word %0d hit=%0d expected %0d", w, resp_hit, h))
    if (h) `CHECK(t0 == 0, "hit answers one cycle after the request")
    foreach (resp_line[k])
      `CHECK(resp_line[k] == ent(w, k), $sformatf("word %0d entry %0d", w, k))
  endtask

  initial begin
    foreach (hi_t[i]) begin hi_t[i] = -1; lo_t[i] = -1; end
    repeat (2) @(negedge clk); rst_n = 1;
    // two words sharing a set: both must stay resident (high and low ways)
    req(3); req(3 + SETS); req(3); req(3 + SETS); req(3 + 2 * SETS); req(3);
    for (int i = 0; i < 2000; i++) begin
      word_t w;
      w = ($urandom_range(0, 3) != 0) ? word_t'($urandom_range(0, 23)) : word_t'($urandom_range(0, 4000));
      req(w);
    end
    repeat (2) @(negedge clk);
    `CHECK(hits == 32'(m_hits), $sformatf("hit counter %0d expected %0d", hits, m_hits))
    `CHECK(misses == 32'(m_misses), $sformatf("miss counter %0d expected %0d", misses, m_misses))
    `CHECK(m_hits > 100 && m_misses > 100, "both hits and misses exercised")
    `TB_END
  end
endmodule
