// token_list_cache_tb: issues random token reads and writes over start nodes
// and ordinary nodes to a reduced token list cache (16 lines, 8 resident
// start nodes) backed by a memory model with random latency. The cache must
// be transparent: every read returns the last token written to that node.
// Hit/miss counts are compared with a direct-mapped reference, start nodes
// must always hit and must never reach memory, and write-backs of dirty
// victims must occur. A hit must answer in one cycle.
`include "tb/tb_util.svh"
module token_list_cache_tb;
  import sr_pkg::*;
  localparam int LINES = 16, NS = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_we = 0, resp_valid;
  node_t req_node = 0;
  token_t req_wdata = 0, resp_data;
  logic mem_req, mem_we, mem_ack = 0;
  node_t mem_node;
  token_t mem_wdata, mem_rdata = 0;
  logic [31:0] hits, misses;
  always #5 clk = ~clk;

  token_list_cache #(.LINES(LINES), .N_START(NS)) dut (.*);

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    `TB_END
  end

  token_t mem [int];      // external token list
  token_t golden [int];   // architectural contents
  int n_wb = 0, n_res_mem = 0;

  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack) begin
      repeat ($urandom_range(0, 4)) @(posedge clk);
      if (int'(mem_node) < NS) n_res_mem++;
      if (mem_we) begin
        mem[int'(mem_node)] = mem_wdata;
        n_wb++;
      end else begin
        mem_rdata <= mem.exists(int'(mem_node)) ? mem[int'(mem_node)] : '0;
      end
      mem_ack <= 1'b1;
    end
  end

  int tagm [LINES];
  int m_hits = 0, m_misses = 0;

  task automatic op(bit we, int n, token_t d);
    bit h;
    int c;
    if (n < NS) h = 1;
    else begin
      h = (tagm[n % LINES] == n);
      tagm[n % LINES] = n;
    end
    if (h) m_hits++; else m_misses++;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = we; req_node = node_t'(n); req_wdata = d;
    @(negedge clk);
    req_valid = 0;
    c = 0;
    while (!resp_valid) begin @(negedge clk); c++; end
    if (h) `CHECK(c == 0, "hit completes in one cycle")
    if (we) golden[n] = d;
    else `CHECK(resp_data == (golden.exists(n) ? golden[n] : token_t'(0)),
                $sformatf("node %0d read %h expected %h", n, resp_data,
                          golden.exists(n) ? golden[n] : token_t'(0)))
  endtask

  initial begin
    foreach (tagm[i]) tagm[i] = -1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int n;
      token_t d;
      n = ($urandom_range(0, 3) == 0) ? $urandom_range(0, NS - 1) : $urandom_range(NS, 80);
      d.stamp = STAMP_W'($urandom);
      d.slot  = SLOT_W'($urandom);
      d.score = score_t'($urandom);
      op($urandom_range(0, 1), n, d);
    end
    repeat (3) @(negedge clk);
    `CHECK(hits == 32'(m_hits), $sformatf("hits %0d expected %0d", hits, m_hits))
    `CHECK(misses == 32'(m_misses), $sformatf("misses %0d expected %0d", misses, m_misses))
    `CHECK(n_wb > 50, $sformatf("dirty victims written back (%0d)", n_wb))
    `CHECK(n_res_mem == 0, "start nodes never go to external memory")
    `TB_END
  end
endmodule
