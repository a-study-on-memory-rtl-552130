// addlog_tree_tb: feeds back-to-back sets of 16 scores into the add-log tree
// and compares each result with log(sum e^x_i) in floating point (tolerance
// 0.5 = 128/256 for four levels of table approximation). Checks that a new
// set is accepted every cycle and that results appear log2(16) = 4 cycles
// after their inputs.
`include "tb/tb_util.svh"
module addlog_tree_tb;
  import sr_pkg::*;
  localparam int N = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  score_t x [N];
  score_t y;
  real expect_q [$];
  int  in_cyc_q [$];
  int  cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  addlog_tree #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
                            .out_valid(out_valid), .y(y));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    `TB_END
  end

  function automatic real lse(score_t v [N]);
    real m, s;
    m = -1.0e30;
    foreach (v[i]) if (real'(v[i]) / 256.0 > m) m = real'(v[i]) / 256.0;
    s = 0.0;
    foreach (v[i]) s += $exp(real'(v[i]) / 256.0 - m);
    return (m + $ln(s)) * 256.0;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    real r;
    int  c0;
    r  = expect_q.pop_front();
    c0 = in_cyc_q.pop_front();
    `CHECK((real'(y) - r) < 128.0 && (r - real'(y)) < 128.0,
           $sformatf("tree result %0d expected %0.1f", y, r))
    `CHECK(cyc - c0 == 4, $sformatf("latency %0d cycles, expected 4", cyc - c0))
  end

  int n_out = 0;
  always @(posedge clk) if (rst_n && out_valid) n_out++;

  initial begin
    foreach (x[i]) x[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      in_valid = 1;
      foreach (x[i]) x[i] = -score_t'($urandom_range(0, (k % 4 == 0) ? 600 : 8000));
      expect_q.push_back(lse(x));
      in_cyc_q.push_back(cyc);
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    `CHECK(n_out == 200, $sformatf("%0d results for 200 input sets", n_out))
    `TB_END
  end
endmodule
