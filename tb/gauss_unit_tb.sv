// gauss_unit_tb: streams random feature vectors, means and inverse-variance
// coefficients through one Gaussian lane and compares the result with
// w + sum (x-mu)^2 sigma evaluated in the testbench with the documented Q.8
// scaling, for vectors of 25 dimensions given back to back and for a
// one-dimension vector. Checks that the result follows the last dimension
// by one cycle.
`include "tb/tb_util.svh"
module gauss_unit_tb;
  import sr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, first = 0, last = 0, out_valid;
  feat_t x, mu, sigma;
  score_t w, score;
  always #5 clk = ~clk;

  gauss_unit dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .first(first), .last(last),
                  .x(x), .mu(mu), .sigma(sigma), .w(w), .out_valid(out_valid), .score(score));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    `TB_END
  end

  longint expect_q [$];
  always @(posedge clk) if (rst_n && out_valid) begin
    longint e;
    e = expect_q.pop_front();
    `CHECK(longint'(score) == e, $sformatf("score %0d expected %0d", score, e))
  end

  task automatic vec(int dims);
    longint acc;
    longint wv;
    wv = -longint'($urandom_range(0, 5000));
    acc = wv;
    for (int d = 0; d < dims; d++) begin
      longint dd, sq, pr;
      @(negedge clk);
      in_valid = 1; first = (d == 0); last = (d == dims - 1);
      w = score_t'(wv);
      x = feat_t'($urandom_range(0, 4000)) - 16'sd2000;
      mu = feat_t'($urandom_range(0, 4000)) - 16'sd2000;
      sigma = -feat_t'($urandom_range(0, 300));
      dd = longint'(x) - longint'(mu);
      sq = (dd * dd) >>> 8;
      pr = (sq * longint'(sigma)) >>> 8;
      acc += pr;
    end
    expect_q.push_back(acc);
  endtask

  initial begin
    x = 0; mu = 0; sigma = 0; w = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 40; k++) vec(25);
    vec(1);
    vec(3);
    @(negedge clk); in_valid = 0; first = 0; last = 0;
    repeat (3) @(negedge clk);
    `CHECK(expect_q.size() == 0, "every vector produced one score")
    `TB_END
  end
endmodule
