// addlog2_tb: checks the two-input add-log unit against log(e^a + e^b)
// computed in floating point, for random and edge-case pairs, with a
// tolerance of 40/256 (the table step of 0.25 bounds the error near 0.125),
// and checks the one-cycle latency.
`include "tb/tb_util.svh"
module addlog2_tb;
  import sr_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  score_t a, b, y;
  always #5 clk = ~clk;

  addlog2 dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
               .out_valid(out_valid), .y(y));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    `TB_END
  end

  function automatic real ref_addlog(score_t x, score_t z);
    real rx, rz, m;
    rx = real'(x) / 256.0; rz = real'(z) / 256.0;
    m = (rx > rz) ? rx : rz;
    return m + $ln($exp(rx - m) + $exp(rz - m));
  endfunction

  task automatic one(score_t x, score_t z);
    real r;
    @(negedge clk); a = x; b = z; in_valid = 1;
    @(negedge clk); in_valid = 0;
    `CHECK(out_valid, "out_valid one cycle after in_valid")
    r = ref_addlog(x, z) * 256.0;
    `CHECK((real'(y) - r) < 40.0 && (r - real'(y)) < 40.0,
           $sformatf("addlog(%0d,%0d)=%0d expected %0.1f", x, z, y, r))
    @(negedge clk);
    `CHECK(!out_valid, "out_valid is a single pulse")
  endtask

  initial begin
    a = 0; b = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    one(0, 0);
    one(256, 256);
    one(-1000, -1000);
    one(0, -2048);
    one(-5000, 0);
    one(0, -64);
    one(-3000, -2900);
    for (int i = 0; i < 300; i++) begin
      score_t x, z;
      x = -score_t'($urandom_range(0, 60000));
      z = x + score_t'($urandom_range(0, 3000)) - 1500;
      one(x, z);
    end
    `TB_END
  end
endmodule
