// das_beamformer_tb: feeds 16 channels of random samples with random
// per-channel delays (0..MAXD-1) through the delay-and-sum beamformer and
// compares every output with sum_i x_i[n - delay_i] from a testbench
// history (samples before the first count as whatever was written, so
// checking starts after MAXD samples). Checks the one-cycle latency with
// gaps in the input stream, and a coherent case: a source delayed per
// channel and realigned by matching delays adds to 16 times its amplitude.
`include "tb/tb_util.svh"
module das_beamformer_tb;
  localparam int N = 16, W = 16, MAXD = 256;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, y_valid;
  logic signed [W-1:0] x [N];
  logic [7:0] delay [N];
  logic signed [W+3:0] y;
  always #5 clk = ~clk;

  das_beamformer #(.N(N), .W(W), .MAXD(MAXD)) dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    `TB_END
  end

  int hist [N][4096];
  int n_in = 0;

  task automatic push(int vals [N], bit check);
    longint e;
    @(negedge clk);
    in_valid = 1;
    foreach (x[i]) begin x[i] = W'(vals[i]); hist[i][n_in] = vals[i]; end
    e = 0;
    foreach (x[i]) if (n_in >= int'(delay[i])) e += hist[i][n_in - int'(delay[i])];
    @(negedge clk);
    in_valid = 0;
    `CHECK(y_valid, "output one cycle after input")
    if (check) `CHECK(longint'(y) == e, $sformatf("sample %0d sum %0d expected %0d", n_in, y, e))
    n_in++;
    repeat ($urandom_range(0, 2)) begin
      @(negedge clk);
      `CHECK(!y_valid, "no output without input")
    end
  endtask

  initial begin
    int v [N];
    foreach (x[i]) begin x[i] = 0; delay[i] = 8'($urandom_range(0, MAXD - 1)); end
    delay[0] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 1500; k++) begin
      foreach (v[i]) v[i] = int'($urandom_range(0, 65535)) - 32768;
      if (k % 500 == 499) foreach (delay[i]) delay[i] = 8'($urandom_range(0, MAXD - 1));
      push(v, k >= MAXD);
    end
    // coherent source: channel i hears s[n - 3i]; delays 45 - 3i realign it
    foreach (delay[i]) delay[i] = 8'(45 - 3 * i);
    for (int k = 0; k < 400; k++) begin
      foreach (v[i]) begin
        int t;
        t = k - 3 * i;
        v[i] = (t >= 0) ? int'(1000.0 * $sin(real'(t) * 0.3)) : 0;
      end
      push(v, 1);
      if (k >= 100) begin
        int s;
        s = int'(1000.0 * $sin(real'(k - 45) * 0.3));
        `CHECK(int'(y) == 16 * s, "coherent sum of 16 aligned channels")
      end
    end
    `TB_END
  end
endmodule
