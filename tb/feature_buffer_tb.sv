// feature_buffer_tb: fills both banks of the MFCC input buffer with known
// patterns (default 50 frames x 25 dimensions) and reads every element back,
// checking the one-cycle read latency and that the banks do not alias.
`include "tb/tb_util.svh"
module feature_buffer_tb;
  import sr_pkg::*;
  localparam int F = 50, D = 25;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic wr_en = 0, wr_bank = 0, rd_bank = 0;
  logic [$clog2(F)-1:0] wr_frame = 0, rd_frame = 0;
  logic [$clog2(D)-1:0] wr_dim = 0, rd_dim = 0;
  feat_t wr_data = 0, rd_data;
  always #5 clk = ~clk;

  feature_buffer #(.FRAMES(F), .DIMS(D)) dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    `TB_END
  end

  function automatic feat_t pat(int b, int f, int d);
    return feat_t'((b * 7919 + f * 131 + d * 17) ^ 16'h5a5a);
  endfunction

  initial begin
    for (int b = 0; b < 2; b++)
      for (int f = 0; f < F; f++)
        for (int d = 0; d < D; d++) begin
          @(negedge clk);
          wr_en = 1; wr_bank = b[0]; wr_frame = f[$clog2(F)-1:0]; wr_dim = d[$clog2(D)-1:0];
          wr_data = pat(b, f, d);
        end
    @(negedge clk); wr_en = 0;
    for (int b = 0; b < 2; b++)
      for (int f = 0; f < F; f++)
        for (int d = 0; d < D; d++) begin
          @(negedge clk);
          rd_bank = b[0]; rd_frame = f[$clog2(F)-1:0]; rd_dim = d[$clog2(D)-1:0];
          @(negedge clk);
          `CHECK(rd_data == pat(b, f, d), $sformatf("bank %0d frame %0d dim %0d", b, f, d))
        end
    `TB_END
  end
endmodule
