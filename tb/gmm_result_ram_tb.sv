// gmm_result_ram_tb: writes distinct scores to every state/frame of both
// banks of a reduced result RAM (40 states x 50 frames) and reads them back;
// also checks that rd_data holds while rd_en is low and that a write to one
// bank leaves the other unchanged.
`include "tb/tb_util.svh"
module gmm_result_ram_tb;
  import sr_pkg::*;
  localparam int S = 40, F = 50;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic wr_en = 0, wr_bank = 0, rd_en = 0, rd_bank = 0;
  logic [$clog2(S)-1:0] wr_state = 0, rd_state = 0;
  logic [$clog2(F)-1:0] wr_frame = 0, rd_frame = 0;
  score_t wr_data = 0, rd_data;
  always #5 clk = ~clk;

  gmm_result_ram #(.STATES(S), .FRAMES(F)) dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    `TB_END
  end

  function automatic score_t pat(int b, int s, int f);
    return score_t'(-(b * 1000003 + s * 1009 + f * 3 + 1));
  endfunction

  initial begin
    for (int b = 0; b < 2; b++)
      for (int s = 0; s < S; s++)
        for (int f = 0; f < F; f++) begin
          @(negedge clk);
          wr_en = 1; wr_bank = b[0]; wr_state = s[$clog2(S)-1:0]; wr_frame = f[$clog2(F)-1:0];
          wr_data = pat(b, s, f);
        end
    @(negedge clk); wr_en = 0;
    for (int b = 0; b < 2; b++)
      for (int s = 0; s < S; s++)
        for (int f = 0; f < F; f += 7) begin
          @(negedge clk);
          rd_en = 1; rd_bank = b[0]; rd_state = s[$clog2(S)-1:0]; rd_frame = f[$clog2(F)-1:0];
          @(negedge clk);
          rd_en = 0;
          `CHECK(rd_data == pat(b, s, f), $sformatf("bank %0d state %0d frame %0d", b, s, f))
          rd_state = 0;
          @(negedge clk);
          `CHECK(rd_data == pat(b, s, f), "read data holds while rd_en is low")
        end
    `TB_END
  end
endmodule
