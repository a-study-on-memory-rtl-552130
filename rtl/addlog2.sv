// addlog2: two-input add-log unit.
//
// Computes y = log(e^a + e^b) for two natural-log scores, the operation that
// turns a sum of mixture likelihoods into the log domain. It uses the
// identity log(e^a+e^b) = max(a,b) + log(1 + e^-|a-b|): the correction term is
// read from a 32-entry table indexed by |a-b| in steps of 0.25 and is zero for
// |a-b| >= 8. Table entry k is round(256 * ln(1 + exp(-k/4))) in Q.8.
// The recognizer's add-log processor is built from these units; that they
// use a look-up table follows the design description, the table size and
// step are this design's choice.
//
// Timing: one register stage; y and out_valid follow in_valid by one cycle.
module addlog2
  import sr_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  score_t a,
  input  score_t b,
  output logic   out_valid,
  output score_t y
);
  localparam int unsigned LUT_N = 32;
  localparam logic [7:0] LUT [LUT_N] = '{
    8'd177, 8'd147, 8'd121, 8'd99, 8'd80, 8'd64, 8'd52, 8'd41,
    8'd32,  8'd26,  8'd20,  8'd16, 8'd12, 8'd10, 8'd8,  8'd6,
    8'd5,   8'd4,   8'd3,   8'd2,  8'd2,  8'd1,  8'd1,  8'd1,
    8'd1,   8'd0,   8'd0,   8'd0,  8'd0,  8'd0,  8'd0,  8'd0};

  score_t                 mx;
  logic signed [SCORE_W:0] diff;
  logic [SCORE_W:0]        adiff;
  logic [7:0]              corr;

  always_comb begin
    mx    = (a > b) ? a : b;
    diff  = {a[SCORE_W-1], a} - {b[SCORE_W-1], b};
    adiff = diff[SCORE_W] ? -diff : diff;
    // index = |a-b| / 0.25 = |a-b| >> (SCORE_FRAC-2)
    if ((adiff >> (SCORE_FRAC - 2)) >= (SCORE_W+1)'(LUT_N)) corr = 8'd0;
    else corr = LUT[adiff[SCORE_FRAC-2 +: 5]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= sat_add(mx, score_t'(corr));
    end
  end
endmodule
