// gauss_unit: one lane of the Gaussian processor.
//
// Evaluates the log of one weighted diagonal Gaussian for one feature vector,
//   score = w + sum_{s=1..P} (x_s - mu_s)^2 * sigma_s ,
// the per-mixture term of the GMM output probability. w folds the mixture
// weight and the normalisation constant and sigma_s holds -1/(2 var_s); both
// are computed offline, so the lane only subtracts, squares, multiplies and
// accumulates. One dimension is consumed per cycle.
//
// Interface: assert in_valid with first on the first dimension (w is then
// sampled) and last on the P-th. Arithmetic is Q.8: the square is shifted
// right by 8 before the multiply and the product by 8 after it; the
// accumulator saturates. These widths are this design's choice.
//
// Timing: out_valid and score appear one cycle after the dimension marked last.
module gauss_unit
  import sr_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   first,
  input  logic   last,
  input  feat_t  x,
  input  feat_t  mu,
  input  feat_t  sigma,
  input  score_t w,
  output logic   out_valid,
  output score_t score
);
  logic signed [FEAT_W:0]     d;
  localparam int unsigned PW = 3*FEAT_W + 4;
  localparam logic signed [PW-1:0] PMAX = PW'(32'sh7fff_ffff);
  logic signed [2*FEAT_W+1:0] sq;     // d*d, non-negative
  logic signed [2*FEAT_W+1:0] sq_q;   // (d*d)>>8
  logic signed [PW-1:0]       prod;
  score_t                     term;
  score_t                     acc;

  always_comb begin
    d    = {x[FEAT_W-1], x} - {mu[FEAT_W-1], mu};
    sq   = d * d;
    sq_q = sq >>> SCORE_FRAC;
    prod = PW'(sq_q) * PW'(sigma);
    prod = prod >>> SCORE_FRAC;
    if (prod > PMAX)       term = PMAX[SCORE_W-1:0];
    else if (prod < -PMAX) term = -PMAX[SCORE_W-1:0];
    else                   term = prod[SCORE_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      score     <= '0;
    end else begin
      out_valid <= in_valid && last;
      if (in_valid) begin
        if (first && last) score <= sat_add(w, term);
        else if (first)    acc   <= sat_add(w, term);
        else if (last)     score <= sat_add(acc, term);
        else               acc   <= sat_add(acc, term);
      end
    end
  end
endmodule
