// addlog_tree: the add-log processor of the GMM unit.
//
// Reduces N mixture scores w_i + sum_s (x_s - mu_is)^2 sigma_is to the output
// probability log b_j(x) = log sum_i e^(score_i). The N inputs are paired
// into N/2 two-input add-log units working at once, their results paired
// again, and so on, as the design description lays out; N must be a power of
// two. With the default N = 16 there are log2(16) = 4 levels of 8, 4, 2 and
// 1 units (15 in all).
//
// Timing: fully pipelined, one new set of inputs per cycle; out_valid and y
// follow in_valid by LEVELS = log2(N) cycles.
module addlog_tree
  import sr_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  score_t x [N],
  output logic   out_valid,
  output score_t y
);
  localparam int unsigned LEVELS = $clog2(N);

  // node storage: level l holds N >> l values
  score_t lvl   [LEVELS+1][N];
  logic   lvl_v [LEVELS+1];

  assign lvl_v[0] = in_valid;
  for (genvar i = 0; i < N; i++) begin : g_in
    assign lvl[0][i] = x[i];
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned W = N >> (l + 1);
    logic v [W];
    for (genvar k = 0; k < W; k++) begin : g_unit
      addlog2 u_al (
        .clk(clk), .rst_n(rst_n), .in_valid(lvl_v[l]),
        .a(lvl[l][2*k]), .b(lvl[l][2*k+1]),
        .out_valid(v[k]), .y(lvl[l+1][k]));
    end
    assign lvl_v[l+1] = v[0];
    for (genvar k = W; k < N; k++) begin : g_pad
      assign lvl[l+1][k] = SCORE_MIN;
    end
  end

  assign out_valid = lvl_v[LEVELS];
  assign y         = lvl[LEVELS][0];
endmodule
