// gmm_processor: burst GMM computation unit.
//
// Computes log b_j(x_t) for every GMM state j (0..num_states-1) and every
// frame t of a burst of FRAMES feature vectors, and writes the results into
// the GMM result RAM. The Gaussian parameters of a state (MIX weights, and
// for each of DIMS dimensions MIX means and MIX inverse variances) are read
// from external memory once per burst and shared by all FRAMES frames, which
// divides the parameter bandwidth by FRAMES (burst GMM calculation).
//
// How it works: a loader writes the parameters of state j+1 into one half of
// a double parameter buffer while the compute side works on state j from the
// other half, so memory reading and Gaussian calculation overlap. The compute
// side walks frame by frame and dimension by dimension; MIX gauss_unit lanes
// (one per mixture) take one dimension per cycle, and every DIMS cycles their
// MIX scores enter an addlog_tree that returns one output probability per
// frame. The feature vectors sit in a two-bank feature_buffer written through
// the fb_* port.
//
// Interface: parameter stream p_valid/p_ready, 1+DIMS beats per state: beat 0
// carries p_w, beats 1..DIMS carry p_mu and p_sigma of one dimension.
// start (one cycle, with num_states, feat_bank, res_bank) begins a burst;
// busy stays high until the last result is written, then done pulses.
// Timing: about DIMS+1 cycles of first load, then FRAMES*DIMS cycles per
// state, plus the 1+1+log2(MIX) cycle pipeline latency at the end.
// Parallelism over mixtures and frames, the add-log tree and the overlap of
// loading and computing follow the design description; the buffer
// organisation and the beat format are this design's choice.
module gmm_processor
  import sr_pkg::*;
#(
  parameter int unsigned STATES = 2000,
  parameter int unsigned FRAMES = 50,
  parameter int unsigned DIMS   = 25,
  parameter int unsigned MIX    = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // control
  input  logic                       start,
  input  logic [$clog2(STATES+1)-1:0] num_states,
  input  logic                       feat_bank,
  input  logic                       res_bank,
  output logic                       busy,
  output logic                       done,
  // feature vector write port
  input  logic                       fb_wr_en,
  input  logic                       fb_wr_bank,
  input  logic [$clog2(FRAMES)-1:0]  fb_wr_frame,
  input  logic [$clog2(DIMS)-1:0]    fb_wr_dim,
  input  feat_t                      fb_wr_data,
  // Gaussian parameter stream from external memory
  input  logic                       p_valid,
  output logic                       p_ready,
  input  score_t                     p_w     [MIX],
  input  feat_t                      p_mu    [MIX],
  input  feat_t                      p_sigma [MIX],
  // result RAM write port
  output logic                       res_we,
  output logic                       res_wbank,
  output logic [$clog2(STATES)-1:0]  res_state,
  output logic [$clog2(FRAMES)-1:0]  res_frame,
  output score_t                     res_data
);
  localparam int unsigned SW = $clog2(STATES+1);
  localparam int unsigned FW = $clog2(FRAMES);
  localparam int unsigned DW = $clog2(DIMS);
  localparam int unsigned BW = $clog2(DIMS+1);

  // ---------------- parameter double buffer ----------------
  score_t pb_w     [2][MIX];
  feat_t  pb_mu    [2][DIMS][MIX];
  feat_t  pb_sigma [2][DIMS][MIX];
  logic   pfull    [2];

  logic            ld_bank;
  logic [BW-1:0]   ld_beat;
  logic [SW-1:0]   ld_count;     // states loaded so far
  logic [SW-1:0]   nstates;
  logic            feat_bank_q, res_bank_q;

  // ---------------- compute side ----------------
  logic            cp_bank;
  logic [SW-1:0]   cp_state;
  logic [FW-1:0]   cp_frame;
  logic [DW-1:0]   cp_dim;
  logic            cp_run;       // issuing a state
  logic            set_full, clr_full;

  assign p_ready  = busy && !pfull[ld_bank] && (ld_count < nstates);
  assign set_full = p_valid && p_ready && (ld_beat == BW'(DIMS));
  assign clr_full = cp_run && (cp_frame == FW'(FRAMES-1)) && (cp_dim == DW'(DIMS-1));

  always_ff @(posedge clk) begin
    if (p_valid && p_ready) begin
      if (ld_beat == '0) pb_w[ld_bank] <= p_w;
      else begin
        pb_mu[ld_bank][ld_beat-1]    <= p_mu;
        pb_sigma[ld_bank][ld_beat-1] <= p_sigma;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pfull[0] <= 1'b0; pfull[1] <= 1'b0;
      ld_bank <= 1'b0; ld_beat <= '0; ld_count <= '0;
      nstates <= '0; feat_bank_q <= 1'b0; res_bank_q <= 1'b0;
    end else if (start && !busy) begin
      pfull[0] <= 1'b0; pfull[1] <= 1'b0;
      ld_bank <= 1'b0; ld_beat <= '0; ld_count <= '0;
      nstates <= num_states; feat_bank_q <= feat_bank; res_bank_q <= res_bank;
    end else begin
      if (p_valid && p_ready) begin
        if (ld_beat == BW'(DIMS)) begin
          ld_beat  <= '0;
          ld_bank  <= ~ld_bank;
          ld_count <= ld_count + 1'b1;
        end else ld_beat <= ld_beat + 1'b1;
      end
      if (set_full) pfull[ld_bank] <= 1'b1;
      if (clr_full) pfull[cp_bank] <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cp_bank <= 1'b0; cp_state <= '0; cp_frame <= '0; cp_dim <= '0; cp_run <= 1'b0;
    end else if (start && !busy) begin
      cp_bank <= 1'b0; cp_state <= '0; cp_frame <= '0; cp_dim <= '0; cp_run <= 1'b0;
    end else if (!cp_run) begin
      if (busy && pfull[cp_bank] && cp_state < nstates) cp_run <= 1'b1;
    end else begin
      if (cp_dim == DW'(DIMS-1)) begin
        cp_dim <= '0;
        if (cp_frame == FW'(FRAMES-1)) begin
          cp_frame <= '0;
          // continue without a bubble when the next state is already loaded
          cp_run   <= pfull[~cp_bank] && (cp_state + 1'b1 < nstates);
          cp_bank  <= ~cp_bank;
          cp_state <= cp_state + 1'b1;
        end else cp_frame <= cp_frame + 1'b1;
      end else cp_dim <= cp_dim + 1'b1;
    end
  end

  // ---------------- feature buffer ----------------
  feat_t x_rd;
  feature_buffer #(.FRAMES(FRAMES), .DIMS(DIMS)) u_fbuf (
    .clk(clk),
    .wr_en(fb_wr_en), .wr_bank(fb_wr_bank), .wr_frame(fb_wr_frame), .wr_dim(fb_wr_dim),
    .wr_data(fb_wr_data),
    .rd_bank(feat_bank_q), .rd_frame(cp_frame), .rd_dim(cp_dim), .rd_data(x_rd));

  // stage 1: parameters registered alongside the feature read
  logic   s1_v, s1_first, s1_last;
  feat_t  s1_mu [MIX];
  feat_t  s1_sg [MIX];
  score_t s1_w  [MIX];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_first <= 1'b0; s1_last <= 1'b0;
    end else begin
      s1_v     <= cp_run;
      s1_first <= (cp_dim == '0);
      s1_last  <= (cp_dim == DW'(DIMS-1));
    end
  end
  always_ff @(posedge clk) begin
    s1_mu <= pb_mu[cp_bank][cp_dim];
    s1_sg <= pb_sigma[cp_bank][cp_dim];
    s1_w  <= pb_w[cp_bank];
  end

  // ---------------- MIX Gaussian lanes ----------------
  logic   g_v [MIX];
  score_t g_s [MIX];
  for (genvar m = 0; m < MIX; m++) begin : g_lane
    gauss_unit u_g (
      .clk(clk), .rst_n(rst_n), .in_valid(s1_v), .first(s1_first), .last(s1_last),
      .x(x_rd), .mu(s1_mu[m]), .sigma(s1_sg[m]), .w(s1_w[m]),
      .out_valid(g_v[m]), .score(g_s[m]));
  end

  // ---------------- add-log processor ----------------
  logic   t_v;
  score_t t_y;
  addlog_tree #(.N(MIX)) u_tree (
    .clk(clk), .rst_n(rst_n), .in_valid(g_v[0]), .x(g_s), .out_valid(t_v), .y(t_y));

  // ---------------- result write-back (results arrive in issue order) -----
  logic [SW-1:0] wb_state;
  logic [FW-1:0] wb_frame;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; wb_state <= '0; wb_frame <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= (num_states != '0); done <= (num_states == '0);
        wb_state <= '0; wb_frame <= '0;
      end else if (t_v) begin
        if (wb_frame == FW'(FRAMES-1)) begin
          wb_frame <= '0;
          wb_state <= wb_state + 1'b1;
          if (wb_state + 1'b1 == nstates) begin busy <= 1'b0; done <= 1'b1; end
        end else wb_frame <= wb_frame + 1'b1;
      end
    end
  end

  assign res_we    = t_v;
  assign res_wbank = res_bank_q;
  assign res_state = wb_state[$clog2(STATES)-1:0];
  assign res_frame = wb_frame;
  assign res_data  = t_y;
endmodule
