// das_beamformer: delay-and-sum beamformer.
//
// Aligns N sample streams on a common source by delaying each by its own
// number of samples and adds them, which reinforces the source in front of
// the array and averages out uncorrelated noise. Inside a sensor node it
// combines the 16 microphones; between nodes the same operation merges the
// node's own beamformed stream with the stream received from the previous
// node (perfect aggregation: the network always carries one channel).
//
// How it works: each channel writes its samples into a circular buffer of
// MAXD entries (the node's sample memory); the output adds, per channel, the
// sample delay[i] strobes old (delay 0 takes the current input). Delays come
// from the source position found by localization and are loaded from
// outside. The sum keeps full precision: W + clog2(N) bits.
// Timing: y_valid and y follow in_valid by one cycle.
// The delay-and-sum principle follows the design description; the buffer
// depth, word widths and integer-sample delays are this design's choice.
module das_beamformer #(
  parameter int unsigned N    = 16,
  parameter int unsigned W    = 16,
  parameter int unsigned MAXD = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic signed [W-1:0]           x     [N],
  input  logic [$clog2(MAXD)-1:0]       delay [N],
  output logic                          y_valid,
  output logic signed [W+$clog2(N)-1:0] y
);
  localparam int unsigned DW = $clog2(MAXD);
  localparam int unsigned YW = W + $clog2(N);

  logic [DW-1:0]        wp;
  logic signed [W-1:0]  tap [N];
  logic signed [YW-1:0] sum;

  // one circular sample buffer per channel; tap i is the sample delay[i] ago
  for (genvar i = 0; i < N; i++) begin : g_ch
    logic signed [W-1:0] buffer [MAXD];
    always_ff @(posedge clk) begin
      if (in_valid) buffer[wp] <= x[i];
    end
    assign tap[i] = (delay[i] == '0) ? x[i] : buffer[wp - delay[i]];
  end

  always_comb begin
    sum = '0;
    for (int i = 0; i < N; i++) sum = sum + YW'(tap[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; y_valid <= 1'b0; y <= '0;
    end else begin
      y_valid <= in_valid;
      if (in_valid) begin
        y  <= sum;
        wp <= wp + 1'b1;
      end
    end
  end
endmodule
