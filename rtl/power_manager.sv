// power_manager: power gating of a microphone-array sensor node.
//
// Keeps the node asleep while no one speaks: in SLEEP only microphone 0 and
// the voice activity detector run, on the low-rate, low-resolution ADC
// setting (2 kHz, 10 b). When the detector reports a speech frame the
// manager wakes the node: it powers the sound processing unit, switches on
// the other 15 microphones and selects the full-quality ADC setting
// (16 kHz, 16 b). After HANG consecutive non-speech frames it puts the node
// back to sleep, so short pauses inside an utterance do not cut it.
//
// Interface: decided/speech from the detector once per frame. proc_en,
// mic_en and adc_hi_mode are registered. wakeups counts SLEEP->ACTIVE
// transitions and active_frames the frames spent awake.
// Which units are switched and the two ADC settings follow the design
// description; the hang-over of HANG frames is this design's choice.
module power_manager #(
  parameter int unsigned NMIC = 16,
  parameter int unsigned HANG = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            decided,
  input  logic            speech,
  output logic            proc_en,
  output logic [NMIC-1:0] mic_en,
  output logic            adc_hi_mode,
  output logic [31:0]     wakeups,
  output logic [31:0]     active_frames
);
  typedef enum logic {SLEEP, ACTIVE} pm_e;
  pm_e st;
  logic [$clog2(HANG+1)-1:0] quiet;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= SLEEP; quiet <= '0; wakeups <= '0; active_frames <= '0;
    end else if (decided) begin
      case (st)
        SLEEP: if (speech) begin
          st <= ACTIVE; quiet <= '0; wakeups <= wakeups + 1'b1;
        end
        ACTIVE: begin
          active_frames <= active_frames + 1'b1;
          if (speech) quiet <= '0;
          else if (quiet == $bits(quiet)'(HANG)) st <= SLEEP;
          else quiet <= quiet + 1'b1;
        end
        default: st <= SLEEP;
      endcase
    end
  end

  always_comb begin
    proc_en     = (st == ACTIVE);
    adc_hi_mode = (st == ACTIVE);
    mic_en      = (st == ACTIVE) ? '1 : NMIC'(1);
  end
endmodule
