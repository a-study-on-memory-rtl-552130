# Low-power signal-processing hardware: a 60k-word speech recognizer, two SRAM macros and a microphone-array node

This repository holds synthesizable SystemVerilog for four pieces of low-power
signal-processing hardware. They come from one line of research on cutting
the energy of memory-bound signal processing, but they do not connect to each
other:

1. **A large-vocabulary continuous speech recognizer** (GMM acoustic scoring
   plus Viterbi beam search, 60,000 words). Its problem is memory bandwidth,
   not arithmetic. Every 10 ms frame, a naive recognizer rereads all Gaussian
   parameters and walks a huge language model in external DRAM. This design
   shares each parameter fetch across 50 frames and prunes with a threshold
   instead of a sort. A two-stage language-model search and two special
   caches keep most accesses on chip.
2. **A 64-kb two-port SRAM with non-precharged read bitlines (10T-S).** Its
   read bitline keeps its last value. Reading correlated data, such as
   neighbouring video pixels, therefore switches few bitlines.
3. **A 128-kb dependable dual-port SRAM (9T/18T).** Any block can switch at
   run time between normal mode (one bit per cell) and dependable mode (one
   bit per cell pair, read differentially).
4. **A 16-microphone sensor node for a sound-acquisition network.** A tiny
   zero-crossing voice detector keeps the node asleep until someone speaks.
   Then a delay-and-sum beamformer merges the 16 microphones into one
   channel. That channel is merged again with the stream arriving from the
   previous node ("perfect aggregation"), so every network link carries one
   channel.

The top level `lp_sigproc_top` places the four side by side. Each has its own
ports, with the prefixes `sr_`, `s10_`, `s9_` and `sn_`.

Most of this text covers the recognizer, because most of the logic and all
the subtle timing are there.

---

## 1. Speech recognizer (`speech_recognizer`)

### 1.1 Data flow

```
feature vectors ──► feature_buffer (2 banks x 50 frames x 25 dims)
                           │
Gaussian parameters ──► gmm_processor ── 16 x gauss_unit ──► addlog_tree
 (external, once per       │  (double parameter buffer: load state j+1
  state per burst)         │   while computing state j)
                           ▼
                    gmm_result_ram (2 banks x 2,000 states x 50 frames)
                           │
                           ▼
                     viterbi_core ──► trellis (word ends) out
                     │    │    │
          threshold_cut  bigram_cache  token_list_cache
                          (top-10 lists) (tokens, start nodes resident)
                           │                  │
                  external bigram data   external token list
```

Recognition runs in **bursts** of `FRAMES` = 50 feature vectors.

- The GMM processor computes the log output probability log b_j(x_t) of
  every state j for every frame t of a burst. It writes them into one bank
  of the result RAM.
- The Viterbi processor then searches those 50 frames from that bank.
- Meanwhile the GMM processor fills the other bank with the next burst.
- `speech_recognizer` accepts a new burst (`burst_valid`/`burst_accept`)
  only when the GMM side is idle and a result bank is free.
  `overlap_cycles` counts the cycles in which both sides ran together.

### 1.2 Burst GMM computation (`gmm_processor`, `gauss_unit`, `addlog_tree`, `addlog2`)

With diagonal covariances, the log likelihood of mixture m is

    s_m = w_m + Σ_d (x_d − μ_{m,d})² · σ_{m,d}

Here w_m folds in the mixture weight and the normalisation constant, and
σ_{m,d} = −1/(2·var). Both are precomputed off line.

- **Lanes.** A `gauss_unit` lane evaluates one mixture at one dimension per
  cycle. There are `MIX` = 16 lanes, one per mixture, fed the same feature
  element.
- **Add-log tree.** After `DIMS` cycles, the 16 scores enter `addlog_tree`.
  This is a four-level tree of two-input `addlog2` units, each computing
  log(e^a + e^b) = max(a,b) + log(1 + e^−|a−b|).
  - The correction comes from a 32-entry table indexed by |a−b| in steps
    of 0.25: entry k = round(256·ln(1+e^(−k/4))). It is zero beyond 8.
  - The tree is pipelined, one level per cycle, so it takes a new set of 16
    scores every cycle.
- **Parameter reuse.** The parameters of a state are fetched once per burst
  and used for all 50 frames. This divides the parameter bandwidth by 50.
- **Double buffering.** A double parameter buffer lets the loader take state
  j+1 (`p_valid`/`p_ready`, 1 + `DIMS` beats) while state j is computed.
  The compute side therefore never waits when memory keeps up.
- **Cycle count.** One burst takes `STATES · FRAMES · DIMS` cycles plus a
  short pipeline tail. The default is 2,000 · 50 · 25 = 2.5 M cycles;
  2,500,033 were measured at full size.

### 1.3 The Viterbi search (`viterbi_core`)

The search keeps a set of **active nodes** of the tree dictionary. Each
frame, every active node of the previous frame is expanded:

1. **Word-internal transitions.**
   - The self loop: score + log a_self.
   - The move to the node's successor: score + log a_next plus the
     successor's *unigram difference*. The dictionary stores language-model
     look-ahead as differences, so one addition applies it.
   - Each destination adds its log output probability from the result RAM.
2. **Trellis save.** A word-end node emits {frame, word, score} on `tr_*`.
   A back end uses these records to recover the sentence.
3. **Cross-word transitions** from a word end to word-start nodes, in two
   stages:
   - In four frames out of five, only the word's **top-10 successors** are
     tried. Their bigram values come from the `bigram_cache`.
   - Every `DETAIL_PERIOD` = 5th frame, the detailed stage tries **all 1,000
     start nodes** instead, with bigram values read from external memory.

**Pruning without a sort.** Every new score is compared at once with a
threshold from `threshold_cut`, and dropped if it is below it. At the end of
a frame the unit sets the next threshold to avg − margin:

- avg is the mean survivor score of the frame.
- The margin shrinks by one step when more than `BEAM` = 4,000 nodes
  survived, and grows by one step when fewer did.

The survivor count therefore hovers around the beam width rather than
matching it exactly, which is the intended trade for removing the sort.

**Tokens, queues and why a node carries a slot.** This part needs the most
care.

- **Token list.** The token list records, for every dictionary node, the
  frame in which it is active (a 16-bit stamp), its best score, and its
  position (`slot`) in the next-frame queue.
  - A transition reads the destination's token.
  - If the stamp is not the next frame, the node is new. It is appended to
    the next-frame queue, and the token is written with that slot.
  - If the node is already active and the new score is better, the token
    *and* the queued score at `slot` are updated.
- **Queues.** There are two queues of `QDEPTH` = 8,192 entries (node,
  score), for the current frame and the next. They swap at the frame end.
- **Why the score lives in the queue.** A node can still be waiting in the
  current-frame queue when a transition already activates it for the next
  frame. That overwrites its token. Reading the score from the queue keeps
  the node's current-frame score intact.
- **Overflow.** New nodes beyond `QDEPTH` are dropped and counted
  (`stats.overflow`).
- **Search start.** `init` seeds the search with node 0 at score 0. The
  frame stamp is *not* reset: tokens left by an earlier utterance therefore
  look inactive, without a sweep over the token list. The stamp wraps after
  65,536 frames, about 11 minutes of speech at 100 frames/s.

The processor evaluates one transition at a time. Every external access is a
request that is held until acknowledged: `dict_*` for dictionary nodes,
`bd_*` for detailed bigram values, `bl_mem_*` for top-10 lines and `tk_mem_*`
for tokens. Memory latency therefore adds directly to the run time. At full
size with one-cycle memories, a burst took about 20 cycles per expanded node.

### 1.4 The two caches

**`bigram_cache`.** This two-way set-associative cache holds top-10 lists.

- A line is 10 entries × 4 bytes (16-bit successor word, 16-bit log
  probability) = 40 bytes.
- The set index is the low bits of the predecessor word, and the tag is the
  whole word ID.
- Replacement is not LRU. Each set has a *high* way and a *low* way. A miss
  fills the high way and moves the old high line into the low way. This
  follows the observation that bigram lists requested late in a frame tend
  to belong to the better hypotheses.
- Default: 1,024 sets = 80 kB.

**`token_list_cache`.** This is a direct-mapped, write-back cache with one
token per line.

- Word-start nodes are hit by almost every cross-word transition. Nodes
  0..999, the start nodes, therefore live in a separate resident array and
  always hit.
- A write miss allocates without fetching, because a write replaces the
  whole token.
- Default: 8,192 lines, about 75 kB with tags.

Both caches clear their tags after reset, one entry per cycle, holding
`req_ready` low: 1,024 cycles for the bigram cache and 8,192 for the token
list cache.

### 1.5 Number formats

- All probabilities are natural logs in signed Q.8, 32 bits wide (`score_t`
  in `sr_pkg`). Larger means more likely.
- `SCORE_MIN` stands for log 0.
- Features, means and inverse variances are signed Q.8 in 16 bits.
- Additions of scores saturate.

---

## 2. 10T-S two-port SRAM (`sram_10ts`)

- **Organisation.** 512 words × 128 bits (64 kb), one write port and one
  read port working in the same cycle. The array is made of 64-word × 64-bit
  cell blocks.
- **Read path.** A read wordline serves a pair of rows. Both rows drive
  their local read bitlines, and a global driver picks the even or odd row
  with the address LSB. The RTL follows these selection steps so that the
  row-pair structure is visible and testable.
- **No precharge.** The cells drive the read bitline through an inverter and
  a transmission gate, so nothing precharges it.
  - `rdata` therefore keeps the last word read while `re` is low.
  - `rbl_toggles` counts the read-bitline transitions, the quantity that
    sets this memory's read energy.
- **Same-address access.** A read of the address being written in the same
  cycle returns the old word.

The transistor-level behaviour is not modelled: leakage, sense-amplifier
threshold and voltage scaling.

## 3. 9T/18T dependable dual-port SRAM (`sram_9t18t`)

- **Organisation.** 8 blocks × 128 rows × 8 columns × 16 bits (128 kb).
- **Ports.** Port A reads and writes (the inside bitlines). Port B only
  reads (the outside, single-ended bitline).
- **Mode switching.** `cfg_we`/`cfg_block`/`cfg_mode` switch one block
  between the two modes:
  - *Normal* (9T): every row holds its own word.
  - *Dependable* (18T): rows 2k and 2k+1 are tied into one more robust bit.
    A write drives both rows, and a read senses the pair differentially.
    The block then holds half as many words. Addresses whose row MSB is set
    are invalid and raise `a_err`/`b_err`.
- **Read type.** `b_diff` tells which kind of read port B performed.
- **Data after a mode change.** Data do not survive a mode change; software
  must rewrite the block.

## 4. Microphone-array sensor node (`sensor_node`)

### 4.1 Zero-crossing voice activity detector (`zc_vad`)

The detector runs on microphone 0 only, on a reduced ADC stream (2 kHz,
10-bit samples). It uses only adders, comparators and shifts. It has three
parts:

- **`vad_zero_cross`** subtracts the current DC offset, with saturation. It
  counts a zero crossing each time the signal returns to the offset line
  after passing the high trigger line (+`TRIG`) or the low one (−`TRIG`).
  Noise that stays inside the trigger band never counts.
- **`vad_offset_ctrl`** sums each frame of 256 samples. At the frame end it
  shifts the sum right by 8, and the result becomes the offset line for the
  next frame. This lets the detector follow ADC drift.
- **`vad_judge`** declares speech when a frame's count reaches `ZC_TH`.

### 4.2 Power manager (`power_manager`)

- **Asleep.** Only microphone 0 and the detector run, on the low-rate ADC
  setting.
- **Waking.** The first speech frame powers the sound-processing unit
  (`proc_en`). It also switches on the other 15 microphones and selects the
  full-quality ADC setting (`adc_hi_mode`).
- **Sleeping again.** After `HANG` = 4 consecutive silent frames the node
  sleeps again. Short pauses inside an utterance therefore do not cut it.

### 4.3 Beamforming and perfect aggregation (`das_beamformer`)

- **In-node beamformer.** Each of the 16 channels goes through its own
  circular delay buffer (up to 255 samples). The delayed samples are added
  at full precision.
- **Where the delays come from.** They are the steering delays found by
  sound-source localization. That step runs elsewhere, so here they are
  inputs.
- **Aggregation.** Inside the node a second, two-input beamformer merges the
  node's beam with the stream from the upstream node, each with its own
  delay. The result (`down_*`, 24 bits) is the single stream forwarded
  downstream.
- **Alignment.** Upstream samples must arrive aligned with the local
  microphone strobes. `up_unaligned` flags a violation.

---

## 5. Parameters and their origin

| Module | Parameter | Default | Origin |
|---|---|---|---|
| speech_recognizer | STATES | 2,000 | published architecture |
| | FRAMES (burst) | 50 | published architecture |
| | MIX | 16 | published add-log parallelism (see §6) |
| | DIMS | 25 | this design (common MFCC + delta set) |
| | BEAM | 4,000 | published (60k-word configuration) |
| | TOPN | 10 | published (40-byte lines) |
| | DETAIL_PERIOD | 5 | published |
| | N_START | 1,000 | published |
| | QDEPTH | 8,192 | this design |
| | BC_SETS | 1,024 | this design (80 kB, nearest power of two below 100 kB) |
| | TK_LINES | 8,192 | this design (about 75 kB) |
| threshold_cut | STEP, MARGIN0, MARGIN_MAX | 1.0, 20.0, 200.0 (Q.8) | this design |
| sram_10ts | WORDS × WIDTH, BLK_W | 512 × 128, 64 | published |
| sram_9t18t | BLOCKS | 8 | published |
| | ROWS × COLS × WIDTH | 128 × 8 × 16 | this design (split of 128 kb) |
| zc_vad | SAMPLE_W | 10 | published |
| | FRAME_LEN | 256 | this design (a power of two, as the shift requires) |
| | TRIG, ZC_TH | 24, 8 | this design |
| power_manager | NMIC, HANG | 16, 4 | published, this design |
| das_beamformer / sensor_node | N | 16 | published |
| | W, MAXD, AGG_W | 16, 256, 24 | this design |

## 6. Departures and limits

- **Mixtures.** The reference model is described as a four-mixture GMM,
  while the hardware is described with 16-way add-log parallelism. The RTL
  builds 16 lanes. A four-mixture model runs by giving the unused lanes
  `SCORE_MIN` weights.
- **Bigram cache size.** The cache is 80 kB, not 100 kB. Indexing by the low
  bits of the word ID needs a power-of-two number of sets.
- **Result RAM size.** It is 2 × 2,000 × 50 × 32 bits = 800 kB. The
  published size is 750 kB.
- **Single Viterbi lane.** The Viterbi processor is one sequential lane. The
  published architecture speaks of parallel Viterbi processing without
  detailing it.
- **Dictionary.** Each dictionary node has one successor, a left-right
  chain per word. Branching inside a shared prefix tree is not modelled.
  - The dictionary record format is this design's: successor, GMM state,
    log a_self, log a_next, unigram difference, word-end flag and word ID.
  - So are the token layout and every memory handshake.
- **Threshold rule.** The threshold update is a simple step rule. The
  published work states the inputs of the update (average score and
  survivor count) but no formula.
- **Analog behaviour.** Neither SRAM models analog behaviour: minimum supply
  voltage, disturb, or power.
- **Not built.** The following are outside this RTL:
  - feature (MFCC) extraction;
  - the external DRAM;
  - MUSIC direction finding, 3-D source location and network time
    synchronisation;
  - the ADCs and microphones.

## 7. Sizing against the evaluated workloads

- **60,000 words, beam 4,000, 66.74 MHz.** At 100 frames/s, a burst of 50
  frames gives 33.37 M cycles.
  - The GMM side needs 2.5 M of them.
  - The Viterbi side needs about 4 M, at about 20 cycles per expanded node
    with one-cycle memories.
  - Slower memories scale the Viterbi share.
- **20,000 words (beam 2,000, 41.71 MHz) and 5,000 words (beam 500,
  21.71 MHz).** These fit the same hardware. The fixed GMM cost is then the
  larger share: 12% and 23% of the available cycles.
- **SRAM macros.** They hold their published capacities exactly: 64 kb and
  128 kb.
- **Sensor node.** The detector needs one cycle per sample. At a 100 kHz
  clock, the 2 kHz stream leaves 50 cycles per sample. A 1,024-microphone
  network is 64 nodes in a chain, each forwarding one 24-bit stream.

---

## 8. Simulation

Every module has a self-checking testbench in `tb/`. Each one:

- prints `TB_RESULT checks=<n> failures=<n>`;
- stops itself with a watchdog;
- runs with plain Verilator 5.

For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          rtl/sr_pkg.sv tb/viterbi_core_tb.sv --top-module viterbi_core_tb
./obj_dir/Vviterbi_core_tb +verilator+rand+reset+2
```

The testbenches start every unreset variable at random values
(`+verilator+rand+reset+2`) and still pass.

| Testbench | What it checks |
|---|---|
| addlog2_tb, addlog_tree_tb | results against floating-point log-sum-exp; latency |
| gauss_unit_tb, gmm_processor_tb | every output probability against a floating-point model; parameters fetched once per state per burst; burst cycle count ≤ S·F·D + small tail |
| feature_buffer_tb, gmm_result_ram_tb | all locations of both banks; read latency and hold |
| threshold_cut_tb | threshold, average and margin against a model of the rule |
| bigram_cache_tb, token_list_cache_tb | hit/miss decisions, high/low way replacement, resident start nodes, write-backs, under random memory latency |
| viterbi_core_tb | two instances (queue of 32 and of 4 entries) against a reference search in the testbench (`tb/vit_model.svh`) that must agree on every counter and the trellis stream, including queue overflow |
| speech_recognizer_tb | 5 bursts end to end: GMM results, search counters, burst pipelining |
| sram_10ts_tb, sram_9t18t_tb | data against a model; read-during-write; bitline toggle count; mode switching and paired writes |
| zc_vad_tb, power_manager_tb, das_beamformer_tb, sensor_node_tb | decisions per frame against a model; wake/sleep; every beamformer output sample |
| lp_sigproc_top_tb | all four designs at once, with the recognizer reduced; counts every mechanism (pipelining overlap, parameter stall, burst back-pressure, pruning, path overwrite, queue overflow, detailed stage, trellis, cache hits/misses, write-back, SRAM read-during-write, mode switch, invalid address, node wake/sleep) and fails if one never occurs |
| lp_sigproc_top_full_tb | the top with **every default**: one full 50-frame burst of the 2,000-state, 16-mixture, 25-dimension recognizer with beam 4,000, plus the SRAMs and the node; about 5.5 M cycles, under 10 s of simulation |

`tb/vit_mem.sv` models the recognizer's external memories with random
latency. `tb/vit_model.svh` is the reference search.
