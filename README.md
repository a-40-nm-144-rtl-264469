# A pipelined HMM speech recognizer in SystemVerilog

This is the digital core of a large-vocabulary continuous speech recognizer. It
is built to decode a 60,000-word vocabulary in real time on a low clock
frequency. The input is a stream of MFCC feature vectors, one per 10 ms frame.
The output is a word trellis and the best-scoring word end. The host follows
that word end back through the trellis to get the sentence.

Decoding has two stages, and both are costly:

* **Acoustic scoring.** Each tied HMM state is a mixture of 16 diagonal
  Gaussians. For every frame, each state's score `log b_s(x_t)` has to be
  computed.
* **Search.** A Viterbi search runs over a tree-shaped lexicon with a bigram
  language model. It needs a lot of memory traffic: the list of active nodes,
  the map from a node to its place in that list, and the bigram entries.

The design makes both stages cheaper:

* It scores a *block* of look-ahead frames against each state. A state's
  parameters are then fetched once per block, not once per frame.
* It keeps the search's working set on chip. The active node list is held
  entirely on chip. Caches hold the bigrams and the node map.
* It runs the two engines side by side. While the GMM core scores block k, the
  Viterbi core searches block k−1. The two are joined by a double-buffered
  score memory.

```
             MFCC stream                      GMM parameters (ext)
                 |                                   |
        +--------v---------+   start/done   +--------v-----------------+
        | global_sequencer |--------------->| gmm_core                 |
        |  two-stage       |                |  MFCC buffer 64 x 39     |
        |  elastic pipeline|                |  GMM buffer (prefetch)   |
        +--------+---------+                |  16 gaussian_processor   |
                 | bank select              |  add-log tree (15 units) |
                 |                          +--------+-----------------+
                 |                                   | 16-bit scores
                 |                         +---------v----------+
                 +------------------------>| GMM score RAM x 2  | (pingpong_ram)
                                           +---------+----------+
                                                     |
  transition DB (ext) --> +--------------------------v---------------+
  N-gram DB (ext) <-----> | viterbi_core                             |
  node map (ext) <------> |  active node workspace x 2 (on chip)     |
                          |  N-gram cache, map cache (dm_cache)      |
                          |  shared back-off DB, beam_threshold      |
  trellis memory (ext) <- |  output buffer (sync_fifo)               |
                          +------------------------------------------+
```

## Number formats

All scores are log probabilities in fixed point, counted in units of 1/64 nat.
Larger is better. The types are defined in `rtl/asr_pkg.sv`.

| quantity | width | notes |
|---|---|---|
| feature component | 16-bit signed | MFCC input |
| GMM state score | 16-bit signed | saturated; stored in the GMM score RAM |
| mixture score, path score | 32-bit signed | `PSCORE_MIN` stands for "impossible" |
| transition cost, LM cost | 8-bit unsigned | subtracted from the path score |

## GMM core: mixture-parallel scoring with parameter reuse

`gmm_core` scores the states one at a time. For each state it goes through
every frame of the block.

* **Parameter load.** The state's 16 mixtures are loaded into 16
  `gaussian_processor` registers. Each mixture holds 39 (mean, precision)
  pairs and a constant `gconst`.
* **Per-frame scoring.** For each frame the MFCC buffer streams the 39
  components, one per cycle. All 16 processors take the same component at the
  same time. Each one accumulates `(x−μ)²·prec`. One cycle after the last
  component, it outputs `gconst − (Σ >> 16)/2`.
* **Combining the mixtures.** The 16 mixture scores go into a pipelined binary
  tree of 15 `add_log_processor` units. The tree computes
  `log Σ exp(score_m)`.
* **Result.** The tree's output is saturated to 16 bits and written to the GMM
  score RAM at address `frame·MAX_STATES + state`.

While the 16 processors work on state s, the *GMM buffer* fetches the
parameters of state s+1 from external memory. Parameters are read once per
block of look-ahead frames, and reading them overlaps with the computation. A
state costs about `frames·(DIM+2)` cycles plus a short transfer into the
registers. `prefetch_wait_cycles` counts the cycles in which memory could not
keep up.

The external parameter layout is one 32-bit word per entry. The address is
`(state·16 + mixture)·(DIM+1) + k`:

* for `k < DIM`, the word is `{mean[15:0], prec[15:0]}`;
* for `k = DIM`, the word is `gconst`.

### The add-log unit

`log(e^a + e^b) = max(a,b) + log(1 + e^−|a−b|)`.

The correction term comes from a 96-entry table:

* index: `i = min(|a−b| >> 2, 95)`;
* entry: `T[i] = round(64·ln(1 + exp(−i/16)))`.

So the table has a resolution of 1/16 nat and covers differences up to 6 nats.
Beyond that the correction rounds to zero. The table is computed in
SystemVerilog, so no data file is needed. Each unit has one output register.

## Viterbi core: the search

This is the most involved part of the design.

### What is searched

The lexicon is a tree of HMM state nodes. The external *transition DB* holds
one 69-bit record per node, addressed by node id:

| field | bits | meaning |
|---|---|---|
| `state_id` | 12 | tied state whose GMM score this node uses |
| `a_self`, `a_next` | 8 + 8 | self-loop and forward transition costs |
| `first_child`, `n_children` | 20 + 4 | children are stored at consecutive ids |
| `word_end`, `word_id` | 1 + 16 | set on the last node of a word |

Word roots are the node range `root_first … root_first+root_count−1`.

Each active node carries four fields:

* its node id;
* its path score δ;
* a *token*, the id of the trellis record of the word that came before it;
* the last word, which is the bigram history.

The recursion follows the textbook HMM form:

```
δ_t(j) = max over i ∈ {j, parent(j)} [ δ_{t−1}(i) − cost(i→j) − LM(w) ] + log b_j(x_t)
```

The max is taken when candidates are merged. The GMM term is added when the
node is read in the next frame. This gives the same result and means the
score read and the transition can be done in one pass.

### One active node, step by step

Every frame the core reads the current list from one workspace bank and
builds the next list in the other. The FSM in `viterbi_core` handles one
active node at a time:

1. **Read the node.** Read the list entry, fetch its transition record, and
   read its GMM score from the score RAM bank the Viterbi core owns. Add the
   GMM score to get δ. If the node is a word end, track the frame's best word
   end.
2. **Internal word transitions.** Make one candidate for the self loop
   (`δ − a_self`). Make one candidate for each child (`δ − a_next`).
3. **Cross-word transition (word ends only).** This step has two parts.
   - **Look up the language model in two stages.**
     - *Stage 1:* read the bigram `P(word | last_word)` through the *N-gram
       cache* at address `last_word·vocab_size + word_id`. An entry is
       `{valid, cost[7:0]}`.
     - *Stage 2:* if the bigram entry is not valid, take a back-off cost from
       the on-chip *shared DB*, 1792 × 8 bits, indexed by word id. Word ids
       beyond the table use `oov_cost`. A mux picks between the two stages.
   - **Start the next word.** Push a trellis record `{word, frame, prev token}`
     into the output buffer. The record gets a new token number. Then make a
     candidate for every root: `δ − a_next − LM`, carrying the new token.
     A full output buffer stalls the core here.

Every candidate then goes through the same three steps:

* **Prune.** The candidate is dropped if its score is below
  `running_best − margin`. Here `running_best` is the best score among the
  candidates this frame has kept so far.
* **Find.** Look up the node in the *active node map* through the map cache.
  A map entry is `{tag, idx}`. It is current only if `tag` equals the frame
  counter. A stale entry therefore needs no clearing: every frame starts with
  an empty map.
* **Merge or append.**
  - If the node is already in the next list, keep the better of the two
    (counted as *updates* or *merged*).
  - Otherwise append the candidate and write `{frame, idx}` to the map.
  - If the list already holds `MAX_ACTIVE` nodes, the candidate is dropped
    and counted as *overflow*.

At the end of the frame the banks swap and the frame counter increments.

Token 0 means "start of sentence". It is also the token of the initial roots.

### Dynamic beam

`beam_threshold` sees every kept score of a frame. It tracks the count, the
best score and the worst score. At the frame end it computes the margin for
the next frame:

```
margin = (best − worst) · beam_width / count   if count > beam_width
       = margin_max                            otherwise
(then clamped to margin_max)
```

If the list held more nodes than the beam width, the margin shrinks in
proportion, which brings the next list back toward `beam_width` nodes. The
division uses a 48-bit restoring `divider`. The margin is valid 49 cycles
after the frame end. `viterbi_core` waits for it before it starts the next
frame.

### Caches

Both caches are `dm_cache` instances:

* direct-mapped;
* one word per line;
* write-through, allocating on write.

A read hit returns two cycles after the request. A miss forwards the request
to external memory. The sizes are:

| cache | lines | line contents | storage |
|---|---|---|---|
| N-gram cache | 2^14 | 18-bit tag + 9-bit entry + valid | 0.46 Mbit |
| map cache | 2^13 | 7-bit tag + 28-bit entry + valid | 0.29 Mbit |

Hits and misses are counted for each cache.

### Output

The trellis records leave through the 32-entry output FIFO on
`tr_valid/tr_ready`. `tr_token` gives the record's own token, so the host can
store it at that index. After the last frame, the core waits until the FIFO is
empty before it signals done.

## Global sequencer: the elastic pipeline

An utterance is `num_blocks` blocks of `frames_per_block` frames, up to 64.
The sequencer works like this:

1. Load block 0's MFCC frames.
2. At each step k, start the GMM core on block k (if any) and the Viterbi core
   on block k−1 (if any), each on its own score bank.
3. Load block k+1's MFCC frames once the GMM core has finished with block k.
4. Start step k+1 only when both engines and the load have finished. Swap the
   score banks on that launch.

The pipeline is elastic: the slower engine sets the pace. The sequencer
reports `gmm_wait_cycles` and `vit_wait_cycles` (the cycles each engine sat
idle waiting for the other) and `bank_swaps`.

## Memories and sizes at the default parameters

| memory | organisation | bits |
|---|---|---|
| MFCC buffer | 64 frames × 39 × 16 | 40 K |
| GMM buffer + 16 registers | 2 × 640 × 32 | 40 K |
| GMM score RAM | 2 banks × 64 × 2560 × 16 | 5.2 M |
| active node workspace | 2 banks × 4096 × 84 | 0.69 M |
| N-gram cache + map cache | see above | 0.75 M |
| shared back-off DB | 1792 × 8 | 14 K |
| output buffer | 32 × 64 | 2 K |

External interfaces (`prm_*`, `tdb_*`, `ng_*`, `map_*`, `tr_*`) all use the
same protocol:

* a request is taken when `req && ready`;
* read data returns in order, marked by `rvalid`;
* any latency is allowed.

The shared DB is loaded through `sdb_we/sdb_addr/sdb_wdata` before the start.

## Where this departs from the architecture it follows

The overall architecture, its sizes and the names of its mechanisms follow the
published design. The following are this design's own choices:

* **Arithmetic.** The feature dimension (39), the fixed-point scales, all
  record formats and the Gaussian and add-log arithmetic.
* **Add-log table size.** The table is 96 × 16 bits.
* **Parameter register size.** Each mixture register holds 1280 bits.
* **States scored.** The GMM core scores every state below `num_states` for
  every look-ahead frame. It does not limit itself to the states that will be
  active.
* **Beam rule.** The exact dynamic-beam rule above, and pruning against the
  running best of the frame.
* **Meaning of the two LM stages.** They are taken to be a bigram lookup
  followed by a per-word back-off cost from the on-chip shared table.
* **Separate memory ports.** Each external memory has its own port, not one
  shared bus. Arbitration onto a single DRAM is left to the system.
* **Sequential search.** The Viterbi core handles one candidate at a time.
  Its rate is not tied to any published cycle count. Measured at the default
  size with `beam_width = 3000` on a random 9217-node lexicon, a frame takes
  at most 323 k cycles with the list full at 4096 nodes. A 10 ms frame at
  126.5 MHz allows 1.27 M cycles. A real lexicon may activate more word ends
  per frame, and each word end costs one candidate per root.
* **Frame-tag wrap.** Map tags are 16 bits, so a map entry left from exactly
  65536 frames earlier would look current. Utterances are assumed to be
  shorter than that.
* **Not modelled.** Clock gating, the PLL and the I/O pads are not modelled.
  Feature extraction is not modelled either; it happens before this core.

## Verification

Each block has a self-checking testbench in `tb/`. The testbenches compare the
block against independent reference code in `tb/asr_ref_pkg.sv`:

* a real-valued add-log;
* Gaussian and add-log-tree models;
* the margin formula;
* a random tree-lexicon generator;
* a complete software Viterbi model (`vit_model`), which mirrors the search
  rules above exactly.

`tb/ext_mem.sv` models the external memories, with latency and random
stalls.

| testbench | what it runs |
|---|---|
| `tb_add_log_processor` … `tb_divider` | unit checks against the reference functions, including latency |
| `tb_gmm_core` | small core (4 mixtures, 5 dimensions); every stored score against the reference |
| `tb_viterbi_core` | random lexicon and LM, several frames; list, best word end and trellis against `vit_model`; throttles the trellis port so the output buffer fills |
| `tb_viterbi_beam` | the Viterbi core at its default size with `beam_width` 3000 on a 9217-node lexicon, 24 frames; checks against `vit_model` and prints cycles per frame against the real-time budget |
| `tb_asr_top` | the whole chip at small sizes, 12 blocks; counts each mechanism (pruning, merge, update, overflow, bigram hit, back-off, trellis stall, cache hits and misses, pipeline waits, bank swaps) and fails if one never happened |
| `tb_asr_top_full` | the whole chip at default parameters: 2 blocks of 64 frames, 2560 states, 16 mixtures × 39 dimensions; about 13 M cycles |

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

All that is needed is Verilator 5. From the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/asr_pkg.sv tb/asr_ref_pkg.sv tb/tb_asr_top.sv --top-module tb_asr_top
./obj_dir/Vtb_asr_top
```

To run another test, replace `tb_asr_top` with the name of another testbench.
Verilator simulates with two states, so every register that is read is reset.
The caches clear their valid bits after reset. The testbenches change sizes
only through parameter overrides. The defaults in `rtl/` are the full-size
design.
