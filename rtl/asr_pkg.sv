// asr_pkg: types and constants shared by the speech recognition processor.
//
// Scores are log probabilities in fixed point, 1 LSB = 1/64 nat (SCORE_FRAC = 6),
// larger is better. GMM scores are stored as 16-bit signed values; Viterbi path
// scores are 32-bit signed. Transition and language-model weights are 8-bit
// unsigned costs (negated log probabilities in the same units) that are
// subtracted from a path score. The record layouts below are this design's own
// choice; the source architecture gives only the block structure and the
// 8-bit width of the language-model scores.
package asr_pkg;

  localparam int SCORE_FRAC = 6;          // fractional bits of all scores
  localparam int GSCORE_W   = 16;         // stored GMM score width
  localparam int PSCORE_W   = 32;         // Viterbi path score width
  localparam int FEAT_W     = 16;         // MFCC feature element width
  localparam int NODE_W     = 20;         // HMM tree node id width
  localparam int WORD_W     = 16;         // word id width (60 k vocabulary)
  localparam int TOKEN_W    = 16;         // trellis (token) index width
  localparam int STATE_W    = 12;         // tied-state (senone) id width
  localparam int FRAME_W    = 16;         // global frame counter width
  localparam int IDX_W      = 12;         // index into an active node list
  localparam int LM_W       = 8;          // language-model score width

  typedef logic signed [GSCORE_W-1:0] gscore_t;
  typedef logic signed [PSCORE_W-1:0] pscore_t;

  localparam pscore_t PSCORE_MIN = {1'b1, {(PSCORE_W-1){1'b0}}};
  localparam pscore_t PSCORE_MAX = {1'b0, {(PSCORE_W-1){1'b1}}};

  // One node of the HMM tree dictionary / transition DB.
  // Children of a node occupy consecutive node ids.
  typedef struct packed {
    logic [STATE_W-1:0] state_id;      // tied state whose GMM score applies
    logic [7:0]         a_self;        // self-loop cost
    logic [7:0]         a_next;        // cost of the transition to a child / next word
    logic [NODE_W-1:0]  first_child;   // id of the first child
    logic [3:0]         n_children;    // number of children (0 = none)
    logic               word_end;      // last state of a word
    logic [WORD_W-1:0]  word_id;       // word identity, valid when word_end
  } node_rec_t;

  // One entry of an active node list (active node workspace).
  // For an entry of the list being built, score holds max_i(delta(i)+log a_ij);
  // the GMM score of the node is added when the entry is read in the next frame.
  typedef struct packed {
    logic [NODE_W-1:0]  node;
    pscore_t            score;
    logic [TOKEN_W-1:0] token;         // trellis entry of the word history
    logic [WORD_W-1:0]  last_word;     // last word of the history (bigram context)
  } active_t;

  // Active node map entry: where a node sits in the list of a given frame.
  typedef struct packed {
    logic [FRAME_W-1:0] tag;           // frame number the entry belongs to
    logic [IDX_W-1:0]   idx;           // position in that frame's list
  } map_ent_t;

  // N-gram DB entry: bigram cost and whether the bigram exists.
  typedef struct packed {
    logic            valid;
    logic [LM_W-1:0] cost;
  } ngram_ent_t;

  // Trellis (word lattice) record written out at each cross-word transition.
  typedef struct packed {
    logic [WORD_W-1:0]  word;
    logic [FRAME_W-1:0] frame;
    logic [TOKEN_W-1:0] prev;
  } trellis_t;

  // Event counters of the Viterbi core.
  typedef struct packed {
    logic [31:0] pruned;        // candidates below the beam threshold
    logic [31:0] new_nodes;     // candidates appended to the next list
    logic [31:0] updates;       // candidates that replaced a worse path
    logic [31:0] merged;        // candidates that lost against an existing path
    logic [31:0] overflow;      // candidates dropped because the list was full
    logic [31:0] word_ends;     // cross-word transitions
    logic [31:0] bigram;        // LM scores found in the bigram table
    logic [31:0] backoff;       // LM scores taken from the shared back-off table
    logic [31:0] trellis_stall; // cycles waiting on a full output buffer
  } vit_stats_t;

  // Saturate a path score to a 16-bit GMM score.
  function automatic gscore_t sat_g(input pscore_t v);
    if (v > pscore_t'(32767))       return gscore_t'(32767);
    else if (v < pscore_t'(-32768)) return gscore_t'(-32768);
    else                            return gscore_t'(v);
  endfunction

endpackage
