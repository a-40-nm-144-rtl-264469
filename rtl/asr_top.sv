// asr_top: HMM-based continuous speech recognition processor.
//
// The recognizer takes MFCC feature vectors and finds the most likely word
// sequence with a context-dependent HMM, a tree lexicon and a bigram language
// model. Two engines work as a pipeline on blocks of look-ahead frames:
//  * gmm_core computes the GMM output probability log b_s(x_t) of every tied
//    state for every frame of a block, sixteen mixtures in parallel, reusing
//    each state's parameters across all frames of the block;
//  * viterbi_core runs the Viterbi recursion with beam pruning over the tree
//    lexicon for the previous block and writes a word trellis.
// The GMM score RAM is double-buffered (two banks) so that the two engines
// work on successive blocks at the same time; global_sequencer starts them,
// swaps the banks and loads MFCC frames.
//
// External memories (off chip): GMM parameters (prm_*), the tree dictionary /
// transition DB (tdb_*), the N-gram DB (ng_*), the active node map (map_*) and
// the trellis output (tr_*). Each is a request/ready port with in-order read
// responses flagged by rvalid. MFCC features arrive as a valid/ready stream.
// After done, best_* name the best word end of the final frame; the sentence
// is recovered by following best_token through the trellis records.
// The block structure follows the source architecture; interfaces, record
// formats and the scheduling details are this design's own.
module asr_top
  import asr_pkg::*;
#(
  parameter int unsigned N_MIX       = 16,
  parameter int unsigned DIM         = 39,
  parameter int unsigned MAX_FRAMES  = 64,
  parameter int unsigned MAX_STATES  = 2560,
  parameter int unsigned MAX_ACTIVE  = 4096,
  parameter int unsigned SDB_DEPTH   = 1792,
  parameter int unsigned NG_INDEX_W  = 14,
  parameter int unsigned MAP_INDEX_W = 13,
  parameter int unsigned OBUF_DEPTH  = 32,
  localparam int unsigned FW         = $clog2(MAX_FRAMES+1),
  localparam int unsigned SW         = $clog2(MAX_STATES+1),
  localparam int unsigned LW         = $clog2(MAX_ACTIVE+1),
  localparam int unsigned SDB_AW     = $clog2(SDB_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // control and configuration
  input  logic               start,
  input  logic [15:0]        num_blocks,
  input  logic [FW-1:0]      frames_per_block,
  input  logic [SW-1:0]      num_states,
  input  logic [NODE_W-1:0]  root_first,
  input  logic [15:0]        root_count,
  input  logic [WORD_W-1:0]  vocab_size,
  input  logic [15:0]        beam_width,
  input  pscore_t            margin_max,
  input  logic [LM_W-1:0]    oov_cost,
  output logic               busy,
  output logic               done,
  // MFCC input stream
  input  logic               mf_valid,
  output logic               mf_ready,
  input  logic signed [FEAT_W-1:0] mf_data,
  // GMM parameter RAM
  output logic               prm_req,
  output logic [31:0]        prm_addr,
  input  logic               prm_ready,
  input  logic               prm_rvalid,
  input  logic [31:0]        prm_rdata,
  // tree dictionary / transition DB
  output logic               tdb_req,
  output logic [NODE_W-1:0]  tdb_addr,
  input  logic               tdb_ready,
  input  logic               tdb_rvalid,
  input  node_rec_t          tdb_rdata,
  // N-gram DB
  output logic               ng_req,
  output logic [31:0]        ng_addr,
  input  logic               ng_ready,
  input  logic               ng_rvalid,
  input  ngram_ent_t         ng_rdata,
  // active node map (node-to-token list)
  output logic               map_req,
  output logic               map_we,
  output logic [NODE_W-1:0]  map_addr,
  output map_ent_t           map_wdata,
  input  logic               map_ready,
  input  logic               map_rvalid,
  input  map_ent_t           map_rdata,
  // shared back-off DB load
  input  logic               sdb_we,
  input  logic [SDB_AW-1:0]  sdb_addr,
  input  logic [LM_W-1:0]    sdb_wdata,
  // trellis output
  output logic               tr_valid,
  input  logic               tr_ready,
  output logic [TOKEN_W-1:0] tr_token,
  output trellis_t           tr_data,
  // result
  output logic               best_valid,
  output pscore_t            best_score,
  output logic [WORD_W-1:0]  best_word,
  output logic [TOKEN_W-1:0] best_token,
  output logic [FRAME_W-1:0] frame_no,
  output logic [LW-1:0]      active_count,
  // statistics
  output vit_stats_t         vit_stats,
  output logic [31:0]        ng_hits,
  output logic [31:0]        ng_misses,
  output logic [31:0]        map_hits,
  output logic [31:0]        map_misses,
  output logic [31:0]        gmm_wait_cycles,
  output logic [31:0]        vit_wait_cycles,
  output logic [31:0]        bank_swaps,
  output logic [31:0]        prefetch_wait_cycles
);
  localparam int unsigned MF_AW = $clog2(MAX_FRAMES*DIM);
  localparam int unsigned SC_AW = $clog2(MAX_FRAMES*MAX_STATES);

  logic              mfcc_we;
  logic [MF_AW-1:0]  mfcc_addr;
  logic signed [FEAT_W-1:0] mfcc_wdata;
  logic              gmm_start, gmm_done, gmm_busy;
  logic              vit_init, vit_start, vit_done, vit_busy;
  logic              score_sel;
  logic              sc_we;
  logic [SC_AW-1:0]  sc_addr;
  gscore_t           sc_data;
  logic              gs_rd_en;
  logic [SC_AW-1:0]  gs_rd_addr;
  gscore_t           gs_rd_data;
  gscore_t           p_rd_unused;

  global_sequencer #(.DIM(DIM), .MAX_FRAMES(MAX_FRAMES)) u_seq (
    .clk, .rst_n, .start, .num_blocks, .frames_per_block, .busy, .done,
    .mf_valid, .mf_ready, .mf_data,
    .mfcc_we, .mfcc_addr, .mfcc_wdata,
    .gmm_start, .gmm_done, .vit_init, .vit_start, .vit_done, .score_sel,
    .gmm_wait_cycles, .vit_wait_cycles, .bank_swaps);

  gmm_core #(.N_MIX(N_MIX), .DIM(DIM), .MAX_FRAMES(MAX_FRAMES), .MAX_STATES(MAX_STATES)) u_gmm (
    .clk, .rst_n, .start(gmm_start), .num_states, .num_frames(frames_per_block),
    .busy(gmm_busy), .done(gmm_done),
    .mfcc_we, .mfcc_addr, .mfcc_wdata,
    .prm_req, .prm_addr, .prm_ready, .prm_rvalid, .prm_rdata,
    .sc_we, .sc_addr, .sc_data, .prefetch_wait_cycles);

  // GMM score RAM0/RAM1: GMM core fills one bank, Viterbi core reads the other
  pingpong_ram #(.WIDTH(GSCORE_W), .DEPTH(MAX_FRAMES*MAX_STATES)) u_gmm_score (
    .clk, .sel(score_sel),
    .c_rd_en(gs_rd_en), .c_rd_addr(gs_rd_addr), .c_rd_data(gs_rd_data),
    .p_wr_en(sc_we), .p_wr_addr(sc_addr), .p_wr_data(sc_data),
    .p_rd_en(1'b0), .p_rd_addr('0), .p_rd_data(p_rd_unused));

  viterbi_core #(.MAX_ACTIVE(MAX_ACTIVE), .MAX_FRAMES(MAX_FRAMES), .MAX_STATES(MAX_STATES),
                 .SDB_DEPTH(SDB_DEPTH), .NG_INDEX_W(NG_INDEX_W), .MAP_INDEX_W(MAP_INDEX_W),
                 .OBUF_DEPTH(OBUF_DEPTH)) u_vit (
    .clk, .rst_n, .init(vit_init), .start(vit_start), .num_frames(frames_per_block),
    .busy(vit_busy), .done(vit_done),
    .root_first, .root_count, .vocab_size, .beam_width, .margin_max, .oov_cost,
    .gs_rd_en, .gs_rd_addr, .gs_rd_data,
    .tdb_req, .tdb_addr, .tdb_ready, .tdb_rvalid, .tdb_rdata,
    .ng_req, .ng_addr, .ng_ready, .ng_rvalid, .ng_rdata,
    .map_req, .map_we, .map_addr, .map_wdata, .map_ready, .map_rvalid, .map_rdata,
    .sdb_we, .sdb_addr, .sdb_wdata,
    .tr_valid, .tr_ready, .tr_token, .tr_data,
    .best_valid, .best_score, .best_word, .best_token, .frame_no, .active_count,
    .stats(vit_stats), .ng_hits, .ng_misses, .map_hits, .map_misses);

  // the sequencer only starts an engine that is idle
  a_gmm_idle: assert property (@(posedge clk) disable iff (!rst_n) gmm_start |-> !gmm_busy);
  a_vit_idle: assert property (@(posedge clk) disable iff (!rst_n) vit_start |-> !vit_busy);
endmodule
