// viterbi_core: token-passing Viterbi search over an HMM tree lexicon.
//
// Implements, one active node at a time,
//   delta_t(j) = max_i [ delta_{t-1}(i) + log a_ij + log P(w) ] + log b_j(x_t)
// with beam pruning, a bigram language model with back-off, and a word
// trellis written to external memory.
//
// Data: the active nodes of a frame form a list in one bank of the active node
// workspace (two banks, ping-pong: the list of frame t is read while the list
// of frame t+1 is built). A list entry holds max_i(delta(i) + log a_ij) of its
// node; the node's GMM score is added when the entry is read in the next frame
// (the GMM term does not depend on i, so the max is unchanged). The active
// node map (external, behind the map cache) records for each node the frame
// tag and list position it last got, so a candidate for a node already in the
// list is merged by comparison instead of appended.
//
// Per entry: read the entry, fetch the node record from the transition DB,
// read log b from the GMM score RAM and add it (delta). Then expand it:
//  * internal word transitions: to itself (cost a_self) and to each child in
//    the tree (cost a_next);
//  * cross-word transition, if the node ends a word: look up the bigram cost
//    P(word | last word) in the N-gram table through the N-gram cache; when the
//    bigram is absent, take the back-off cost from the on-chip shared DB
//    (two-stage LM search, the MUX). Write a trellis record {word, frame,
//    previous token} to the output buffer and send a candidate to each tree
//    root, carrying the new token.
// Each candidate is compared with (running best - margin) and dropped if below
// it; the margin comes from the beam threshold unit, recomputed each frame.
//
// Interfaces: start processes num_frames frames of the GMM score bank offered
// on the gs_* port (address f*MAX_STATES + state) and pulses done after the
// last frame and after the output buffer has drained. init (while idle) loads
// the root nodes as the first list. External memories use a request/ready
// handshake with in-order responses (rvalid). best_* give the best word-end
// node of the last processed frame: the host traces the sentence back from
// best_token through the trellis records.
//
// What follows the source architecture: the Viterbi recursion, beam pruning
// with a dynamic threshold, the cached N-gram and active node map, the
// two-bank active node workspace, the trellis and output buffer. What is this
// design's own: the node and list record formats, the sequential one-candidate
// schedule, the back-off interpretation of the two LM stages and the margin
// formula.
module viterbi_core
  import asr_pkg::*;
#(
  parameter int unsigned MAX_ACTIVE = 4096,   // entries per workspace bank
  parameter int unsigned MAX_FRAMES = 64,
  parameter int unsigned MAX_STATES = 2560,
  parameter int unsigned SDB_DEPTH  = 1792,   // shared DB entries (8 bit each)
  parameter int unsigned NG_INDEX_W = 14,     // N-gram cache lines (log2)
  parameter int unsigned MAP_INDEX_W = 13,    // map cache lines (log2)
  parameter int unsigned OBUF_DEPTH = 32,     // output buffer entries
  localparam int unsigned SC_AW     = $clog2(MAX_FRAMES*MAX_STATES),
  localparam int unsigned FW        = $clog2(MAX_FRAMES+1),
  localparam int unsigned LW        = $clog2(MAX_ACTIVE+1),
  localparam int unsigned SDB_AW    = $clog2(SDB_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // control
  input  logic               init,
  input  logic               start,
  input  logic [FW-1:0]      num_frames,
  output logic               busy,
  output logic               done,
  // configuration
  input  logic [NODE_W-1:0]  root_first,
  input  logic [15:0]        root_count,
  input  logic [WORD_W-1:0]  vocab_size,
  input  logic [15:0]        beam_width,
  input  pscore_t            margin_max,
  input  logic [LM_W-1:0]    oov_cost,        // back-off cost for ids beyond the shared DB
  // GMM score RAM (consumer port, 1-cycle read)
  output logic               gs_rd_en,
  output logic [SC_AW-1:0]   gs_rd_addr,
  input  gscore_t            gs_rd_data,
  // transition DB / tree dictionary
  output logic               tdb_req,
  output logic [NODE_W-1:0]  tdb_addr,
  input  logic               tdb_ready,
  input  logic               tdb_rvalid,
  input  node_rec_t          tdb_rdata,
  // N-gram DB (read only)
  output logic               ng_req,
  output logic [31:0]        ng_addr,
  input  logic               ng_ready,
  input  logic               ng_rvalid,
  input  ngram_ent_t         ng_rdata,
  // active node map in external memory
  output logic               map_req,
  output logic               map_we,
  output logic [NODE_W-1:0]  map_addr,
  output map_ent_t           map_wdata,
  input  logic               map_ready,
  input  logic               map_rvalid,
  input  map_ent_t           map_rdata,
  // shared back-off DB load port
  input  logic               sdb_we,
  input  logic [SDB_AW-1:0]  sdb_addr,
  input  logic [LM_W-1:0]    sdb_wdata,
  // trellis output
  output logic               tr_valid,
  input  logic               tr_ready,
  output logic [TOKEN_W-1:0] tr_token,
  output trellis_t           tr_data,
  // result and statistics
  output logic               best_valid,
  output pscore_t            best_score,
  output logic [WORD_W-1:0]  best_word,
  output logic [TOKEN_W-1:0] best_token,
  output logic [FRAME_W-1:0] frame_no,
  output logic [LW-1:0]      active_count,
  output vit_stats_t         stats,
  output logic [31:0]        ng_hits,
  output logic [31:0]        ng_misses,
  output logic [31:0]        map_hits,
  output logic [31:0]        map_misses
);
  typedef enum logic [4:0] {
    V_IDLE, V_INIT, V_MWAIT, V_FSTART, V_ERD, V_ELAT, V_TDB, V_TDBW, V_GRD, V_GLAT,
    V_XSELF, V_XCHILD, V_LMREQ, V_LMWAIT, V_SDBLAT, V_TRPUSH, V_XROOT,
    V_PRUNE, V_MAPREQ, V_MAPWAIT, V_WSCMP, V_MAPWR, V_NEXT, V_FEND, V_DRAIN
  } vst_t;

  vst_t st, ret;

  logic               ws_sel;
  logic [LW-1:0]      k, n_cur, n_next;
  logic [FW-1:0]      f, nf;
  logic [FRAME_W-1:0] tag_ctr;
  logic [TOKEN_W-1:0] tok_ctr, new_tok;
  active_t            ent, cand;
  node_rec_t          nd;
  pscore_t            delta, run_best;
  logic [3:0]         ci;
  logic [15:0]        ri;
  logic [LM_W-1:0]    lm;
  logic [IDX_W-1:0]   hit_idx;

  // ---------------- active node workspace ----------------
  logic              ws_c_rd_en, ws_p_wr_en, ws_p_rd_en;
  logic [IDX_W-1:0]  ws_c_rd_addr, ws_p_wr_addr, ws_p_rd_addr;
  active_t           ws_c_rd_data, ws_p_rd_data, ws_p_wr_data;

  pingpong_ram #(.WIDTH($bits(active_t)), .DEPTH(MAX_ACTIVE)) u_ws (
    .clk, .sel(ws_sel),
    .c_rd_en(ws_c_rd_en), .c_rd_addr(ws_c_rd_addr), .c_rd_data(ws_c_rd_data),
    .p_wr_en(ws_p_wr_en), .p_wr_addr(ws_p_wr_addr), .p_wr_data(ws_p_wr_data),
    .p_rd_en(ws_p_rd_en), .p_rd_addr(ws_p_rd_addr), .p_rd_data(ws_p_rd_data));

  // ---------------- N-gram cache ----------------
  logic       ngc_req, ngc_ready, ngc_rvalid;
  ngram_ent_t ngc_rdata;
  logic       ng_we_unused;
  ngram_ent_t ng_wdata_unused;

  dm_cache #(.ADDR_W(32), .DATA_W($bits(ngram_ent_t)), .INDEX_W(NG_INDEX_W)) u_ngc (
    .clk, .rst_n, .flush(1'b0),
    .req_valid(ngc_req), .req_we(1'b0),
    .req_addr(32'(ent.last_word) * 32'(vocab_size) + 32'(nd.word_id)),
    .req_wdata('0), .req_ready(ngc_ready), .resp_valid(ngc_rvalid), .resp_rdata(ngc_rdata),
    .mem_req(ng_req), .mem_we(ng_we_unused), .mem_addr(ng_addr), .mem_wdata(ng_wdata_unused),
    .mem_ready(ng_ready), .mem_rvalid(ng_rvalid), .mem_rdata(ng_rdata),
    .hits(ng_hits), .misses(ng_misses));

  // ---------------- active node map cache ----------------
  logic     mc_req, mc_we, mc_ready, mc_rvalid;
  map_ent_t mc_rdata;

  dm_cache #(.ADDR_W(NODE_W), .DATA_W($bits(map_ent_t)), .INDEX_W(MAP_INDEX_W)) u_mapc (
    .clk, .rst_n, .flush(1'b0),
    .req_valid(mc_req), .req_we(mc_we), .req_addr(cand.node),
    .req_wdata({tag_ctr, IDX_W'(n_next)}), .req_ready(mc_ready),
    .resp_valid(mc_rvalid), .resp_rdata(mc_rdata),
    .mem_req(map_req), .mem_we(map_we), .mem_addr(map_addr), .mem_wdata(map_wdata),
    .mem_ready(map_ready), .mem_rvalid(map_rvalid), .mem_rdata(map_rdata),
    .hits(map_hits), .misses(map_misses));

  // ---------------- shared back-off DB ----------------
  logic            sdb_rd_en;
  logic [LM_W-1:0] sdb_rd_data;
  logic            word_in_sdb;

  assign word_in_sdb = (32'(nd.word_id) < 32'(SDB_DEPTH));
  sdp_ram #(.WIDTH(LM_W), .DEPTH(SDB_DEPTH)) u_sdb (
    .clk, .wr_en(sdb_we), .wr_addr(sdb_addr), .wr_data(sdb_wdata),
    .rd_en(sdb_rd_en), .rd_addr(SDB_AW'(nd.word_id)), .rd_data(sdb_rd_data));

  // ---------------- output buffer ----------------
  localparam int unsigned OB_W = TOKEN_W + $bits(trellis_t);
  logic            ob_push, ob_full, ob_empty;
  logic [OB_W-1:0] ob_dout;
  logic [$clog2(OBUF_DEPTH):0] ob_level;

  sync_fifo #(.WIDTH(OB_W), .DEPTH(OBUF_DEPTH)) u_obuf (
    .clk, .rst_n, .push(ob_push),
    .din({tok_ctr, nd.word_id, frame_no, ent.token}),
    .pop(tr_valid && tr_ready), .dout(ob_dout), .full(ob_full), .empty(ob_empty),
    .level(ob_level));

  assign tr_valid = !ob_empty;
  assign {tr_token, tr_data} = ob_dout;

  // ---------------- beam threshold ----------------
  pscore_t delta_c;
  logic    cand_pruned, map_found;
  logic    bt_fstart, bt_sample, bt_fend, bt_mvalid;
  pscore_t bt_margin, bt_best, bt_worst, thr;
  logic [31:0] bt_count;

  beam_threshold u_beam (
    .clk, .rst_n, .frame_start(bt_fstart), .sample_valid(bt_sample), .sample_score(delta_c),
    .frame_end(bt_fend), .beam_width, .margin_max, .margin(bt_margin),
    .margin_valid(bt_mvalid), .count(bt_count), .best(bt_best), .worst(bt_worst));

  // ---------------- datapath ----------------

  assign delta_c  = ent.score + pscore_t'(gs_rd_data);   // add log b_j(x_t)
  // threshold = running best - margin, clamped at the bottom of the range
  assign thr      = (run_best < PSCORE_MIN + bt_margin) ? PSCORE_MIN : run_best - bt_margin;
  assign cand_pruned = (cand.score < thr);
  assign map_found   = (mc_rdata.tag == tag_ctr);

  // memory port controls
  assign ws_c_rd_en   = (st == V_ERD);
  assign ws_c_rd_addr = IDX_W'(k);
  assign ws_p_rd_en   = (st == V_MAPWAIT) && mc_rvalid && map_found;
  assign ws_p_rd_addr = mc_rdata.idx;
  assign tdb_req      = (st == V_TDB);
  assign tdb_addr     = ent.node;
  assign gs_rd_en     = (st == V_GRD);
  assign gs_rd_addr   = SC_AW'(32'(f) * 32'(MAX_STATES) + 32'(nd.state_id));
  assign ngc_req      = (st == V_LMREQ);
  assign sdb_rd_en    = (st == V_LMWAIT) && ngc_rvalid && !ngc_rdata.valid;
  assign mc_req       = (st == V_MAPREQ) || (st == V_MAPWR);
  assign mc_we        = (st == V_MAPWR);
  assign ob_push      = (st == V_TRPUSH) && !ob_full;
  assign bt_fstart    = (st == V_FSTART) || (st == V_IDLE && init);
  assign bt_sample    = (st == V_GLAT);
  assign bt_fend      = (st == V_FEND) ||
                        (st == V_INIT && ri + 1'b1 >= root_count);

  always_comb begin
    ws_p_wr_en   = 1'b0;
    ws_p_wr_addr = IDX_W'(n_next);
    ws_p_wr_data = cand;
    unique case (st)
      V_INIT: begin
        ws_p_wr_en   = 1'b1;
        ws_p_wr_addr = IDX_W'(ri);
        ws_p_wr_data = '{node: root_first + NODE_W'(ri), score: '0, token: '0, last_word: '0};
      end
      V_WSCMP: begin
        ws_p_wr_en   = (cand.score > ws_p_rd_data.score);
        ws_p_wr_addr = hit_idx;
      end
      V_MAPWR: ws_p_wr_en = mc_ready;
      default: ;
    endcase
  end

  assign busy         = (st != V_IDLE);
  assign active_count = n_cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= V_IDLE;
      ret        <= V_IDLE;
      ws_sel     <= 1'b0;
      k          <= '0;
      n_cur      <= '0;
      n_next     <= '0;
      f          <= '0;
      nf         <= '0;
      tag_ctr    <= 16'd1;
      tok_ctr    <= '0;
      new_tok    <= '0;
      ent        <= '0;
      cand       <= '0;
      nd         <= '0;
      delta      <= '0;
      run_best   <= PSCORE_MIN;
      ci         <= '0;
      ri         <= '0;
      lm         <= '0;
      hit_idx    <= '0;
      frame_no   <= '0;
      done       <= 1'b0;
      best_valid <= 1'b0;
      best_score <= PSCORE_MIN;
      best_word  <= '0;
      best_token <= '0;
      stats      <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        V_IDLE: begin
          if (init) begin
            st       <= V_INIT;
            ri       <= '0;
            frame_no <= '0;
            tok_ctr  <= 16'd1;            // token 0 stands for the sentence start
            stats    <= '0;
          end else if (start) begin
            st <= V_MWAIT;
            f  <= '0;
            nf <= num_frames;
          end
        end
        V_INIT: begin
          ri <= ri + 1'b1;
          if (ri + 1'b1 >= root_count) begin
            ws_sel  <= !ws_sel;
            n_cur   <= LW'(root_count);
            tag_ctr <= tag_ctr + 1'b1;
            st      <= V_IDLE;
          end
        end
        V_MWAIT: if (bt_mvalid) st <= V_FSTART;
        V_FSTART: begin
          n_next     <= '0;
          k          <= '0;
          run_best   <= PSCORE_MIN;
          best_valid <= 1'b0;
          best_score <= PSCORE_MIN;
          st         <= (n_cur == '0) ? V_FEND : V_ERD;
        end
        V_ERD:  st <= V_ELAT;
        V_ELAT: begin
          ent <= ws_c_rd_data;
          st  <= V_TDB;
        end
        V_TDB:  if (tdb_ready) st <= V_TDBW;
        V_TDBW: if (tdb_rvalid) begin
          nd <= tdb_rdata;
          st <= V_GRD;
        end
        V_GRD:  st <= V_GLAT;
        V_GLAT: begin
          delta <= delta_c;
          if (nd.word_end && delta_c > best_score) begin
            best_valid <= 1'b1;
            best_score <= delta_c;
            best_word  <= nd.word_id;
            best_token <= ent.token;
          end
          st <= V_XSELF;
        end
        V_XSELF: begin
          cand <= '{node: ent.node, score: delta_c_self(delta, nd.a_self),
                    token: ent.token, last_word: ent.last_word};
          ci   <= '0;
          ret  <= V_XCHILD;
          st   <= V_PRUNE;
        end
        V_XCHILD: begin
          if (ci < nd.n_children) begin
            cand <= '{node: nd.first_child + NODE_W'(ci), score: delta_c_self(delta, nd.a_next),
                      token: ent.token, last_word: ent.last_word};
            ci   <= ci + 1'b1;
            ret  <= V_XCHILD;
            st   <= V_PRUNE;
          end else begin
            st <= nd.word_end ? V_LMREQ : V_NEXT;
          end
        end
        V_LMREQ: if (ngc_ready) st <= V_LMWAIT;
        V_LMWAIT: if (ngc_rvalid) begin
          if (ngc_rdata.valid) begin
            lm           <= ngc_rdata.cost;
            stats.bigram <= stats.bigram + 1'b1;
            st           <= V_TRPUSH;
          end else begin
            stats.backoff <= stats.backoff + 1'b1;
            st            <= V_SDBLAT;
          end
        end
        V_SDBLAT: begin
          lm <= word_in_sdb ? sdb_rd_data : oov_cost;
          st <= V_TRPUSH;
        end
        V_TRPUSH: begin
          if (!ob_full) begin
            new_tok         <= tok_ctr;
            tok_ctr         <= tok_ctr + 1'b1;
            stats.word_ends <= stats.word_ends + 1'b1;
            ri              <= '0;
            st              <= V_XROOT;
          end else begin
            stats.trellis_stall <= stats.trellis_stall + 1'b1;
          end
        end
        V_XROOT: begin
          if (ri < root_count) begin
            cand <= '{node: root_first + NODE_W'(ri),
                      score: delta_c_self(delta, nd.a_next) - pscore_t'(lm),
                      token: new_tok, last_word: nd.word_id};
            ri   <= ri + 1'b1;
            ret  <= V_XROOT;
            st   <= V_PRUNE;
          end else begin
            st <= V_NEXT;
          end
        end
        // ---- candidate processing: prune, look up the map, merge or append ----
        V_PRUNE: begin
          if (cand_pruned) begin
            stats.pruned <= stats.pruned + 1'b1;
            st           <= ret;
          end else begin
            if (cand.score > run_best) run_best <= cand.score;
            st <= V_MAPREQ;
          end
        end
        V_MAPREQ: if (mc_ready) st <= V_MAPWAIT;
        V_MAPWAIT: if (mc_rvalid) begin
          if (map_found) begin
            hit_idx <= mc_rdata.idx;
            st      <= V_WSCMP;
          end else if (n_next < LW'(MAX_ACTIVE)) begin
            st <= V_MAPWR;
          end else begin
            stats.overflow <= stats.overflow + 1'b1;
            st             <= ret;
          end
        end
        V_WSCMP: begin
          if (cand.score > ws_p_rd_data.score) stats.updates <= stats.updates + 1'b1;
          else                                 stats.merged  <= stats.merged + 1'b1;
          st <= ret;
        end
        V_MAPWR: if (mc_ready) begin
          n_next          <= n_next + 1'b1;
          stats.new_nodes <= stats.new_nodes + 1'b1;
          st              <= ret;
        end
        V_NEXT: begin
          k  <= k + 1'b1;
          st <= (k + 1'b1 == n_cur) ? V_FEND : V_ERD;
        end
        V_FEND: begin
          ws_sel   <= !ws_sel;
          n_cur    <= n_next;
          frame_no <= frame_no + 1'b1;
          tag_ctr  <= tag_ctr + 1'b1;
          f        <= f + 1'b1;
          st       <= (f + 1'b1 == nf) ? V_DRAIN : V_MWAIT;
        end
        V_DRAIN: if (ob_empty) begin
          done <= 1'b1;
          st   <= V_IDLE;
        end
        default: st <= V_IDLE;
      endcase
    end
  end

  // path score after a transition of the given cost
  function automatic pscore_t delta_c_self(input pscore_t d, input logic [7:0] cost);
    return d - pscore_t'(cost);
  endfunction

  // external bus rule: a request is held, unchanged, until it is accepted
  a_tdb_hold: assert property (@(posedge clk) disable iff (!rst_n)
    tdb_req && !tdb_ready |=> tdb_req && $stable(tdb_addr));
endmodule
