// tb_viterbi_core: runs the Viterbi core on a random tree lexicon, random GMM
// scores and a random bigram table at reduced sizes, block after block, and
// compares it with an independent model of the same search: after every block
// the number of active nodes, the frame counter, the best word end (score,
// word, token) and all event counters; every trellis record written out is compared
// with the model record of the same token. External memories answer with latency and random
// stalls, and the trellis port is throttled so the output buffer fills. The
// test counts a failure for any mechanism that never happened: pruning,
// merging (better and worse path), list overflow, bigram hit, back-off,
// output-buffer stall, N-gram and map cache hits.
module tb_viterbi_core;
  import asr_pkg::*;
  import asr_ref_pkg::*;

  localparam int MAXA = 40, MAXF = 4, MAXS = 8, SDBD = 16, NB = 8;
  localparam int SC_AW = $clog2(MAXF*MAXS), FW = $clog2(MAXF+1), LW = $clog2(MAXA+1);

  logic clk = 0, rst_n = 0, init = 0, start = 0, busy, done;
  logic [FW-1:0] num_frames = FW'(MAXF);
  logic [NODE_W-1:0] root_first = '0;
  logic [15:0] root_count = '0, beam_width = 16'd12;
  logic [WORD_W-1:0] vocab_size = '0;
  pscore_t margin_max = 600;
  logic [LM_W-1:0] oov_cost = 8'd30;
  logic gs_rd_en;
  logic [SC_AW-1:0] gs_rd_addr;
  gscore_t gs_rd_data;
  logic tdb_req, tdb_ready, tdb_rvalid;
  logic [NODE_W-1:0] tdb_addr;
  node_rec_t tdb_rdata;
  logic ng_req, ng_ready, ng_rvalid;
  logic [31:0] ng_addr;
  ngram_ent_t ng_rdata;
  logic map_req, map_we, map_ready, map_rvalid;
  logic [NODE_W-1:0] map_addr;
  map_ent_t map_wdata, map_rdata;
  logic sdb_we = 0;
  logic [$clog2(SDBD)-1:0] sdb_addr = '0;
  logic [LM_W-1:0] sdb_wdata = '0;
  logic tr_valid, tr_ready = 0;
  logic [TOKEN_W-1:0] tr_token;
  trellis_t tr_data;
  logic best_valid;
  pscore_t best_score;
  logic [WORD_W-1:0] best_word;
  logic [TOKEN_W-1:0] best_token;
  logic [FRAME_W-1:0] frame_no;
  logic [LW-1:0] active_count;
  vit_stats_t stats;
  logic [31:0] ng_hits, ng_misses, map_hits, map_misses;
  int checks = 0, failures = 0;

  viterbi_core #(.MAX_ACTIVE(MAXA), .MAX_FRAMES(MAXF), .MAX_STATES(MAXS), .SDB_DEPTH(SDBD),
                 .NG_INDEX_W(5), .MAP_INDEX_W(4), .OBUF_DEPTH(4)) dut (.*);

  ext_mem #(.WIDTH($bits(node_rec_t)), .DEPTH(512), .LAT(3), .STALL(4)) tdb (
    .clk, .req(tdb_req), .we(1'b0), .addr(32'(tdb_addr)), .wdata('0),
    .ready(tdb_ready), .rvalid(tdb_rvalid), .rdata(tdb_rdata));
  ext_mem #(.WIDTH($bits(ngram_ent_t)), .DEPTH(4096), .LAT(4), .STALL(3)) ngm (
    .clk, .req(ng_req), .we(1'b0), .addr(ng_addr), .wdata('0),
    .ready(ng_ready), .rvalid(ng_rvalid), .rdata(ng_rdata));
  ext_mem #(.WIDTH($bits(map_ent_t)), .DEPTH(512), .LAT(2), .STALL(5)) mapm (
    .clk, .req(map_req), .we(map_we), .addr(32'(map_addr)), .wdata(map_wdata),
    .ready(map_ready), .rvalid(map_rvalid), .rdata(map_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // GMM score RAM stand-in, one-cycle read
  int gsc [MAXF][MAXS];
  always @(posedge clk)
    if (gs_rd_en) gs_rd_data <= gscore_t'(gsc[gs_rd_addr / MAXS][gs_rd_addr % MAXS]);

  vit_model md;
  int n_tr = 0;
  int cyc_cnt = 0;

  // throttled trellis port; records are checked against the model per block
  int       tr_tok_q[$];
  trellis_t tr_dat_q[$];
  always @(posedge clk) begin
    if (tr_valid && tr_ready) begin
      n_tr++;
      tr_tok_q.push_back(int'(tr_token));
      tr_dat_q.push_back(tr_data);
    end
    cyc_cnt <= cyc_cnt + 1;
    // long stretches with the trellis memory busy, then random acceptance
    tr_ready <= ((cyc_cnt % 6000) > 4000) && ($urandom_range(1) == 0);
  end

  task automatic cmp(string what, longint got, longint exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp_v);
    end
  endtask

  initial begin
    node_rec_t nodes[$];
    int n_words, nroots;
    md = new();
    nroots = 4;
    make_lexicon(nroots, 5, MAXS, nodes, n_words);
    $display("lexicon: %0d nodes, %0d words", nodes.size(), n_words);
    foreach (nodes[i]) tdb.mem[i] = nodes[i];
    for (int i = 0; i < 512; i++) mapm.mem[i] = '0;
    vocab_size = WORD_W'(n_words + 1);
    for (int i = 0; i < 4096; i++) begin
      ngram_ent_t e;
      e.valid = ($urandom_range(1) == 0);
      e.cost  = LM_W'($urandom_range(60));
      ngm.mem[i] = e;
      if (i < (n_words + 1) * (n_words + 1)) md.ngram[i] = e;
    end
    md.nodes = nodes;
    md.sdb = new[SDBD];
    md.root_first = 0; md.root_count = nroots; md.vocab = n_words + 1;
    md.beam_width = beam_width; md.margin_max = margin_max; md.oov = oov_cost;
    md.max_active = MAXA;
    root_count = 16'(nroots);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < SDBD; i++) begin
      md.sdb[i] = $urandom_range(50);
      @(negedge clk);
      sdb_we = 1; sdb_addr = ($clog2(SDBD))'(i); sdb_wdata = LM_W'(md.sdb[i]);
    end
    @(negedge clk);
    sdb_we = 0;
    init = 1;
    @(negedge clk);
    init = 0;
    md.init();
    while (busy) @(negedge clk);
    for (int b = 0; b < NB; b++) begin
      for (int f = 0; f < MAXF; f++)
        for (int s = 0; s < MAXS; s++) gsc[f][s] = -int'($urandom_range(200));
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) @(negedge clk);
      for (int f = 0; f < MAXF; f++) begin
        int g[];
        g = new[MAXS];
        for (int s = 0; s < MAXS; s++) g[s] = gsc[f][s];
        md.frame(g);
      end
      cmp("active count", active_count, md.cur.size());
      cmp("frame", frame_no, md.frame_no);
      cmp("best valid", best_valid, md.best_valid);
      if (md.best_valid) begin
        cmp("best score", best_score, md.best_score);
        cmp("best word", best_word, md.best_word);
        cmp("best token", best_token, md.best_token);
      end
      cmp("pruned", stats.pruned, md.pruned);
      cmp("new", stats.new_nodes, md.new_nodes);
      cmp("updates", stats.updates, md.updates);
      cmp("merged", stats.merged, md.merged);
      cmp("overflow", stats.overflow, md.overflow);
      cmp("word ends", stats.word_ends, md.word_ends);
      cmp("bigram", stats.bigram, md.bigram);
      cmp("backoff", stats.backoff, md.backoff);
      cmp("trellis out", n_tr, md.word_ends);
      while (tr_tok_q.size() > 0) begin
        int t;
        trellis_t d;
        t = tr_tok_q.pop_front();
        d = tr_dat_q.pop_front();
        checks++;
        if (!md.trellis.exists(t) || md.trellis[t] !== d) begin
          failures++;
          $display("FAIL trellis token %0d", t);
        end
      end
      $display("block %0d: active %0d best %0d", b, active_count, best_score);
    end
    $display("pruned %0d new %0d upd %0d merged %0d ovf %0d we %0d bigram %0d backoff %0d stall %0d ng %0d/%0d map %0d/%0d",
             stats.pruned, stats.new_nodes, stats.updates, stats.merged, stats.overflow,
             stats.word_ends, stats.bigram, stats.backoff, stats.trellis_stall,
             ng_hits, ng_misses, map_hits, map_misses);
    cmp("pruning seen",   stats.pruned > 0, 1);
    cmp("update seen",    stats.updates > 0, 1);
    cmp("merge seen",     stats.merged > 0, 1);
    cmp("overflow seen",  stats.overflow > 0, 1);
    cmp("bigram seen",    stats.bigram > 0, 1);
    cmp("backoff seen",   stats.backoff > 0, 1);
    cmp("stall seen",     stats.trellis_stall > 0, 1);
    cmp("ngram hit seen", ng_hits > 0, 1);
    cmp("map hit seen",   map_hits > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
