// tb_asr_top_full: the end-to-end test of tb_asr_top with the processor at
// its full default size: 16 mixtures per state, 39-dimensional features,
// 64-frame look-ahead blocks, 2560 tied states and 4096-entry active node
// lists. One utterance of two full blocks (128 frames) is recognised; every
// GMM score feeds an independent model of the search, and the best word end,
// the counters, the trellis and the traced-back word sequence are compared.
// List overflow and output-buffer stalls are not forced at this size.
module tb_asr_top_full;
  import asr_pkg::*;
  import asr_ref_pkg::*;

  localparam int NMIX = 16, DIM = 39, MAXF = 64, MAXS = 2560, MAXA = 4096, SDBD = 1792;
  localparam int NB = 2, F = 64, NS = 2560, NROOTS = 16, DEPTH = 6, TR_STALL = 0;
  localparam int WPM = DIM + 1, WPS = NMIX * WPM;
  localparam int FW = $clog2(MAXF+1), SW = $clog2(MAXS+1), LW = $clog2(MAXA+1);
  localparam int WATCHDOG = 40000000;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [15:0] num_blocks = 16'(NB);
  logic [FW-1:0] frames_per_block = FW'(F);
  logic [SW-1:0] num_states = SW'(NS);
  logic [NODE_W-1:0] root_first = '0;
  logic [15:0] root_count = 16'(NROOTS), beam_width = 16'd30;
  logic [WORD_W-1:0] vocab_size = '0;
  pscore_t margin_max = 600;
  logic [LM_W-1:0] oov_cost = 8'd30;
  logic mf_valid = 0, mf_ready;
  logic signed [FEAT_W-1:0] mf_data = '0;
  logic prm_req, prm_ready, prm_rvalid;
  logic [31:0] prm_addr, prm_rdata;
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
  vit_stats_t vit_stats;
  logic [31:0] ng_hits, ng_misses, map_hits, map_misses;
  logic [31:0] gmm_wait_cycles, vit_wait_cycles, bank_swaps, prefetch_wait_cycles;
  int checks = 0, failures = 0;

  asr_top dut (.*);

  ext_mem #(.WIDTH(32), .DEPTH(MAXS*WPS), .LAT(3), .STALL(0)) pmem (
    .clk, .req(prm_req), .we(1'b0), .addr(prm_addr), .wdata('0),
    .ready(prm_ready), .rvalid(prm_rvalid), .rdata(prm_rdata));
  ext_mem #(.WIDTH($bits(node_rec_t)), .DEPTH(4096), .LAT(3), .STALL(4)) tdb (
    .clk, .req(tdb_req), .we(1'b0), .addr(32'(tdb_addr)), .wdata('0),
    .ready(tdb_ready), .rvalid(tdb_rvalid), .rdata(tdb_rdata));
  ext_mem #(.WIDTH($bits(ngram_ent_t)), .DEPTH(65536), .LAT(4), .STALL(3)) ngm (
    .clk, .req(ng_req), .we(1'b0), .addr(ng_addr), .wdata('0),
    .ready(ng_ready), .rvalid(ng_rvalid), .rdata(ng_rdata));
  ext_mem #(.WIDTH($bits(map_ent_t)), .DEPTH(4096), .LAT(2), .STALL(5)) mapm (
    .clk, .req(map_req), .we(map_we), .addr(32'(map_addr)), .wdata(map_wdata),
    .ready(map_ready), .rvalid(map_rvalid), .rdata(map_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic cmp(string what, longint got, longint exp_v);
    checks++;
    if (got != exp_v) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp_v); end
  endtask

  int feats [NB*F][DIM];
  int n_fed = 0, cyc_cnt = 0;

  // MFCC source with random gaps
  always @(posedge clk) begin
    if (mf_valid && mf_ready) n_fed++;
    if (n_fed < NB*F*DIM) begin
      mf_valid <= ($urandom_range(3) != 0);
      mf_data  <= FEAT_W'(feats[n_fed / DIM][n_fed % DIM]);
    end else begin
      mf_valid <= 1'b0;
    end
  end

  // trellis sink: a slow memory that accepts a record now and then
  trellis_t trell [int];
  always @(posedge clk) begin
    cyc_cnt <= cyc_cnt + 1;
    if (tr_valid && tr_ready) trell[int'(tr_token)] = tr_data;
    tr_ready <= (TR_STALL == 0) || ($urandom_range(299) == 0);
  end

  initial begin
    node_rec_t nodes[$];
    int n_words, ncyc;
    int x[], mu[], pr[], ms[], g[];
    int words_hw[$], words_md[$];
    vit_model md;
    md = new();
    // lexicon, language model
    make_lexicon(NROOTS, DEPTH, NS, nodes, n_words);
    foreach (nodes[i]) tdb.mem[i] = nodes[i];
    for (int i = 0; i < 4096; i++) mapm.mem[i] = '0;
    vocab_size = WORD_W'(n_words + 1);
    for (int i = 0; i < (n_words + 1) * (n_words + 1) && i < 65536; i++) begin
      ngram_ent_t e;
      e.valid = ($urandom_range(1) == 0);
      e.cost  = LM_W'($urandom_range(60));
      ngm.mem[i] = e;
      md.ngram[i] = e;
    end
    md.nodes = nodes;
    md.sdb = new[SDBD];
    md.root_first = 0; md.root_count = NROOTS; md.vocab = n_words + 1;
    md.beam_width = beam_width; md.margin_max = margin_max; md.oov = oov_cost;
    md.max_active = MAXA;
    // acoustic model and features
    for (int s = 0; s < NS; s++)
      for (int m = 0; m < NMIX; m++) begin
        for (int d = 0; d < DIM; d++)
          pmem.mem[(s*NMIX + m)*WPM + d] = {16'($urandom_range(1200) - 600), 16'($urandom_range(3000))};
        pmem.mem[(s*NMIX + m)*WPM + DIM] = 32'($urandom_range(400) - 200);
      end
    for (int t = 0; t < NB*F; t++)
      for (int d = 0; d < DIM; d++) feats[t][d] = int'($urandom_range(1200)) - 600;
    $display("lexicon %0d nodes, %0d words; %0d frames", nodes.size(), n_words, NB*F);

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < SDBD; i++) begin
      md.sdb[i] = $urandom_range(50);
      @(negedge clk);
      sdb_we = 1; sdb_addr = ($clog2(SDBD))'(i); sdb_wdata = LM_W'(md.sdb[i]);
    end
    @(negedge clk);
    sdb_we = 0;
    start = 1;
    @(negedge clk);
    start = 0;

    // reference: GMM scores, then the search, frame by frame
    md.init();
    x = new[DIM]; mu = new[DIM]; pr = new[DIM]; ms = new[NMIX]; g = new[MAXS];
    for (int t = 0; t < NB*F; t++) begin
      for (int s = 0; s < MAXS; s++) g[s] = 0;
      for (int s = 0; s < NS; s++) begin
        for (int m = 0; m < NMIX; m++) begin
          for (int d = 0; d < DIM; d++) begin
            logic [31:0] w;
            w = pmem.mem[(s*NMIX + m)*WPM + d];
            x[d] = feats[t][d]; mu[d] = int'(signed'(w[31:16])); pr[d] = int'(w[15:0]);
          end
          ms[m] = gauss_ref(DIM, 16, x, mu, pr, int'(pmem.mem[(s*NMIX + m)*WPM + DIM]));
        end
        g[s] = sat16(tree_ref(NMIX, ms));
      end
      md.frame(g);
    end

    ncyc = 0;
    while (!done) begin @(negedge clk); ncyc++; end
    repeat (5) @(negedge clk);
    $display("utterance done in %0d cycles", ncyc);

    cmp("frame count", frame_no, NB*F);
    cmp("active count", active_count, md.cur.size());
    cmp("best valid", best_valid, md.best_valid);
    if (md.best_valid) begin
      cmp("best score", best_score, md.best_score);
      cmp("best word", best_word, md.best_word);
      cmp("best token", best_token, md.best_token);
    end
    cmp("pruned", vit_stats.pruned, md.pruned);
    cmp("new", vit_stats.new_nodes, md.new_nodes);
    cmp("updates", vit_stats.updates, md.updates);
    cmp("merged", vit_stats.merged, md.merged);
    cmp("overflow", vit_stats.overflow, md.overflow);
    cmp("word ends", vit_stats.word_ends, md.word_ends);
    cmp("bigram", vit_stats.bigram, md.bigram);
    cmp("backoff", vit_stats.backoff, md.backoff);
    cmp("trellis records", trell.size(), md.trellis.size());
    foreach (md.trellis[t]) begin
      checks++;
      if (!trell.exists(t) || trell[t] !== md.trellis[t]) begin
        failures++;
        $display("FAIL trellis token %0d", t);
      end
    end
    // sentence: best word, then follow the tokens back to the start
    if (best_valid) begin
      int t;
      words_hw.push_front(int'(best_word));
      t = int'(best_token);
      while (t != 0 && trell.exists(t) && words_hw.size() < 10000) begin
        words_hw.push_front(int'(trell[t].word));
        t = int'(trell[t].prev);
      end
      words_md.push_front(md.best_word);
      t = md.best_token;
      while (t != 0 && words_md.size() < 10000) begin
        words_md.push_front(int'(md.trellis[t].word));
        t = int'(md.trellis[t].prev);
      end
      chk(words_hw == words_md, "recognised word sequence");
      $display("recognised %0d words: %p", words_hw.size(), words_hw);
    end
    $display("pruned %0d new %0d upd %0d merged %0d ovf %0d we %0d bigram %0d backoff %0d stall %0d",
             vit_stats.pruned, vit_stats.new_nodes, vit_stats.updates, vit_stats.merged,
             vit_stats.overflow, vit_stats.word_ends, vit_stats.bigram, vit_stats.backoff,
             vit_stats.trellis_stall);
    $display("ngram cache %0d/%0d map cache %0d/%0d gmm wait %0d vit wait %0d prefetch wait %0d swaps %0d",
             ng_hits, ng_misses, map_hits, map_misses, gmm_wait_cycles, vit_wait_cycles,
             prefetch_wait_cycles, bank_swaps);
    // every mechanism happened
    chk(vit_stats.pruned > 0,        "beam pruning seen");
    chk(vit_stats.updates > 0,       "path update seen");
    chk(vit_stats.merged > 0,        "path discard seen");
    chk(vit_stats.overflow > 0 || MAXA >= 4096, "list overflow seen");
    chk(vit_stats.bigram > 0,        "bigram hit seen");
    chk(vit_stats.backoff > 0,       "back-off seen");
    chk(vit_stats.trellis_stall > 0 || TR_STALL == 0, "output buffer stall seen");
    chk(ng_hits > 0,                 "N-gram cache hit seen");
    chk(map_hits > 0,                "map cache hit seen");
    chk(prefetch_wait_cycles > 0,    "parameter prefetch wait seen");
    chk(gmm_wait_cycles > 0,         "GMM stage waited for Viterbi");
    chk(vit_wait_cycles > 0 || NB < 2, "Viterbi stage waited for GMM");
    cmp("bank swaps", bank_swaps, NB + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
