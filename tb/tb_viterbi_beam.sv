// tb_viterbi_beam: the Viterbi core at its full default size on a search as
// wide as the beam widths the design is meant for. A random tree lexicon of
// several thousand nodes is searched with beam_width = 3000 for 24 frames, so
// the active list grows to thousands of nodes and the beam and list limit
// come into play. After the block the list size, best word end, every event
// counter and every trellis record are compared with the software model of
// the search. The test also measures the cycles the core spends per frame
// and prints them next to the active list size; the largest frame must fit
// the 1.265 M cycles that a 10 ms frame allows at 126.5 MHz.
module tb_viterbi_beam;
  import asr_pkg::*;
  import asr_ref_pkg::*;

  localparam int MAXF = 64, MAXS = 2560, SDBD = 1792, NF = 24;
  localparam int NROOTS = 24, LEXDEPTH = 11, MEMD = 65536;
  localparam int BUDGET = 1265000;   // cycles per 10 ms frame at 126.5 MHz
  localparam int SC_AW = $clog2(MAXF*MAXS), FW = $clog2(MAXF+1), LW = $clog2(4096+1);

  logic clk = 0, rst_n = 0, init = 0, start = 0, busy, done;
  logic [FW-1:0] num_frames = FW'(NF);
  logic [NODE_W-1:0] root_first = '0;
  logic [15:0] root_count = 16'(NROOTS), beam_width = 16'd3000;
  logic [WORD_W-1:0] vocab_size = '0;
  pscore_t margin_max = 1500;
  logic [LM_W-1:0] oov_cost = 8'd40;
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
  logic tr_valid, tr_ready = 1;
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

  viterbi_core dut (.*);

  ext_mem #(.WIDTH($bits(node_rec_t)), .DEPTH(MEMD), .LAT(3), .STALL(0)) tdb (
    .clk, .req(tdb_req), .we(1'b0), .addr(32'(tdb_addr)), .wdata('0),
    .ready(tdb_ready), .rvalid(tdb_rvalid), .rdata(tdb_rdata));
  ext_mem #(.WIDTH($bits(ngram_ent_t)), .DEPTH(MEMD), .LAT(4), .STALL(0)) ngm (
    .clk, .req(ng_req), .we(1'b0), .addr(ng_addr), .wdata('0),
    .ready(ng_ready), .rvalid(ng_rvalid), .rdata(ng_rdata));
  ext_mem #(.WIDTH($bits(map_ent_t)), .DEPTH(MEMD), .LAT(3), .STALL(0)) mapm (
    .clk, .req(map_req), .we(map_we), .addr(32'(map_addr)), .wdata(map_wdata),
    .ready(map_ready), .rvalid(map_rvalid), .rdata(map_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // GMM score RAM stand-in, one-cycle read
  int gsc [NF][MAXS];
  always @(posedge clk)
    if (gs_rd_en) gs_rd_data <= gscore_t'(gsc[gs_rd_addr / MAXS][gs_rd_addr % MAXS]);

  vit_model md;
  int       tr_tok_q[$];
  trellis_t tr_dat_q[$];
  always @(posedge clk)
    if (rst_n && tr_valid && tr_ready) begin
      tr_tok_q.push_back(int'(tr_token));
      tr_dat_q.push_back(tr_data);
    end

  // cycles per frame, from the frame counter
  int cyc = 0, frame_cyc = 0, max_frame_cyc = 0, n_meas = 0;
  logic [FRAME_W-1:0] last_frame = '0;
  logic running = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (running) begin
      frame_cyc <= frame_cyc + 1;
      if (frame_no != last_frame) begin
        $display("frame %0d: %0d cycles, %0d active nodes", last_frame, frame_cyc + 1, active_count);
        if (frame_cyc + 1 > max_frame_cyc) max_frame_cyc <= frame_cyc + 1;
        n_meas <= n_meas + 1;
        frame_cyc <= 0;
      end
    end
    last_frame <= frame_no;
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
    int n_words, peak;
    md = new();
    make_lexicon(NROOTS, LEXDEPTH, MAXS, nodes, n_words);
    $display("lexicon: %0d nodes, %0d words", nodes.size(), n_words);
    if (nodes.size() > MEMD) begin failures++; $display("FAIL lexicon too large"); end
    foreach (nodes[i]) tdb.mem[i] = nodes[i];
    for (int i = 0; i < MEMD; i++) mapm.mem[i] = '0;
    vocab_size = WORD_W'(n_words + 1);
    for (int i = 0; i < MEMD; i++) begin
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
    md.max_active = 4096;
    for (int f = 0; f < NF; f++)
      for (int s = 0; s < MAXS; s++) gsc[f][s] = -int'($urandom_range(120));
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
    @(negedge clk);
    start = 1;
    running = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    running = 0;
    peak = 0;
    for (int f = 0; f < NF; f++) begin
      int g[];
      g = new[MAXS];
      for (int s = 0; s < MAXS; s++) g[s] = gsc[f][s];
      md.frame(g);
      if (md.cur.size() > peak) peak = md.cur.size();
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
    cmp("trellis out", tr_tok_q.size(), md.word_ends);
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
    $display("peak active %0d, slowest frame %0d cycles, budget %0d", peak, max_frame_cyc, BUDGET);
    $display("pruned %0d new %0d upd %0d merged %0d ovf %0d we %0d ng %0d/%0d map %0d/%0d",
             stats.pruned, stats.new_nodes, stats.updates, stats.merged, stats.overflow,
             stats.word_ends, ng_hits, ng_misses, map_hits, map_misses);
    cmp("list reached 2000 nodes", peak >= 2000, 1);
    cmp("frame within real-time budget", max_frame_cyc <= BUDGET, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
