// asr_ref_pkg: reference models for the speech recognition processor tests.
//
// Bit-exact software models, written independently of the RTL, of the add-log
// operation (table recomputed with real arithmetic), the Gaussian mixture
// log-likelihood, the GMM state score (pairwise add-log tree), the dynamic beam
// margin and the Viterbi search with its candidate order, pruning rule, map
// merging and trellis output. Also a random tree-lexicon generator.
package asr_ref_pkg;
  import asr_pkg::*;

  function automatic int addlog_ref(int a, int b);
    int mx, mn, idx;
    longint d, s;
    real t;
    mx = (a > b) ? a : b;
    mn = (a > b) ? b : a;
    d  = longint'(mx) - longint'(mn);
    idx = (d >= 384) ? 95 : int'(d / 4);
    t  = 64.0 * $ln(1.0 + $exp(-(4.0 * idx) / 64.0));
    s  = longint'(mx) + longint'($rtoi(t + 0.5));
    if (s > 64'sd2147483647) s = 64'sd2147483647;
    return int'(s);
  endfunction

  // one mixture: gconst - (sum_d ((x-mu)^2 * prec) >> shift) / 2
  function automatic int gauss_ref(int dim, int shift, const ref int x[], const ref int mu[],
                                   const ref int prec[], input int gconst);
    longint q, r;
    q = 0;
    for (int d = 0; d < dim; d++)
      q += ((longint'(x[d] - mu[d]) * longint'(x[d] - mu[d])) * longint'(prec[d])) >>> shift;
    r = longint'(gconst) - (q >>> 1);
    if (r < -64'sd2147483648) r = -64'sd2147483648;
    return int'(r);
  endfunction

  function automatic int sat16(int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // pairwise add-log tree over n (power of two) mixture scores
  function automatic int tree_ref(int n, const ref int s[]);
    int cur[];
    cur = s;
    while (n > 1) begin
      int nx[];
      nx = new[n/2];
      for (int i = 0; i < n/2; i++) nx[i] = addlog_ref(cur[2*i], cur[2*i+1]);
      cur = nx;
      n = n / 2;
    end
    return cur[0];
  endfunction

  // pruning margin for the next frame
  function automatic int margin_ref(int best, int worst, int count, int bw, int mmax);
    longint q;
    if (count <= bw) return mmax;
    q = (longint'(best - worst) * longint'(bw)) / longint'(count);
    if (q > longint'(mmax)) return mmax;
    return int'(q);
  endfunction

  // random tree lexicon: root nodes 0..n_roots-1, children numbered breadth
  // first so that siblings are consecutive; leaves end words 1..n_words.
  function automatic void make_lexicon(int n_roots, int max_depth, int n_states,
                                       ref node_rec_t nodes[$], output int n_words);
    int depth[$];
    int head;
    nodes.delete();
    n_words = 0;
    for (int r = 0; r < n_roots; r++) begin
      node_rec_t nr;
      nr = '0;
      nodes.push_back(nr);
      depth.push_back(0);
    end
    head = 0;
    while (head < nodes.size()) begin
      int nch;
      nch = (depth[head] >= max_depth) ? 0 : int'($urandom_range(3, (depth[head] == 0) ? 1 : 0));
      nodes[head].state_id = STATE_W'($urandom_range(n_states - 1));
      nodes[head].a_self   = 8'($urandom_range(40, 5));
      nodes[head].a_next   = 8'($urandom_range(40, 5));
      nodes[head].n_children = 4'(nch);
      nodes[head].first_child = NODE_W'(nodes.size());
      if (nch == 0 || $urandom_range(7) == 0) begin
        n_words++;
        nodes[head].word_end = 1'b1;
        nodes[head].word_id  = WORD_W'(n_words);
      end
      for (int c = 0; c < nch; c++) begin
        node_rec_t nr;
        nr = '0;
        nodes.push_back(nr);
        depth.push_back(depth[head] + 1);
      end
      head++;
    end
  endfunction

  // ---------------------------------------------------------------------
  // Viterbi search model
  // ---------------------------------------------------------------------
  class vit_model;
    node_rec_t nodes[$];
    ngram_ent_t ngram[int];         // address last_word*vocab + word
    int        sdb[];               // back-off costs
    int        root_first, root_count, vocab, beam_width, margin_max, oov;
    active_t   cur[$], nxt[$];
    int        map_tag[int], map_idx[int];
    int        tag;
    int        margin;
    int        run_best;               // best candidate score so far in this frame
    int        best, worst, count;     // statistics of the frame's node scores
    int        frame_no;
    int        tok_ctr;
    int        max_active;
    // results
    int        best_valid, best_score, best_word, best_token;
    // statistics
    int        pruned, new_nodes, updates, merged, overflow, word_ends, bigram, backoff;
    trellis_t  trellis[int];

    function new();
      tag = 1;
    endfunction

    function void init();
      cur.delete();
      for (int r = 0; r < root_count; r++) begin
        active_t e;
        e = '0;
        e.node = NODE_W'(root_first + r);
        cur.push_back(e);
      end
      tag++;
      frame_no = 0;
      tok_ctr = 1;
      margin = margin_max;
      pruned = 0; new_nodes = 0; updates = 0; merged = 0; overflow = 0;
      word_ends = 0; bigram = 0; backoff = 0;
    endfunction

    function void cand(int node, int score, int token, int lw);
      int thr;
      longint t;
      t = longint'(run_best) - longint'(margin);
      thr = (t < -64'sd2147483648) ? -2147483648 : int'(t);
      if (score < thr) begin pruned++; return; end
      if (score > run_best) run_best = score;
      if (map_tag.exists(node) && map_tag[node] == (tag & 16'hffff)) begin
        int i;
        i = map_idx[node];
        if (score > int'(nxt[i].score)) begin
          updates++;
          nxt[i].score = score; nxt[i].token = TOKEN_W'(token); nxt[i].last_word = WORD_W'(lw);
          nxt[i].node = NODE_W'(node);
        end else merged++;
      end else if (nxt.size() < max_active) begin
        active_t e;
        e.node = NODE_W'(node); e.score = score; e.token = TOKEN_W'(token); e.last_word = WORD_W'(lw);
        map_tag[node] = tag & 16'hffff;
        map_idx[node] = nxt.size();
        nxt.push_back(e);
        new_nodes++;
      end else overflow++;
    endfunction

    // one frame; gmm[state] gives log b for this frame
    function void frame(const ref int gmm[]);
      run_best = -2147483648;
      best = -2147483648; worst = 2147483647; count = 0;
      best_valid = 0; best_score = -2147483648;
      nxt.delete();
      for (int k = 0; k < cur.size(); k++) begin
        int dl;
        dl = int'(cur[k].score) + gmm[nodes[cur[k].node].state_id];
        count++;
        if (dl > best) best = dl;
        if (dl < worst) worst = dl;
      end
      foreach (cur[k]) begin
        node_rec_t nd;
        int delta;
        nd = nodes[cur[k].node];
        delta = int'(cur[k].score) + gmm[nd.state_id];
        if (nd.word_end && delta > best_score) begin
          best_valid = 1; best_score = delta; best_word = nd.word_id; best_token = cur[k].token;
        end
        cand(cur[k].node, delta - nd.a_self, cur[k].token, cur[k].last_word);
        for (int c = 0; c < nd.n_children; c++)
          cand(nd.first_child + c, delta - nd.a_next, cur[k].token, cur[k].last_word);
        if (nd.word_end) begin
          int a, lm, nt;
          trellis_t tr;
          a = int'(cur[k].last_word) * vocab + nd.word_id;
          if (ngram.exists(a) && ngram[a].valid) begin
            lm = ngram[a].cost; bigram++;
          end else begin
            backoff++;
            lm = (nd.word_id < sdb.size()) ? sdb[nd.word_id] : oov;
          end
          nt = tok_ctr++;
          tr.word = nd.word_id; tr.frame = FRAME_W'(frame_no); tr.prev = cur[k].token;
          trellis[nt] = tr;
          word_ends++;
          for (int r = 0; r < root_count; r++)
            cand(root_first + r, delta - nd.a_next - lm, nt, nd.word_id);
        end
      end
      margin = margin_ref(best, worst, count, beam_width, margin_max);
      cur = nxt;
      tag++;
      frame_no++;
    endfunction
  endclass

endpackage
