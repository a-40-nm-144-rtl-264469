// tb_global_sequencer: drives the sequencer with stand-in GMM and Viterbi
// engines whose run times are random per block, so that each stage is
// sometimes the one waiting. Checks: Viterbi init comes first; step k starts
// GMM on block k and Viterbi on block k-1; the two never work on the same
// score bank; each block's MFCC frames are loaded after the GMM core finished
// the previous block and before it starts the block; the stream delivers
// exactly blocks*frames*DIM elements at the right buffer addresses; both wait
// counters move; done comes once after the last Viterbi block.
module tb_global_sequencer;
  import asr_pkg::*;

  localparam int DIM = 5, MAXF = 4, NB = 7;
  localparam int MF_AW = $clog2(MAXF*DIM), FW = $clog2(MAXF+1);

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [15:0] num_blocks = 16'(NB);
  logic [FW-1:0] frames_per_block = FW'(3);
  logic mf_valid = 0, mf_ready;
  logic signed [FEAT_W-1:0] mf_data = '0;
  logic mfcc_we;
  logic [MF_AW-1:0] mfcc_addr;
  logic signed [FEAT_W-1:0] mfcc_wdata;
  logic gmm_start, gmm_done = 0, vit_init, vit_start, vit_done = 0, score_sel;
  logic [31:0] gmm_wait_cycles, vit_wait_cycles, bank_swaps;
  int checks = 0, failures = 0;

  global_sequencer #(.DIM(DIM), .MAX_FRAMES(MAXF)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  int g_blk = 0, v_blk = 0, g_left = -1, v_left = -1, inits = 0, dones = 0, loaded = 0, beats = 0;
  bit g_bank, v_bank;
  int feed = 0;

  // MFCC stream source: random gaps
  always @(posedge clk) begin
    if (mf_valid && mf_ready) begin
      feed++;
    end
    mf_valid <= ($urandom_range(3) != 0);
    mf_data  <= FEAT_W'(feed + ((mf_valid && mf_ready) ? 1 : 0));
  end

  always @(posedge clk) if (rst_n) begin
    gmm_done <= 1'b0;
    vit_done <= 1'b0;
    if (vit_init) inits++;
    if (mfcc_we) begin
      chk(mfcc_addr == MF_AW'(beats % (3*DIM)), "mfcc address");
      chk(g_left < 0, "MFCC written while the GMM core is busy");
      beats++;
      if (beats % (3*DIM) == 0) loaded++;
    end
    if (gmm_start) begin
      chk(inits == 1, "init before first GMM start");
      chk(loaded == g_blk + 1, "GMM start before its frames were loaded");
      g_bank = !score_sel;
      g_left = $urandom_range(60, 5);
    end
    if (vit_start) begin
      chk(v_blk < g_blk + (gmm_start ? 0 : 1) && v_blk <= g_blk, "Viterbi ahead of GMM");
      v_bank = score_sel;
      v_left = $urandom_range(80, 5);
    end
    if (g_left >= 0 && v_left >= 0) chk(g_bank != v_bank, "same bank");
    if (g_left == 0) begin gmm_done <= 1'b1; g_blk++; end
    if (v_left == 0) begin vit_done <= 1'b1; v_blk++; end
    if (g_left >= 0) g_left--;
    if (v_left >= 0) v_left--;
    if (done) begin
      dones++;
      chk(g_blk == NB && v_blk == NB && g_left < 0 && v_left < 0, "done before the last block");
    end
  end

  initial begin
    int c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    c = 0;
    while (dones == 0 && c < 50000) begin @(negedge clk); c++; end
    repeat (5) @(negedge clk);
    chk(dones == 1, "one done");
    chk(beats == NB*3*DIM, "MFCC element count");
    chk(bank_swaps == NB + 1, "bank swaps");
    chk(gmm_wait_cycles > 0, "GMM stage waited at least once");
    chk(vit_wait_cycles > 0, "Viterbi stage waited at least once");
    chk(!busy, "idle at the end");
    $display("gmm wait %0d vit wait %0d swaps %0d", gmm_wait_cycles, vit_wait_cycles, bank_swaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
