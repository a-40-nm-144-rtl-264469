// global_sequencer: runs the GMM core and the Viterbi core as an elastic
// two-stage pipeline over blocks of look-ahead frames.
//
// An utterance is num_blocks blocks of frames_per_block frames. Step k starts
// the GMM core on block k (writing one bank of the GMM score RAM) and the
// Viterbi core on block k-1 (reading the other bank), then waits for both; the
// banks are swapped at every step. The MFCC frames of block k+1 are loaded
// into the MFCC buffer from the input stream as soon as the GMM core has
// finished block k, while the Viterbi core may still be working. Whichever
// stage finishes first waits for the other, so the pipeline absorbs the
// variation of the Viterbi work from block to block; the wait cycles of each
// stage are counted. The number of look-ahead frames per block is set at run
// time (up to the MFCC buffer capacity).
//
// Interface: start (pulse, while idle) begins an utterance, init of the
// Viterbi core is issued first; done pulses after the Viterbi core has
// processed the last block. The MFCC stream is a valid/ready handshake, one
// feature element per beat, frame by frame, dimension by dimension.
// The sequencer, the double GMM score buffer and the elastic pipeline follow
// the source architecture; the block-step schedule is this design's choice.
module global_sequencer
  import asr_pkg::*;
#(
  parameter int unsigned DIM        = 39,
  parameter int unsigned MAX_FRAMES = 64,
  localparam int unsigned MF_AW     = $clog2(MAX_FRAMES*DIM),
  localparam int unsigned FW        = $clog2(MAX_FRAMES+1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [15:0]       num_blocks,
  input  logic [FW-1:0]     frames_per_block,
  output logic              busy,
  output logic              done,
  // MFCC input stream
  input  logic              mf_valid,
  output logic              mf_ready,
  input  logic signed [FEAT_W-1:0] mf_data,
  // MFCC buffer write port
  output logic              mfcc_we,
  output logic [MF_AW-1:0]  mfcc_addr,
  output logic signed [FEAT_W-1:0] mfcc_wdata,
  // GMM core
  output logic              gmm_start,
  input  logic              gmm_done,
  // Viterbi core
  output logic              vit_init,
  output logic              vit_start,
  input  logic              vit_done,
  // GMM score RAM bank read by the Viterbi core
  output logic              score_sel,
  // statistics
  output logic [31:0]       gmm_wait_cycles,   // GMM stage idle, waiting for Viterbi
  output logic [31:0]       vit_wait_cycles,   // Viterbi stage idle, waiting for GMM
  output logic [31:0]       bank_swaps
);
  typedef enum logic [2:0] {Q_IDLE, Q_INIT, Q_LOAD0, Q_LAUNCH, Q_RUN, Q_DONE} qst_t;
  qst_t st;

  logic [15:0]      k, nb;
  logic [FW-1:0]    fpb;
  logic             g_run, v_run, ld_run;
  logic [MF_AW-1:0] ld_cnt;
  logic [MF_AW:0]   ld_total;

  assign busy       = (st != Q_IDLE);
  assign ld_total   = (MF_AW+1)'(32'(fpb) * 32'(DIM));
  assign mf_ready   = (st == Q_LOAD0) || (st == Q_RUN && ld_run);
  assign mfcc_we    = mf_valid && mf_ready;
  assign mfcc_addr  = ld_cnt;
  assign mfcc_wdata = mf_data;
  assign vit_init   = (st == Q_INIT);
  assign gmm_start  = (st == Q_LAUNCH) && (k < nb);
  assign vit_start  = (st == Q_LAUNCH) && (k != 0);

  wire last_beat = mfcc_we && ((MF_AW+1)'(ld_cnt) + 1'b1 == ld_total);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st              <= Q_IDLE;
      k               <= '0;
      nb              <= '0;
      fpb             <= '0;
      g_run           <= 1'b0;
      v_run           <= 1'b0;
      ld_run          <= 1'b0;
      ld_cnt          <= '0;
      score_sel       <= 1'b0;
      done            <= 1'b0;
      gmm_wait_cycles <= '0;
      vit_wait_cycles <= '0;
      bank_swaps      <= '0;
    end else begin
      done <= 1'b0;
      if (mfcc_we) ld_cnt <= last_beat ? '0 : ld_cnt + 1'b1;
      unique case (st)
        Q_IDLE: if (start) begin
          st              <= Q_INIT;
          nb              <= num_blocks;
          fpb             <= frames_per_block;
          k               <= '0;
          ld_cnt          <= '0;
          gmm_wait_cycles <= '0;
          vit_wait_cycles <= '0;
          bank_swaps      <= '0;
        end
        Q_INIT:  st <= (nb == 0) ? Q_DONE : Q_LOAD0;
        Q_LOAD0: if (last_beat) st <= Q_LAUNCH;
        Q_LAUNCH: begin
          score_sel  <= !score_sel;
          bank_swaps <= bank_swaps + 1'b1;
          g_run      <= (k < nb);
          v_run      <= (k != 0);
          ld_run     <= 1'b0;
          st         <= Q_RUN;
        end
        Q_RUN: begin
          if (gmm_done) begin
            g_run  <= 1'b0;
            ld_run <= (k + 1'b1 < nb);     // fetch the frames of the next block
          end
          if (vit_done) v_run <= 1'b0;
          if (last_beat) ld_run <= 1'b0;
          // elastic pipeline bookkeeping
          if (!g_run && !ld_run && v_run) gmm_wait_cycles <= gmm_wait_cycles + 1'b1;
          if (!v_run && (g_run || ld_run) && k != 0) vit_wait_cycles <= vit_wait_cycles + 1'b1;
          if (!g_run && !v_run && !ld_run && !gmm_done) begin
            k  <= k + 1'b1;
            st <= (k == nb) ? Q_DONE : Q_LAUNCH;
          end
        end
        Q_DONE: begin
          done <= 1'b1;
          st   <= Q_IDLE;
        end
        default: st <= Q_IDLE;
      endcase
    end
  end
endmodule
