// gmm_core: mixture-level parallel GMM score computation over look-ahead frames.
//
// For every tied HMM state s < num_states and every look-ahead frame
// f < num_frames it computes log b_s(x_f) = logsum over the N_MIX mixtures of
// the mixture log-likelihoods, and writes it (16-bit, saturated) to the GMM
// score RAM at address f*MAX_STATES + s.
//
// How it works: the N_MIX Gaussian processors each hold one mixture of the
// current state. The frames of the block sit in the MFCC buffer; each frame's
// feature vector is broadcast to all processors, one dimension per cycle, so a
// state's parameters are read once and reused for all look-ahead frames. The
// N_MIX results of a frame are combined by a pipelined tree of N_MIX-1 add-log
// processors. While a state is computed, the GMM buffer prefetches the next
// state's parameters from the external GMM parameter RAM; parameter reading,
// mixture computation and add-log run as a pipeline.
//
// Parameter RAM layout (this design's choice): 32-bit words, state s, mixture
// m, word k at address (s*N_MIX + m)*(DIM+1) + k; words k < DIM hold
// {mean[15:0], precision[15:0]} of dimension k, word DIM holds gconst.
// The bus is a read-only request/response port: a request is accepted when
// prm_req && prm_ready, responses return in order with prm_rvalid.
//
// MFCC buffer: written through mfcc_we/mfcc_addr (f*DIM + d) while the core
// is idle. Timing: start is a one-cycle pulse; done pulses once when all
// scores of the block have been written. Per state the core needs about
// max(num_frames*DIM, N_MIX*(DIM+1)) + DIM + 7 cycles.
module gmm_core
  import asr_pkg::*;
#(
  parameter int unsigned N_MIX      = 16,
  parameter int unsigned DIM        = 39,
  parameter int unsigned MAX_FRAMES = 64,
  parameter int unsigned MAX_STATES = 2560,
  parameter int unsigned PREC_SHIFT = 16,
  localparam int unsigned MF_AW     = $clog2(MAX_FRAMES*DIM),
  localparam int unsigned SC_AW     = $clog2(MAX_FRAMES*MAX_STATES),
  localparam int unsigned FW        = $clog2(MAX_FRAMES+1),
  localparam int unsigned SW        = $clog2(MAX_STATES+1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  input  logic [SW-1:0]     num_states,
  input  logic [FW-1:0]     num_frames,
  output logic              busy,
  output logic              done,
  // MFCC buffer write port
  input  logic              mfcc_we,
  input  logic [MF_AW-1:0]  mfcc_addr,
  input  logic signed [FEAT_W-1:0] mfcc_wdata,
  // GMM parameter RAM read port
  output logic              prm_req,
  output logic [31:0]       prm_addr,
  input  logic              prm_ready,
  input  logic              prm_rvalid,
  input  logic [31:0]       prm_rdata,
  // GMM score RAM write port
  output logic              sc_we,
  output logic [SC_AW-1:0]  sc_addr,
  output gscore_t           sc_data,
  // activity counters
  output logic [31:0]       prefetch_wait_cycles
);
  localparam int unsigned DW     = $clog2(DIM+1);
  localparam int unsigned WPM    = DIM + 1;            // words per mixture
  localparam int unsigned WPS    = N_MIX * WPM;        // words per state
  localparam int unsigned LEVELS = $clog2(N_MIX);
  localparam int unsigned MW     = (N_MIX > 1) ? $clog2(N_MIX) : 1;

  initial assert (N_MIX == (1 << LEVELS)) else $error("N_MIX must be a power of two");

  typedef enum logic [2:0] {S_IDLE, S_WAIT_PF, S_XFER, S_COMP, S_DRAIN} st_t;
  st_t st;

  logic [SW-1:0]  s_cur;
  logic [DW-1:0]  xfer_k;
  logic [FW-1:0]  f_rd, f_out, nf;
  logic [DW-1:0]  d_rd;
  logic [SW-1:0]  ns;

  // ---------------- GMM buffer and prefetch engine ----------------
  logic [31:0]    gbuf [N_MIX][WPM];
  logic           pf_start, pf_active;
  logic [SW-1:0]  pf_state;
  logic [$clog2(WPS+1)-1:0] pf_issued, pf_recv;
  logic [MW-1:0]  rm;
  logic [DW-1:0]  rk;
  logic           pf_done;

  assign pf_done  = pf_active && (pf_recv == WPS[$clog2(WPS+1)-1:0]);
  assign prm_req  = pf_active && (pf_issued < WPS[$clog2(WPS+1)-1:0]);
  assign prm_addr = 32'(pf_state) * 32'(WPS) + 32'(pf_issued);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pf_active <= 1'b0;
      pf_issued <= '0;
      pf_recv   <= '0;
      rm        <= '0;
      rk        <= '0;
      pf_state  <= '0;
    end else if (pf_start) begin
      pf_active <= 1'b1;
      pf_issued <= '0;
      pf_recv   <= '0;
      rm        <= '0;
      rk        <= '0;
      pf_state  <= (st == S_IDLE) ? '0 : s_cur + 1'b1;
    end else begin
      if (prm_req && prm_ready) pf_issued <= pf_issued + 1'b1;
      if (prm_rvalid && pf_active) begin
        pf_recv <= pf_recv + 1'b1;
        if (rk == DW'(DIM)) begin
          rk <= '0;
          rm <= rm + 1'b1;
        end else begin
          rk <= rk + 1'b1;
        end
      end
      if (st == S_WAIT_PF && pf_done) pf_active <= 1'b0;
    end
  end

  always_ff @(posedge clk)
    if (prm_rvalid && pf_active) gbuf[rm][rk] <= prm_rdata;

  // ---------------- MFCC buffer ----------------
  logic                     mf_rd_en;
  logic [MF_AW-1:0]         mf_rd_addr;
  logic [FEAT_W-1:0]        mf_rd_data;
  logic                     x_valid, x_last;
  logic [DW-1:0]            x_dim;

  sdp_ram #(.WIDTH(FEAT_W), .DEPTH(MAX_FRAMES*DIM)) u_mfcc (
    .clk, .wr_en(mfcc_we), .wr_addr(mfcc_addr), .wr_data(mfcc_wdata),
    .rd_en(mf_rd_en), .rd_addr(mf_rd_addr), .rd_data(mf_rd_data));

  assign mf_rd_en   = (st == S_COMP);
  assign mf_rd_addr = MF_AW'(32'(f_rd) * 32'(DIM) + 32'(d_rd));

  // ---------------- Gaussian processors ----------------
  pscore_t lv   [LEVELS+1][N_MIX];
  logic    lv_v [LEVELS+1][N_MIX];

  for (genvar m = 0; m < N_MIX; m++) begin : g_mix
    logic [31:0] w;
    assign w = gbuf[m][xfer_k];
    gaussian_processor #(.DIM(DIM), .PREC_SHIFT(PREC_SHIFT)) u_gp (
      .clk, .rst_n,
      .ld_en       (st == S_XFER && xfer_k < DW'(DIM)),
      .ld_dim      ($clog2(DIM)'(xfer_k)),
      .ld_mean     (signed'(w[31:16])),
      .ld_prec     (w[15:0]),
      .ld_gconst_en(st == S_XFER && xfer_k == DW'(DIM)),
      .ld_gconst   (signed'(w)),
      .x_valid     (x_valid),
      .x_dim       ($clog2(DIM)'(x_dim)),
      .x_last      (x_last),
      .x_data      (signed'(mf_rd_data)),
      .out_valid   (lv_v[0][m]),
      .out_score   (lv[0][m]));
  end

  // ---------------- add-log tree ----------------
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    for (genvar u = 0; u < (N_MIX >> (l+1)); u++) begin : g_unit
      add_log_processor u_al (
        .clk, .rst_n,
        .in_valid (lv_v[l][2*u]),
        .a        (lv[l][2*u]),
        .b        (lv[l][2*u+1]),
        .out_valid(lv_v[l+1][u]),
        .out_score(lv[l+1][u]));
    end
    for (genvar u = (N_MIX >> (l+1)); u < N_MIX; u++) begin : g_tie
      assign lv_v[l+1][u] = 1'b0;
      assign lv[l+1][u]   = '0;
    end
  end

  assign sc_we   = lv_v[LEVELS][0];
  assign sc_data = sat_g(lv[LEVELS][0]);
  assign sc_addr = SC_AW'(32'(f_out) * 32'(MAX_STATES) + 32'(s_cur));

  // ---------------- control ----------------
  assign busy = (st != S_IDLE);

  always_comb begin
    pf_start = 1'b0;
    if (st == S_IDLE && start) pf_start = 1'b1;
    if (st == S_XFER && xfer_k == DW'(DIM) && (s_cur + 1'b1) < ns) pf_start = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      s_cur   <= '0;
      xfer_k  <= '0;
      f_rd    <= '0;
      d_rd    <= '0;
      f_out   <= '0;
      nf      <= '0;
      ns      <= '0;
      done    <= 1'b0;
      x_valid <= 1'b0;
      x_last  <= 1'b0;
      x_dim   <= '0;
      prefetch_wait_cycles <= '0;
    end else begin
      done    <= 1'b0;
      x_valid <= (st == S_COMP);
      x_last  <= (st == S_COMP) && (d_rd == DW'(DIM-1));
      x_dim   <= d_rd;
      if (sc_we) f_out <= f_out + 1'b1;
      unique case (st)
        S_IDLE: if (start) begin
          st    <= S_WAIT_PF;
          s_cur <= '0;
          nf    <= num_frames;
          ns    <= num_states;
        end
        S_WAIT_PF: begin
          if (pf_done) begin
            st     <= S_XFER;
            xfer_k <= '0;
          end else begin
            prefetch_wait_cycles <= prefetch_wait_cycles + 1'b1;
          end
        end
        S_XFER: begin
          if (xfer_k == DW'(DIM)) begin
            st    <= S_COMP;
            f_rd  <= '0;
            d_rd  <= '0;
            f_out <= '0;
          end else begin
            xfer_k <= xfer_k + 1'b1;
          end
        end
        S_COMP: begin
          if (d_rd == DW'(DIM-1)) begin
            d_rd <= '0;
            f_rd <= f_rd + 1'b1;
            if (f_rd + 1'b1 == nf) st <= S_DRAIN;
          end else begin
            d_rd <= d_rd + 1'b1;
          end
        end
        S_DRAIN: begin
          if (f_out == nf && !sc_we) begin
            if (s_cur + 1'b1 == ns) begin
              st   <= S_IDLE;
              done <= 1'b1;
            end else begin
              s_cur <= s_cur + 1'b1;
              st    <= S_WAIT_PF;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
