// tb_gmm_core: runs the GMM core on random parameters and features at a
// reduced size (4 mixtures, 5 dimensions) for several block shapes and checks
// every GMM score written against an independent model (mixture
// log-likelihoods combined by a pairwise add-log tree), that each (frame,
// state) score is written exactly once, and that the run time stays within
// the bound max(frames*DIM, parameter words) + DIM + 12 cycles per state.
module tb_gmm_core;
  import asr_pkg::*;
  import asr_ref_pkg::*;

  localparam int N_MIX = 4, DIM = 5, MAXF = 4, MAXS = 6, LAT = 3;
  localparam int WPM = DIM + 1, WPS = N_MIX * WPM;
  localparam int MF_AW = $clog2(MAXF*DIM), SC_AW = $clog2(MAXF*MAXS);

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [$clog2(MAXS+1)-1:0] num_states = '0;
  logic [$clog2(MAXF+1)-1:0] num_frames = '0;
  logic mfcc_we = 0;
  logic [MF_AW-1:0] mfcc_addr = '0;
  logic signed [FEAT_W-1:0] mfcc_wdata = '0;
  logic prm_req, prm_ready, prm_rvalid;
  logic [31:0] prm_addr, prm_rdata, prefetch_wait_cycles;
  logic sc_we;
  logic [SC_AW-1:0] sc_addr;
  gscore_t sc_data;
  int checks = 0, failures = 0;

  gmm_core #(.N_MIX(N_MIX), .DIM(DIM), .MAX_FRAMES(MAXF), .MAX_STATES(MAXS)) dut (.*);
  ext_mem #(.WIDTH(32), .DEPTH(MAXS*WPS), .LAT(LAT)) pmem (
    .clk, .req(prm_req), .we(1'b0), .addr(prm_addr), .wdata('0),
    .ready(prm_ready), .rvalid(prm_rvalid), .rdata(prm_rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int feat [MAXF][DIM];
  int expv [MAXF*MAXS];
  int written [MAXF*MAXS];

  always @(posedge clk) if (sc_we) begin
    checks++;
    written[sc_addr]++;
    if (int'(sc_data) != expv[sc_addr]) begin
      failures++;
      $display("FAIL score addr %0d got %0d exp %0d", sc_addr, sc_data, expv[sc_addr]);
    end
  end

  task automatic run(int nf, int ns);
    int cyc, bound;
    int x[], mu[], pr[], ms[];
    // parameters
    for (int s = 0; s < MAXS; s++)
      for (int m = 0; m < N_MIX; m++) begin
        for (int d = 0; d < DIM; d++)
          pmem.mem[(s*N_MIX + m)*WPM + d] = {16'($urandom_range(1200) - 600), 16'($urandom_range(20000))};
        pmem.mem[(s*N_MIX + m)*WPM + DIM] = 32'($urandom_range(4000) - 3000);
      end
    // features into the MFCC buffer
    for (int f = 0; f < nf; f++)
      for (int d = 0; d < DIM; d++) begin
        feat[f][d] = int'($urandom_range(1200)) - 600;
        @(negedge clk);
        mfcc_we = 1; mfcc_addr = MF_AW'(f*DIM + d); mfcc_wdata = FEAT_W'(feat[f][d]);
      end
    @(negedge clk);
    mfcc_we = 0;
    // expected scores
    x = new[DIM]; mu = new[DIM]; pr = new[DIM]; ms = new[N_MIX];
    foreach (written[i]) begin written[i] = 0; expv[i] = 0; end
    for (int s = 0; s < ns; s++)
      for (int f = 0; f < nf; f++) begin
        for (int m = 0; m < N_MIX; m++) begin
          for (int d = 0; d < DIM; d++) begin
            logic [31:0] w;
            w = pmem.mem[(s*N_MIX + m)*WPM + d];
            x[d] = feat[f][d]; mu[d] = int'(signed'(w[31:16])); pr[d] = int'(w[15:0]);
          end
          ms[m] = gauss_ref(DIM, 16, x, mu, pr, int'(pmem.mem[(s*N_MIX + m)*WPM + DIM]));
        end
        expv[f*MAXS + s] = sat16(tree_ref(N_MIX, ms));
      end
    // run
    num_frames = ($clog2(MAXF+1))'(nf); num_states = ($clog2(MAXS+1))'(ns);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    bound = ns * (((nf*DIM > WPS + LAT) ? nf*DIM : WPS + LAT) + DIM + 12) + WPS + LAT + 4;
    checks++;
    if (cyc > bound || cyc < ns * nf * DIM) begin
      failures++;
      $display("FAIL cycles %0d bound %0d", cyc, bound);
    end
    for (int s = 0; s < MAXS; s++)
      for (int f = 0; f < MAXF; f++) begin
        checks++;
        if (written[f*MAXS + s] != ((s < ns && f < nf) ? 1 : 0)) begin
          failures++;
          $display("FAIL write count f=%0d s=%0d: %0d", f, s, written[f*MAXS + s]);
        end
      end
    $display("run nf=%0d ns=%0d: %0d cycles, prefetch waits %0d", nf, ns, cyc, prefetch_wait_cycles);
  endtask

  initial begin
    int pw0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(4, 6);
    pw0 = prefetch_wait_cycles;
    run(1, 6);        // short look-ahead: parameter fetch dominates
    checks++;
    if (prefetch_wait_cycles == pw0) begin failures++; $display("FAIL no prefetch wait seen"); end
    run(3, 1);
    run(4, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
