// tb_gaussian_processor: loads random mixture parameters, streams several
// frames back to back and compares each mixture log-likelihood with an
// independent integer model; checks that the result follows the last
// dimension by one cycle and that parameters are reused across frames.
module tb_gaussian_processor;
  import asr_pkg::*;
  import asr_ref_pkg::*;

  localparam int DIM = 39;
  localparam int DW  = $clog2(DIM);

  logic clk = 0, rst_n = 0;
  logic ld_en = 0, ld_gconst_en = 0, x_valid = 0, x_last = 0, out_valid;
  logic [DW-1:0] ld_dim = '0, x_dim = '0;
  logic signed [FEAT_W-1:0] ld_mean = '0, x_data = '0;
  logic [15:0] ld_prec = '0;
  pscore_t ld_gconst = '0, out_score;
  int checks = 0, failures = 0;

  gaussian_processor #(.DIM(DIM)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mu[], pr[], x[], gc;

  task automatic load(int mrange, int prange);
    mu = new[DIM]; pr = new[DIM];
    gc = int'($urandom_range(20000)) - 10000;
    for (int d = 0; d < DIM; d++) begin
      mu[d] = int'($urandom_range(2*mrange)) - mrange;
      pr[d] = int'($urandom_range(prange));
      @(negedge clk);
      ld_en = 1; ld_dim = DW'(d); ld_mean = FEAT_W'(mu[d]); ld_prec = 16'(pr[d]);
    end
    @(negedge clk);
    ld_en = 0; ld_gconst_en = 1; ld_gconst = gc;
    @(negedge clk);
    ld_gconst_en = 0;
  endtask

  // stream nfr frames back to back, checking each result one cycle after its last dim
  task automatic frames(int nfr, int xrange);
    for (int f = 0; f < nfr; f++) begin
      int exp_v;
      x = new[DIM];
      for (int d = 0; d < DIM; d++) x[d] = int'($urandom_range(2*xrange)) - xrange;
      exp_v = gauss_ref(DIM, 16, x, mu, pr, gc);
      for (int d = 0; d < DIM; d++) begin
        @(negedge clk);
        checks++;
        if (d > 0 && out_valid) begin
          failures++;
          $display("FAIL out_valid timing f=%0d d=%0d", f, d);
        end
        x_valid = 1; x_dim = DW'(d); x_last = (d == DIM-1); x_data = FEAT_W'(x[d]);
      end
      @(negedge clk);
      x_valid = 0; x_last = 0;
      checks++;
      if (!out_valid || out_score !== exp_v) begin
        failures++;
        $display("FAIL f=%0d got %0d exp %0d", f, out_score, exp_v);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    load(2000, 65535);
    frames(4, 2000);
    load(300, 4000);
    frames(4, 400);
    // extreme values drive the score to the saturation floor
    load(32767, 65535);
    frames(2, 32767);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
