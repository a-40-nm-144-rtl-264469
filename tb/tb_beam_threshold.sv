// tb_beam_threshold: feeds frames of random node scores and checks the best,
// worst and count statistics and the margin derived at frame end, both when
// the node count is above the beam width (divider path, checked for its
// latency) and below it (margin_max), against an integer model.
module tb_beam_threshold;
  import asr_pkg::*;
  import asr_ref_pkg::*;

  logic clk = 0, rst_n = 0, frame_start = 0, sample_valid = 0, frame_end = 0, margin_valid;
  pscore_t sample_score = '0, margin_max = 5000, margin, best, worst;
  logic [15:0] beam_width = 30;
  logic [31:0] count;
  int checks = 0, failures = 0;
  int div_frames = 0, max_frames = 0;

  beam_threshold dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(int n, int lo, int hi);
    int b, w, e, cyc;
    b = -2147483648; w = 2147483647;
    @(negedge clk);
    frame_start = 1;
    @(negedge clk);
    frame_start = 0;
    for (int i = 0; i < n; i++) begin
      int s;
      s = lo + int'($urandom_range(hi - lo));
      if (s > b) b = s;
      if (s < w) w = s;
      sample_valid = 1; sample_score = s;
      @(negedge clk);
    end
    sample_valid = 0;
    checks += 3;
    if (count != n) begin failures++; $display("FAIL count %0d exp %0d", count, n); end
    if (n > 0 && best != b) begin failures++; $display("FAIL best"); end
    if (n > 0 && worst != w) begin failures++; $display("FAIL worst"); end
    e = margin_ref(b, w, n, beam_width, margin_max);
    frame_end = 1;
    @(negedge clk);
    frame_end = 0;
    cyc = 0;
    while (!margin_valid) begin @(negedge clk); cyc++; end
    checks += 2;
    if (margin != e) begin failures++; $display("FAIL margin %0d exp %0d (n=%0d)", margin, e, n); end
    if (n > beam_width) begin
      div_frames++;
      if (cyc != 49) begin failures++; $display("FAIL margin latency %0d", cyc); end
    end else begin
      max_frames++;
      if (cyc != 0) begin failures++; $display("FAIL margin latency %0d", cyc); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    frame(0, 0, 1);
    frame(10, -1000, 0);
    frame(31, -1000, 0);
    frame(200, -100000, -90000);
    frame(100, 50, 60);
    for (int i = 0; i < 40; i++) frame($urandom_range(120), -200000, 200000);
    margin_max = 100;
    frame(300, -100000, 100000);
    checks++;
    if (div_frames == 0 || max_frames == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
