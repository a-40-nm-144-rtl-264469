// tb_add_log_processor: checks log-domain addition against a real-arithmetic
// model of ln(e^a + e^b) with the same table quantisation, over edge cases
// (equal inputs, differences at and beyond the table end, saturation) and
// random pairs, and checks the one-cycle latency.
module tb_add_log_processor;
  import asr_pkg::*;
  import asr_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  pscore_t a = '0, b = '0, out_score;
  int checks = 0, failures = 0;

  add_log_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int x, int y);
    int exp_v;
    @(negedge clk);
    a = x; b = y; in_valid = 1;
    exp_v = addlog_ref(x, y);
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || out_score !== exp_v) begin
      failures++;
      $display("FAIL a=%0d b=%0d got v=%0b %0d exp %0d", x, y, out_valid, out_score, exp_v);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    apply(0, 0);
    apply(-1000, -1000);
    apply(100, 96);
    apply(-5, 500);
    apply(0, 383);
    apply(0, 384);
    apply(0, 10000);
    apply(2147483647, 2147483600);
    apply(-2147483647, -2147483648);
    for (int i = 0; i < 2000; i++) begin
      int x, y;
      x = int'($urandom_range(200000)) - 100000;
      y = x + int'($urandom_range(800)) - 400;
      apply(x, y);
    end
    // no output without input
    @(negedge clk);
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
