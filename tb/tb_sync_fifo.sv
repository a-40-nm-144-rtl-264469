// tb_sync_fifo: random pushes and pops against a queue model, filling the
// buffer to full and draining it to empty; checks order, flags and level.
module tb_sync_fifo;
  localparam int WIDTH = 64, DEPTH = 32;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, full, empty;
  logic [WIDTH-1:0] din = '0, dout;
  logic [$clog2(DEPTH):0] level;
  logic [WIDTH-1:0] q[$];
  int checks = 0, failures = 0, fulls = 0;

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int bias;
      bias = (i / 500) % 2 ? 3 : 1;       // phases that fill, phases that drain
      @(negedge clk);
      checks += 3;
      if (level != q.size()) begin failures++; $display("FAIL level %0d exp %0d", level, q.size()); end
      if (full != (q.size() == DEPTH) || empty != (q.size() == 0)) begin failures++; $display("FAIL flags"); end
      if (q.size() > 0 && dout !== q[0]) begin failures++; $display("FAIL data"); end
      if (full) fulls++;
      push = !full && ($urandom_range(3) < bias);
      pop  = !empty && ($urandom_range(3) >= bias);
      din  = {$urandom, $urandom};
      @(posedge clk);
      if (push) q.push_back(din);
      if (pop) void'(q.pop_front());
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
