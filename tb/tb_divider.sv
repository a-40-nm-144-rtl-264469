// tb_divider: random and corner-case unsigned divisions against the
// simulator's own division; checks that done is seen W+1 cycles after the start edge.
module tb_divider;
  localparam int W = 48;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [W-1:0] dividend = '0, divisor = '0, quotient;
  int checks = 0, failures = 0;

  divider #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic div(logic [W-1:0] n, logic [W-1:0] d);
    logic [W-1:0] e;
    int cyc;
    e = (d == 0) ? '1 : n / d;
    @(negedge clk);
    dividend = n; divisor = d; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (quotient !== e) begin failures++; $display("FAIL %0d/%0d got %0d exp %0d", n, d, quotient, e); end
    if (cyc != W + 1) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    div(100, 7);
    div(0, 5);
    div(5, 0);
    div(48'hffff_ffff_ffff, 1);
    div(48'hffff_ffff_ffff, 48'hffff_ffff_ffff);
    div(12345, 12346);
    for (int i = 0; i < 300; i++)
      div({$urandom, $urandom} >> $urandom_range(47), W'($urandom >> $urandom_range(31)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
