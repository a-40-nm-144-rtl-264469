// tb_sdp_ram: random writes and synchronous reads against an array model,
// including read-before-write on a same-address collision.
module tb_sdp_ram;
  localparam int WIDTH = 16, DEPTH = 2496;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [11:0] wr_addr = '0, rd_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  sdp_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 12'(a); wr_data = WIDTH'($urandom); model[a] = wr_data;
    end
    for (int i = 0; i < 5000; i++) begin
      logic [WIDTH-1:0] e;
      int ra;
      ra = $urandom_range(DEPTH-1);
      @(negedge clk);
      rd_en = 1; rd_addr = 12'(ra);
      wr_en = $urandom_range(1);
      wr_addr = ($urandom_range(3) == 0) ? 12'(ra) : 12'($urandom_range(DEPTH-1));
      wr_data = WIDTH'($urandom);
      e = model[ra];
      if (wr_en) model[wr_addr] = wr_data;
      @(negedge clk);
      rd_en = 0; wr_en = 0;
      checks++;
      if (rd_data !== e) begin failures++; $display("FAIL read %0d", ra); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
