// tb_pingpong_ram: fills the producer bank, swaps, and checks that the
// consumer port sees the filled bank while the producer writes and reads back
// the other one; checks one-cycle read latency and bank isolation.
module tb_pingpong_ram;
  localparam int WIDTH = 16, DEPTH = 256;
  logic clk = 0, sel = 0;
  logic c_rd_en = 0, p_wr_en = 0, p_rd_en = 0;
  logic [7:0] c_rd_addr = '0, p_wr_addr = '0, p_rd_addr = '0;
  logic [WIDTH-1:0] c_rd_data, p_wr_data = '0, p_rd_data;
  logic [WIDTH-1:0] model [2][DEPTH];
  int checks = 0, failures = 0;

  pingpong_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 6; round++) begin
      // producer fills bank !sel
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        p_wr_en = 1; p_wr_addr = 8'(a); p_wr_data = WIDTH'($urandom);
        model[!sel][a] = p_wr_data;
      end
      @(negedge clk);
      p_wr_en = 0;
      sel = !sel;
      // consumer reads what was filled; producer reads the other bank at the same time
      for (int i = 0; i < 300; i++) begin
        int ca, pa;
        ca = $urandom_range(DEPTH-1); pa = $urandom_range(DEPTH-1);
        @(negedge clk);
        c_rd_en = 1; c_rd_addr = 8'(ca); p_rd_en = 1; p_rd_addr = 8'(pa);
        @(negedge clk);
        c_rd_en = 0; p_rd_en = 0;
        checks += 2;
        if (c_rd_data !== model[sel][ca]) begin failures++; $display("FAIL consumer"); end
        if (round > 0 && p_rd_data !== model[!sel][pa]) begin failures++; $display("FAIL producer"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
