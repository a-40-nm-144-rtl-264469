// tb_dm_cache: random reads and writes over an address range larger than the
// cache, with an external memory model that stalls at random; checks every
// read against a shadow copy, write-through to memory, hit latency (response
// one cycle after the lookup) and that repeated reads of a small working set
// hit.
module tb_dm_cache;
  localparam int AW = 16, DW = 28, IW = 6;
  logic clk = 0, rst_n = 0, flush = 0;
  logic req_valid = 0, req_we = 0, req_ready, resp_valid;
  logic [AW-1:0] req_addr = '0;
  logic [DW-1:0] req_wdata = '0, resp_rdata, mem_wdata, mem_rdata;
  logic mem_req, mem_we, mem_ready, mem_rvalid;
  logic [AW-1:0] mem_addr;
  logic [31:0] hits, misses;
  logic [DW-1:0] shadow [1 << AW];
  int checks = 0, failures = 0;

  dm_cache #(.ADDR_W(AW), .DATA_W(DW), .INDEX_W(IW)) dut (.*);
  ext_mem #(.WIDTH(DW), .DEPTH(1 << AW), .LAT(4), .STALL(3)) mem (
    .clk, .req(mem_req), .we(mem_we), .addr(32'(mem_addr)), .wdata(mem_wdata),
    .ready(mem_ready), .rvalid(mem_rvalid), .rdata(mem_rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(logic we, logic [AW-1:0] a, logic [DW-1:0] d, output int lat);
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1; req_we = we; req_addr = a; req_wdata = d;
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    if (we) begin
      shadow[a] = d;
      return;
    end
    while (!resp_valid) begin @(negedge clk); lat++; end
    checks++;
    if (resp_rdata !== shadow[a]) begin
      failures++;
      $display("FAIL read %0h got %0h exp %0h", a, resp_rdata, shadow[a]);
    end
  endtask

  initial begin
    int lat, h0;
    for (int i = 0; i < (1 << AW); i++) begin
      shadow[i] = DW'($urandom);
      mem.mem[i] = shadow[i];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // mixed random traffic over the whole range
    for (int i = 0; i < 3000; i++)
      access($urandom_range(2) == 0, AW'($urandom), DW'($urandom), lat);
    // small working set: after the first pass every read must hit in 2 cycles
    for (int a = 0; a < 32; a++) access(0, AW'(a * 3 + 1000), '0, lat);
    h0 = hits;
    for (int p = 0; p < 3; p++)
      for (int a = 0; a < 32; a++) begin
        access(0, AW'(a * 3 + 1000), '0, lat);
        checks++;
        if (lat != 2) begin failures++; $display("FAIL hit latency %0d", lat); end
      end
    checks++;
    if (hits - h0 != 96) begin failures++; $display("FAIL hits %0d", hits - h0); end
    // writes went through to memory
    repeat (10) @(negedge clk);
    for (int i = 0; i < (1 << AW); i++) begin
      if (mem.mem[i] !== shadow[i]) begin
        failures++;
        $display("FAIL memory %0h", i);
        break;
      end
    end
    checks++;
    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
