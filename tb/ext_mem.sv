// ext_mem: behavioural model of an external memory port for the testbenches.
//
// Request/ready handshake; a read returns its data LAT cycles after it was
// accepted, in order, flagged by rvalid. When STALL is nonzero, ready is low
// on about one cycle in STALL. The array is public so that a testbench can
// load and inspect it directly.
module ext_mem #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned LAT   = 3,
  parameter int unsigned STALL = 0
) (
  input  logic             clk,
  input  logic             req,
  input  logic             we,
  input  logic [31:0]      addr,
  input  logic [WIDTH-1:0] wdata,
  output logic             ready,
  output logic             rvalid,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic             v_pipe [LAT];
  logic [WIDTH-1:0] d_pipe [LAT];
  int unsigned      reads, writes;

  initial begin
    for (int i = 0; i < LAT; i++) v_pipe[i] = 1'b0;
    reads = 0;
    writes = 0;
    ready = 1'b1;
  end

  always @(posedge clk) begin
    for (int i = LAT - 1; i > 0; i--) begin
      v_pipe[i] <= v_pipe[i-1];
      d_pipe[i] <= d_pipe[i-1];
    end
    v_pipe[0] <= req && ready && !we;
    d_pipe[0] <= (addr < DEPTH) ? mem[addr] : '0;
    if (req && ready && we) begin
      if (addr < DEPTH) mem[addr] <= wdata;
      writes <= writes + 1;
    end
    if (req && ready && !we) reads <= reads + 1;
    ready <= (STALL == 0) ? 1'b1 : ($urandom_range(STALL - 1) != 0);
  end

  assign rvalid = v_pipe[LAT-1];
  assign rdata  = d_pipe[LAT-1];
endmodule
