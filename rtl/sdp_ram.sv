// sdp_ram: simple dual-port RAM, one write port and one synchronous read port.
//
// Models an on-chip SRAM macro as an array. A write at wr_addr takes effect at
// the clock edge; rd_data shows the word at rd_addr one cycle after rd_en
// (read-before-write when both ports hit the same address). Used for the MFCC
// buffer, the GMM score RAM banks, the active node workspace banks and the
// N-gram shared DB. Contents are not reset, as in an SRAM.
module sdp_ram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
