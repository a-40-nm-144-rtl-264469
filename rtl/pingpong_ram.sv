// pingpong_ram: two RAM banks used as a double buffer.
//
// The consumer port reads bank `sel`; the producer port reads and writes the
// other bank. Flipping `sel` hands the bank the producer has just filled to the
// consumer. This is how the design double-buffers the GMM score RAM (GMM core
// produces, Viterbi core consumes) and the active node workspace (the list of
// frame t is consumed while the list of frame t+1 is produced). Reads have one
// cycle of latency and return data from the bank selected when the read was
// issued. The two-bank structure follows the source architecture; the port
// arrangement is this design's choice.
module pingpong_ram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             sel,       // bank read by the consumer port
  // consumer port (bank sel)
  input  logic             c_rd_en,
  input  logic [AW-1:0]    c_rd_addr,
  output logic [WIDTH-1:0] c_rd_data,
  // producer port (bank !sel)
  input  logic             p_wr_en,
  input  logic [AW-1:0]    p_wr_addr,
  input  logic [WIDTH-1:0] p_wr_data,
  input  logic             p_rd_en,
  input  logic [AW-1:0]    p_rd_addr,
  output logic [WIDTH-1:0] p_rd_data
);
  logic [WIDTH-1:0] rd0, rd1;
  logic             sel_q;

  // Bank b is read by the consumer when sel == b, else by the producer.
  sdp_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_bank0 (
    .clk, .wr_en(p_wr_en && sel), .wr_addr(p_wr_addr), .wr_data(p_wr_data),
    .rd_en(sel ? p_rd_en : c_rd_en), .rd_addr(sel ? p_rd_addr : c_rd_addr), .rd_data(rd0));
  sdp_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_bank1 (
    .clk, .wr_en(p_wr_en && !sel), .wr_addr(p_wr_addr), .wr_data(p_wr_data),
    .rd_en(sel ? c_rd_en : p_rd_en), .rd_addr(sel ? c_rd_addr : p_rd_addr), .rd_data(rd1));

  always_ff @(posedge clk) sel_q <= sel;

  assign c_rd_data = sel_q ? rd1 : rd0;
  assign p_rd_data = sel_q ? rd0 : rd1;
endmodule
