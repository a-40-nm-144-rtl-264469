// dm_cache: direct-mapped, one-word-per-line, write-through cache.
//
// Sits between a Viterbi-core client and a slice of external memory. It keeps
// part of a large table on chip and exploits the frame-to-frame locality of
// speech recognition: data used for one frame is likely to be used again in
// the next. The design uses it for the N-gram (bigram) table, read only, and
// for the active node map, read and written.
//
// Client side: a request (req_valid && req_ready) is a read or a write of one
// word. A read hit answers on the next cycle (resp_valid); a read miss fetches
// the word from memory, fills the line and then answers. A write updates or
// allocates the line and is written through to memory; it gets no response.
// req_ready is high only when the cache is idle: one request at a time.
// Memory side: mem_req/mem_ready handshake, read data returns with
// mem_rvalid. Hit and miss counters are kept for the hit rate.
// Caching these tables follows the source architecture; the organisation
// (direct-mapped, write-through, one word per line) is this design's choice.
module dm_cache #(
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned DATA_W  = 9,
  parameter int unsigned INDEX_W = 14           // 2**INDEX_W lines
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,              // invalidate every line
  // client
  input  logic              req_valid,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [DATA_W-1:0] req_wdata,
  output logic              req_ready,
  output logic              resp_valid,
  output logic [DATA_W-1:0] resp_rdata,
  // memory
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic              mem_ready,
  input  logic              mem_rvalid,
  input  logic [DATA_W-1:0] mem_rdata,
  // statistics
  output logic [31:0]       hits,
  output logic [31:0]       misses
);
  localparam int unsigned TAG_W = ADDR_W - INDEX_W;
  localparam int unsigned LINES = 1 << INDEX_W;

  typedef enum logic [2:0] {C_IDLE, C_LOOK, C_WR, C_MISS, C_WAIT} cst_t;
  cst_t st;

  logic [TAG_W-1:0]  tag_ram  [LINES];
  logic [DATA_W-1:0] data_ram [LINES];
  logic [LINES-1:0]  valid;

  logic [ADDR_W-1:0] a_q;
  logic              we_q;
  logic [DATA_W-1:0] wd_q;
  logic [TAG_W-1:0]  tag_rd;
  logic [DATA_W-1:0] data_rd;

  wire [INDEX_W-1:0] idx_q = a_q[INDEX_W-1:0];
  wire [TAG_W-1:0]   tag_q = a_q[ADDR_W-1:INDEX_W];
  wire               hit   = valid[idx_q] && (tag_rd == tag_q);

  assign req_ready = (st == C_IDLE);

  // tag/data arrays with a synchronous read, as SRAM macros
  always_ff @(posedge clk) begin
    if (req_valid && req_ready) begin
      tag_rd  <= tag_ram[req_addr[INDEX_W-1:0]];
      data_rd <= data_ram[req_addr[INDEX_W-1:0]];
    end
    if ((st == C_LOOK && we_q) || (st == C_WAIT && mem_rvalid)) begin
      tag_ram[idx_q]  <= tag_q;
      data_ram[idx_q] <= we_q ? wd_q : mem_rdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= C_IDLE;
      valid      <= '0;
      a_q        <= '0;
      we_q       <= 1'b0;
      wd_q       <= '0;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
      hits       <= '0;
      misses     <= '0;
    end else begin
      resp_valid <= 1'b0;
      if (flush) valid <= '0;
      unique case (st)
        C_IDLE: if (req_valid) begin
          a_q  <= req_addr;
          we_q <= req_we;
          wd_q <= req_wdata;
          st   <= C_LOOK;
        end
        C_LOOK: begin
          if (we_q) begin
            valid[idx_q] <= 1'b1;
            st <= C_WR;
          end else if (hit) begin
            hits       <= hits + 1'b1;
            resp_valid <= 1'b1;
            resp_rdata <= data_rd;
            st         <= C_IDLE;
          end else begin
            misses <= misses + 1'b1;
            st     <= C_MISS;
          end
        end
        C_WR:   if (mem_ready) st <= C_IDLE;
        C_MISS: if (mem_ready) st <= C_WAIT;
        C_WAIT: if (mem_rvalid) begin
          valid[idx_q] <= 1'b1;
          resp_valid   <= 1'b1;
          resp_rdata   <= mem_rdata;
          st           <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  assign mem_req   = (st == C_WR) || (st == C_MISS);
  assign mem_we    = (st == C_WR);
  assign mem_addr  = a_q;
  assign mem_wdata = wd_q;
endmodule
