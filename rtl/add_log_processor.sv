// add_log_processor: log-domain addition, log(e^a + e^b), with a look-up table.
//
// Computes max(a, b) + T(|a - b|) where T(d) = ln(1 + e^-d) is read from the
// add-log table. Scores are in units of 1/64 nat. The table has 96 entries of
// 16 bits (1.5 kbit); entry i holds round(64 * ln(1 + exp(-4i/64))), i.e. it
// is indexed by |a - b| in steps of 1/16 nat and covers differences up to
// 6 nats, beyond which the correction rounds to zero. One result per cycle,
// registered: out_valid/out_score follow in_valid by one cycle. The GMM core
// combines the sixteen mixture results of a frame with a tree of these units.
// The table-based add-log unit follows the source architecture; the table
// size, resolution and one-cycle timing are this design's choice.
module add_log_processor
  import asr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  pscore_t a,
  input  pscore_t b,
  output logic    out_valid,
  output pscore_t out_score
);
  localparam int unsigned TBL_N = 96;
  localparam logic [15:0] ADDLOG_TBL [TBL_N] = '{
    16'd44, 16'd42, 16'd40, 16'd39, 16'd37, 16'd35, 16'd33, 16'd32, 16'd30, 16'd29, 16'd27, 16'd26, 16'd25, 16'd24, 16'd22, 16'd21,
    16'd20, 16'd19, 16'd18, 16'd17, 16'd16, 16'd15, 16'd14, 16'd14, 16'd13, 16'd12, 16'd12, 16'd11, 16'd10, 16'd10, 16'd9, 16'd9,
    16'd8, 16'd8, 16'd7, 16'd7, 16'd6, 16'd6, 16'd6, 16'd5, 16'd5, 16'd5, 16'd4, 16'd4, 16'd4, 16'd4, 16'd4, 16'd3,
    16'd3, 16'd3, 16'd3, 16'd3, 16'd2, 16'd2, 16'd2, 16'd2, 16'd2, 16'd2, 16'd2, 16'd2, 16'd1, 16'd1, 16'd1, 16'd1,
    16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd1, 16'd0, 16'd0,
    16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0, 16'd0
  };

  pscore_t         mx, mn;
  logic [32:0]     d;
  logic [6:0]      idx;
  logic signed [33:0] sum;

  always_comb begin
    mx  = (a > b) ? a : b;
    mn  = (a > b) ? b : a;
    d   = 33'(34'(mx) - 34'(mn));
    idx = (d >= 33'(TBL_N * 4)) ? 7'(TBL_N - 1) : 7'(d >> 2);
    sum = 34'(mx) + 34'(ADDLOG_TBL[idx]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_score <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_score <= (sum > 34'(PSCORE_MAX)) ? PSCORE_MAX : pscore_t'(sum);
    end
  end
endmodule
