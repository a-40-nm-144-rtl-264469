// gaussian_processor: log-likelihood of one Gaussian mixture component.
//
// Holds the parameters of one mixture (the per-mixture register REG): for each
// feature dimension a mean and an inverse-variance (precision) value, plus a
// constant gconst that folds in the mixture weight and the normalisation term.
// For one frame the feature vector is streamed in one dimension per cycle
// (x_valid, x_dim, x_last) and the unit accumulates
//     q = sum_d ((x_d - mean_d)^2 * prec_d) >> PREC_SHIFT
// and returns score = gconst - q/2 one cycle after the last dimension
// (out_valid). The parameters stay in REG and are reused for every look-ahead
// frame until a new mixture is loaded through the load port (one dimension per
// cycle). The mixture-level parallelism, the parameter register and the reuse
// across look-ahead frames follow the source architecture; the arithmetic,
// widths and one-dimension-per-cycle schedule are this design's choice.
module gaussian_processor
  import asr_pkg::*;
#(
  parameter int unsigned DIM        = 39,   // feature vector length
  parameter int unsigned PREC_SHIFT = 16,   // precision fraction bits
  localparam int unsigned DW        = $clog2(DIM)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // parameter load (mean, precision per dimension; gconst separately)
  input  logic                     ld_en,
  input  logic [DW-1:0]            ld_dim,
  input  logic signed [FEAT_W-1:0] ld_mean,
  input  logic [15:0]              ld_prec,
  input  logic                     ld_gconst_en,
  input  pscore_t                  ld_gconst,
  // feature stream
  input  logic                     x_valid,
  input  logic [DW-1:0]            x_dim,
  input  logic                     x_last,
  input  logic signed [FEAT_W-1:0] x_data,
  // result
  output logic                     out_valid,
  output pscore_t                  out_score
);
  logic signed [FEAT_W-1:0] mean [DIM];
  logic [15:0]              prec [DIM];
  pscore_t                  gconst;
  logic [47:0]              acc;

  logic signed [FEAT_W:0]   diff;
  logic [2*FEAT_W+1:0]      sq;
  logic [2*FEAT_W+17:0]     prod;
  logic [47:0]              term, acc_nxt;
  logic signed [63:0]       res;

  always_comb begin
    diff    = (FEAT_W+1)'(x_data) - (FEAT_W+1)'(mean[x_dim]);
    sq      = (2*FEAT_W+2)'(diff * diff);
    prod    = sq * prec[x_dim];
    term    = 48'(prod >> PREC_SHIFT);
    acc_nxt = acc + term;
    res     = 64'(gconst) - signed'(64'(acc_nxt >> 1));
  end

  always_ff @(posedge clk) begin
    if (ld_en) begin
      mean[ld_dim] <= ld_mean;
      prec[ld_dim] <= ld_prec;
    end
    if (ld_gconst_en) gconst <= ld_gconst;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      out_score <= '0;
    end else begin
      out_valid <= 1'b0;
      if (x_valid) begin
        if (x_last) begin
          acc       <= '0;
          out_valid <= 1'b1;
          // score = gconst - q/2, saturated at the bottom of the score range
          if (res < 64'(signed'(PSCORE_MIN))) out_score <= PSCORE_MIN;
          else                               out_score <= pscore_t'(res);
        end else begin
          acc <= acc_nxt;
        end
      end
    end
  end
endmodule
