// beam_threshold: dynamic beam-pruning margin, recomputed every frame.
//
// During a frame the Viterbi core reports the score of every surviving active
// node (sample_valid). The unit tracks the best and worst score and the node
// count. At frame_end it derives the margin used to prune the next frame's
// candidates:
//     margin = (best - worst) * beam_width / count   if count > beam_width
//     margin = margin_max                             otherwise
// i.e. assuming scores spread evenly between worst and best, the margin that
// would have kept about beam_width nodes. Candidates scoring below
// (running best - margin) are dropped. The quotient comes from the sequential
// divider, so margin_valid rises 50 cycles after frame_end; the previous
// margin stays in use until then. The divider, the threshold register and the
// comparison against it follow the source architecture; the formula is this
// design's choice.
module beam_threshold
  import asr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_start,     // clear the statistics
  input  logic        sample_valid,
  input  pscore_t     sample_score,
  input  logic        frame_end,       // compute the next margin
  input  logic [15:0] beam_width,
  input  pscore_t     margin_max,
  output pscore_t     margin,
  output logic        margin_valid,    // margin is up to date
  output logic [31:0] count,
  output pscore_t     best,
  output pscore_t     worst
);
  localparam int unsigned DVW = 48;
  logic           dv_start, dv_busy, dv_done;
  logic [DVW-1:0] dv_dividend, dv_divisor, dv_q;
  logic [31:0]    range;

  assign range       = 32'(best - worst);
  assign dv_dividend = DVW'(range) * DVW'(beam_width);
  assign dv_divisor  = DVW'(count);
  assign dv_start    = frame_end && (count > 32'(beam_width));

  divider #(.W(DVW)) u_div (
    .clk, .rst_n, .start(dv_start), .dividend(dv_dividend), .divisor(dv_divisor),
    .busy(dv_busy), .done(dv_done), .quotient(dv_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count        <= '0;
      best         <= PSCORE_MIN;
      worst        <= PSCORE_MAX;
      margin       <= '0;
      margin_valid <= 1'b0;
    end else begin
      if (frame_start) begin
        count <= '0;
        best  <= PSCORE_MIN;
        worst <= PSCORE_MAX;
      end else if (sample_valid) begin
        count <= count + 1'b1;
        if (sample_score > best)  best  <= sample_score;
        if (sample_score < worst) worst <= sample_score;
      end
      if (frame_end) begin
        if (count > 32'(beam_width)) begin
          margin_valid <= 1'b0;
        end else begin
          margin       <= margin_max;
          margin_valid <= 1'b1;
        end
      end else if (dv_done) begin
        margin       <= (dv_q > DVW'(margin_max)) ? margin_max : pscore_t'(dv_q);
        margin_valid <= 1'b1;
      end
    end
  end
endmodule
