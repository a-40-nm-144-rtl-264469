// divider: sequential unsigned restoring divider.
//
// Computes quotient = dividend / divisor, one quotient bit per cycle. A
// one-cycle start loads the operands; done pulses W cycles later with the
// result. Division by zero returns all ones. Used by the beam threshold unit
// to derive the pruning margin once per frame, where a multi-cycle divider
// is cheap. The divider block comes from the source architecture; the
// restoring algorithm and its timing are this design's choice.
module divider #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient
);
  logic [W-1:0]           rem, dvs, q;
  logic [$clog2(W+1)-1:0] cnt;
  logic [W:0]             trial;

  assign trial    = {rem, q[W-1]} - {1'b0, dvs};
  assign quotient = q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem  <= '0;
      dvs  <= '0;
      q    <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        rem  <= '0;
        dvs  <= divisor;
        q    <= dividend;
        cnt  <= ($clog2(W+1))'(W);
        busy <= 1'b1;
      end else if (busy) begin
        // shift {rem,q} left; subtract when it fits
        if (!trial[W]) begin
          rem <= trial[W-1:0];
          q   <= {q[W-2:0], 1'b1};
        end else begin
          rem <= {rem[W-2:0], q[W-1]};
          q   <= {q[W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
