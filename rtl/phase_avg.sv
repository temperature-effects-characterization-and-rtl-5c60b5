// Unwrapping phase averager for one DDMTD channel.
//
// A DDMTD phase is known only modulo the beat period N, so a delay sitting
// near a multiple of the clock period reads alternately close to 0 and
// close to N. The averager fixes a reference r from the first sample it
// accepts, folds every later sample into the half-open window
// [r - N/2, r + N/2) and accumulates the folded offsets. After 2**AVG_LOG2
// samples it outputs r * 2**AVG_LOG2 plus the sum, i.e. the mean phase as a
// signed fixed-point number with AVG_LOG2 fraction bits, and starts the
// next window. The reference is kept until clear, so a drifting delay
// stays continuous across the wrap point.
//
// Interface: phase/valid from ddmtd; period is the latest beat period and
// period_ok says one is known (samples are ignored until then). avg/done:
// result and one-cycle strobe. Timing: done comes one cycle after the
// 2**AVG_LOG2-th accepted sample.
//
// Averaging and unwrapping are this design's choices; the paper does not
// describe how its DDMTD readings are post-processed.
module phase_avg #(
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned AVG_LOG2 = 4,
  localparam int unsigned DLY_W   = CNT_W + AVG_LOG2 + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic [CNT_W-1:0]        phase,
  input  logic                    valid,
  input  logic [CNT_W-1:0]        period,
  input  logic                    period_ok,
  output logic signed [DLY_W-1:0] avg,
  output logic                    done
);

  logic [CNT_W-1:0]        ref_ph;
  logic                    ref_ok;
  logic [AVG_LOG2:0]       nsamp;
  logic signed [DLY_W-1:0] acc;

  // Fold the sample into [ref - N/2, ref + N/2).
  logic signed [CNT_W+1:0] diff, half, per, folded;

  always_comb begin
    diff = $signed({2'b00, phase}) - $signed({2'b00, ref_ph});
    per  = $signed({2'b00, period});
    half = $signed({3'b000, period[CNT_W-1:1]});
    if (diff >= half)       folded = diff - per;
    else if (diff < -half)  folded = diff + per;
    else                    folded = diff;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_ph <= '0;
      ref_ok <= 1'b0;
      nsamp  <= '0;
      acc    <= '0;
      avg    <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        ref_ok <= 1'b0;
        nsamp  <= '0;
        acc    <= '0;
      end else if (valid && period_ok) begin
        if (!ref_ok) begin
          // First sample: becomes the reference and the first term (0).
          ref_ph <= phase;
          ref_ok <= 1'b1;
          nsamp  <= 1;
          acc    <= '0;
        end else if (nsamp == (AVG_LOG2 + 1)'(2 ** AVG_LOG2 - 1)) begin
          avg   <= ($signed({2'b00, AVG_LOG2'(0), ref_ph}) <<< AVG_LOG2)
                   + acc + DLY_W'(folded);
          done  <= 1'b1;
          nsamp <= '0;
          acc   <= '0;
        end else begin
          nsamp <= nsamp + 1'b1;
          acc   <= acc + DLY_W'(folded);
        end
      end
    end
  end

endmodule
