// DDMTD beat-signal deglitcher.
//
// A clock sampled by a slightly offset clock gives a slow square "beat"
// wave, but near each of its transitions jitter makes the samples toggle
// back and forth for a while. This filter holds its output state and flips
// it only after the input has disagreed with it for THRESH consecutive
// samples; any agreeing sample restarts the count. Each real transition
// therefore gives exactly one output edge, THRESH samples after the last
// glitch. The constant lag is the same for every channel of a DDMTD, so it
// cancels in a phase difference.
//
// Interface: d is the (already synchronised) sampled clock; q the filtered
// beat; rise a one-cycle pulse on each rising edge of q. Timing: one sample
// per clk cycle, q and rise registered.
//
// The paper uses the DDMTD method without describing its logic; this
// filter is the design's own choice.
module ddmtd_deglitch #(
  parameter int unsigned THRESH = 16   // samples needed to accept a change
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic rise
);

  localparam int unsigned CW = $clog2(THRESH + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= 1'b0;
      cnt  <= '0;
      rise <= 1'b0;
    end else begin
      rise <= 1'b0;
      if (d == q) begin
        cnt <= '0;
      end else if (cnt == CW'(THRESH - 1)) begin
        cnt  <= '0;
        q    <= d;
        rise <= d;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
