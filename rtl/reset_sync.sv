// Reset synchroniser: asserts asynchronously, releases synchronously to clk
// after STAGES rising edges. Used once per clock domain of the design.
// Lint reports the flops as used both synchronously and asynchronously:
// that is the nature of a reset synchroniser (the chain resets
// asynchronously and shifts synchronously) and is intended.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);

  logic [STAGES-1:0] sr;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) sr <= '0;
    else         sr <= {sr[STAGES-2:0], 1'b1};
  end

  assign rst_n = sr[STAGES-1];

endmodule
