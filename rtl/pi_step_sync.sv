// Carries PI step requests from the measurement clock domain into the
// clock domain of a transceiver's PI control ports, and forms those ports.
//
// A request toggles a flag in the source domain; the flag crosses through a
// two-flop synchroniser and each change seen on the destination side emits
// one step: ppm_en high for one dst_clk cycle with stepsize = {direction,
// STEP_CODES}. The direction is held stable in the source domain from the
// request until long after it has been taken, so it is sampled without a
// synchroniser. Between steps the bundle idles at PI_CTRL_IDLE (fabric
// owns the PI, no stepping).
//
// Interface: src_req/src_dir one-cycle request in src_clk; pi in dst_clk.
// Timing: a step appears 3 to 4 dst_clk cycles after the request.
// Requests must be at least 4 dst_clk cycles plus 2 src_clk cycles apart
// (pi_compensator spaces them by whole measurement periods).
//
// The paper says only that the PI is adjusted; this crossing and the use of
// single PI steps are this design's choices.
module pi_step_sync
  import mgt_sync_pkg::*;
#(
  parameter int unsigned STEP_CODES = 1  // PI codes per step (1..15)
) (
  input  logic     src_clk,
  input  logic     src_rst_n,
  input  logic     src_req,
  input  logic     src_dir,
  input  logic     dst_clk,
  input  logic     dst_rst_n,
  output pi_ctrl_t pi
);

  logic src_tgl, src_dir_q;
  logic [2:0] dst_sync;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      src_tgl   <= 1'b0;
      src_dir_q <= PI_DIR_ADVANCE;
    end else if (src_req) begin
      src_tgl   <= ~src_tgl;
      src_dir_q <= src_dir;
    end
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      dst_sync <= '0;
      pi       <= PI_CTRL_IDLE;
    end else begin
      dst_sync <= {dst_sync[1:0], src_tgl};
      pi       <= PI_CTRL_IDLE;
      if (dst_sync[2] != dst_sync[1]) begin
        pi.ppm_en   <= 1'b1;
        pi.stepsize <= {src_dir_q, 4'(STEP_CODES)};
      end
    end
  end

endmodule
