// PI rotation driver for the DDMTD reference clock.
//
// The DDMTD needs a reference clock a little slower than the system clock.
// The paper makes it inside the transceiver: a spare channel's TX PLL runs
// from the system clock, its phase interpolator shifts the phase and its
// divider brings it back to the system-clock rate; its TXOUTCLKPCS is the
// reference. Rotating the PI steadily in one direction turns a phase
// offset into a frequency offset, and because the reference is derived
// from the system clock it follows the system clock's own temperature
// drift, so the frequency difference, and with it the DDMTD resolution,
// stays constant.
//
// This module does the rotating. A phase accumulator adds rate_inc every
// clk cycle; each carry out emits one PI step (ppm_en for one cycle) of
// step_codes codes in the retarding direction. With a PI resolution of
// UI/R per code, a clock period of W UI (W = serialisation width), and
// rate_inc = 2**ACC_W the reference period is longer than the system
// period by step_codes * UI / R, so N = W * R / step_codes.
// Smaller rate_inc gives proportionally larger N.
//
// Interface: en starts and stops rotation (bundle idles while low);
// pi goes to the PI control ports of the reference channel. Timing: steps
// are spread evenly, at most one per cycle; outputs registered.
//
// The paper gives the use of PLL, PI and divider of a second channel; the
// accumulator, its width and the step-size input are this design's
// choices.
module pi_ppm_driver
  import mgt_sync_pkg::*;
#(
  parameter int unsigned ACC_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [ACC_W:0]   rate_inc,    // steps per cycle * 2**ACC_W, <= 2**ACC_W
  input  logic [3:0]       step_codes,  // PI codes per step
  output pi_ctrl_t         pi
);

  localparam logic [ACC_W:0] FULL = {1'b1, {ACC_W{1'b0}}};

  logic [ACC_W-1:0] acc;
  logic [ACC_W:0]   rate;  // rate_inc limited to one step per cycle
  logic [ACC_W:0]   sum;

  assign rate = (rate_inc > FULL) ? FULL : rate_inc;
  assign sum  = {1'b0, acc} + rate;

  initial assert (ACC_W >= 2) else $error("ACC_W too small");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      pi  <= PI_CTRL_IDLE;
    end else begin
      pi <= PI_CTRL_IDLE;
      if (en) begin
        acc <= sum[ACC_W-1:0];
        if (sum[ACC_W]) begin
          pi.ppm_en   <= 1'b1;
          pi.stepsize <= {PI_DIR_RETARD, step_codes};
        end
      end
    end
  end

endmodule
