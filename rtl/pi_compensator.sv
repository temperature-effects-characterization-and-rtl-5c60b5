// Temperature-drift compensator for one TX phase interpolator (PI).
//
// The paper compensates temperature drift by shifting the TX PI of both
// nodes: the leader's PI takes out the drift of the leader's TX delay, and
// the follower's PI takes out the drift seen in the RX delay, so that the
// delay of the whole distribution stays put. This module is one such servo
// and is instantiated once per node.
//
// How it works. When enabled, the first measurement that arrives becomes
// the baseline. For every later measurement the error is the measured
// delay minus the baseline. If the error is above +deadband the PI is
// stepped to advance the clock (less delay); below -deadband it is stepped
// to retard it (more delay). After each step the next SETTLE measurements
// are skipped, because the averaging windows that straddle the step do not
// yet show its full effect. pi_pos counts the net steps applied, which is
// the correction currently in place.
//
// Interface: delay/delay_valid in the same fixed-point units as delay_calc;
// deadband in those units. step_req is a one-cycle request, step_dir its
// direction (mgt_sync_pkg::PI_DIR_ADVANCE/RETARD); pi_step_sync turns it
// into PI port signals in the transceiver clock domain. Dropping en clears
// the baseline and stops stepping; pi_pos is kept. Timing: at most one step
// per SETTLE + 1 measurements; step_req comes one cycle after delay_valid.
//
// Closing the loop on the DDMTD measurement, the deadband and the settling
// rule are this design's choices: the paper states what is adjusted and
// to what end, not the control law.
module pi_compensator
  import mgt_sync_pkg::*;
#(
  parameter int unsigned DLY_W  = 22,  // width of the delay measurement
  parameter int unsigned POS_W  = 12,  // width of the net step counter
  parameter int unsigned SETTLE = 1    // measurements skipped after a step
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [DLY_W-1:0] delay,
  input  logic                    delay_valid,
  input  logic        [DLY_W-2:0] deadband,
  output logic                    step_req,
  output logic                    step_dir,
  output logic signed [POS_W-1:0] pi_pos,
  output logic signed [DLY_W:0]   error
);

  localparam int unsigned SW = $clog2(SETTLE + 1) + 1;

  logic signed [DLY_W-1:0] baseline;
  logic                    base_ok;
  logic [SW-1:0]           skip;
  logic signed [DLY_W:0]   err_now;
  logic signed [DLY_W:0]   db;

  assign err_now = (DLY_W + 1)'(delay) - (DLY_W + 1)'(baseline);
  assign db      = $signed({2'b00, deadband});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      baseline <= '0;
      base_ok  <= 1'b0;
      skip     <= '0;
      step_req <= 1'b0;
      step_dir <= PI_DIR_ADVANCE;
      pi_pos   <= '0;
      error    <= '0;
    end else begin
      step_req <= 1'b0;
      if (!en) begin
        base_ok <= 1'b0;
        skip    <= '0;
      end else if (delay_valid) begin
        if (!base_ok) begin
          baseline <= delay;
          base_ok  <= 1'b1;
          error    <= '0;
        end else begin
          error <= err_now;
          if (skip != '0) begin
            skip <= skip - 1'b1;
          end else if (err_now > db) begin
            step_req <= 1'b1;
            step_dir <= PI_DIR_ADVANCE;
            pi_pos   <= pi_pos - 1'b1;
            skip     <= SW'(SETTLE);
          end else if (err_now < -db) begin
            step_req <= 1'b1;
            step_dir <= PI_DIR_RETARD;
            pi_pos   <= pi_pos + 1'b1;
            skip     <= SW'(SETTLE);
          end
        end
      end
    end
  end

endmodule
