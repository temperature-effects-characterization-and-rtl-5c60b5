// Shared types and constants of the MGT clock-synchronisation logic.
//
// pi_ctrl_t bundles the control inputs of a transceiver TX phase
// interpolator (PI) when it is driven from fabric logic rather than by the
// transceiver's own PPM controller. The field names follow the UltraScale+
// GTY port names (TXPIPPMEN, TXPIPPMOVRDEN, TXPIPPMSEL, TXPIPPMPD,
// TXPIPPMSTEPSIZE); which ports exist is this design's reading of the
// "PI control ports" of the transceiver, not something the paper lists.
// stepsize[4] selects the direction of a step and stepsize[3:0] its size in
// PI codes. In this design a step with stepsize[4] = 1 retards the phase
// (adds delay) and stepsize[4] = 0 advances it.
package mgt_sync_pkg;

  // Field widths of the PI control bundle.
  localparam int unsigned PI_STEP_W = 5;

  typedef struct packed {
    logic                 ppm_en;    // one-cycle pulse: apply one step
    logic                 ovrd_en;   // fabric owns the PI (override)
    logic                 sel;       // select fabric control of the PI
    logic                 pd;        // power-down of the PI controller
    logic [PI_STEP_W-1:0] stepsize;  // [4] direction, [3:0] step size
  } pi_ctrl_t;

  // Direction encoding of stepsize[4].
  localparam logic PI_DIR_RETARD = 1'b1;
  localparam logic PI_DIR_ADVANCE = 1'b0;

  // Idle bundle: PI under fabric control, powered, not stepping.
  localparam pi_ctrl_t PI_CTRL_IDLE = '{
    ppm_en: 1'b0, ovrd_en: 1'b1, sel: 1'b1, pd: 1'b0, stepsize: '0
  };

  // 8b/10b comma character K28.5, sent as a control byte.
  localparam logic [7:0] K28_5 = 8'hBC;

endpackage
