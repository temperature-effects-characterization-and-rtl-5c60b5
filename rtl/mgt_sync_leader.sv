// Fabric logic of the leader node of an MGT-based clock distribution link
// with on-chip temperature-drift characterisation and compensation.
//
// The leader sends its system clock to a follower over an MGT downlink;
// the follower sends its recovered clock straight back on an uplink. The
// transceivers' delays drift with temperature (mostly in the TX, through
// its PLL), so the leader
//   * measures the TX delay (system clock against TXOUTCLKPCS) and the
//     loop delay (system clock against the loop-back RXOUTCLKPCS) with an
//     on-chip DDMTD, and derives the RX delay as their difference;
//   * makes the DDMTD reference clock from a spare transceiver channel,
//     whose PI it rotates (pi_ppm_driver), so that the reference tracks
//     the system clock's own drift;
//   * holds the delays still by stepping the TX PI of its own channel
//     against TX drift and, through ports for the follower, the follower's
//     TX PI against RX drift;
//   * feeds the downlink with words from the data controller.
//
// Blocks: data_controller (clk_sys), pi_ppm_driver (clk_sys, drives the
// reference channel's PI), ddmtd + delay_calc + two pi_compensators
// (clk_ref), two pi_step_sync crossing the steps back to clk_sys.
// The transceivers themselves (PLL, PI, dividers, PISO, SIPO, CDR), the
// oscillator and the follower board are outside this module: their clocks
// come in as ports and their PI controls go out as ports.
//
// Clocks and resets: clk_sys is the system clock, which also clocks the
// PI control ports of both channels (and, in this design, is assumed to be
// the clock the follower's PI port bundle is re-timed to); clk_ref is the
// DDMTD reference (TXOUTCLKPCS of the reference channel). txoutclkpcs and
// rxoutclkpcs are only sampled, never used as clocks. arst_n is an
// asynchronous reset, synchronised per domain.
// Outputs tx_data..ch2_pi and follower_pi are in the clk_sys domain; the
// measurement and compensation status outputs are in the clk_ref domain.
//
// What follows the paper: the measurement plan (TX, loop, RX = loop - TX),
// the reference-clock scheme and the compensation by TX PI on both nodes.
// Number formats, averaging, the control law and all port-level details
// are this design's choices; see each block.
module mgt_sync_leader
  import mgt_sync_pkg::*;
#(
  parameter int unsigned DATA_W       = 32,
  parameter int unsigned COMMA_PERIOD = 256,
  parameter int unsigned CNT_W        = 16,
  parameter int unsigned THRESH       = 16,
  parameter int unsigned AVG_LOG2     = 4,
  parameter int unsigned ACC_W        = 16,
  parameter int unsigned POS_W        = 12,
  parameter int unsigned SETTLE       = 1,
  localparam int unsigned DLY_W       = CNT_W + AVG_LOG2 + 2
) (
  input  logic                    clk_sys,
  input  logic                    clk_ref,
  input  logic                    arst_n,
  // clocks sampled by the DDMTD
  input  logic                    txoutclkpcs,
  input  logic                    rxoutclkpcs,
  // configuration
  input  logic                    cfg_data_en,
  input  logic                    cfg_ref_en,
  input  logic [ACC_W:0]          cfg_ref_rate,
  input  logic [3:0]              cfg_ref_step,
  input  logic                    cfg_comp_leader_en,
  input  logic                    cfg_comp_follower_en,
  input  logic [DLY_W-2:0]        cfg_deadband,
  input  logic                    cfg_meas_clear,
  // to the leader's transceiver, clk_sys domain
  output logic [DATA_W-1:0]       tx_data,
  output logic [DATA_W/8-1:0]     tx_charisk,
  output logic                    tx_is_comma,
  output pi_ctrl_t                ch1_pi,       // TX PI of the link channel
  output pi_ctrl_t                ch2_pi,       // TX PI of the reference channel
  output pi_ctrl_t                follower_pi,  // for the follower's TX PI
  // measurement and compensation status, clk_ref domain
  output logic signed [DLY_W-1:0] tx_delay,
  output logic signed [DLY_W-1:0] loop_delay,
  output logic signed [DLY_W-1:0] rx_delay,
  output logic [CNT_W-1:0]        beat_period,
  output logic                    meas_valid,
  output logic [2:0]              ddmtd_beat,   // filtered beats {loop, tx, sys}
  output logic signed [POS_W-1:0] leader_pi_pos,
  output logic signed [POS_W-1:0] follower_pi_pos,
  output logic signed [DLY_W:0]   leader_error,
  output logic signed [DLY_W:0]   follower_error
);

  logic rst_sys_n, rst_ref_n;

  reset_sync u_rst_sys (.clk(clk_sys), .arst_n, .rst_n(rst_sys_n));
  reset_sync u_rst_ref (.clk(clk_ref), .arst_n, .rst_n(rst_ref_n));

  // ---------------------------------------------------------------- data
  data_controller #(.DATA_W(DATA_W), .COMMA_PERIOD(COMMA_PERIOD)) u_data (
    .clk(clk_sys), .rst_n(rst_sys_n), .en(cfg_data_en),
    .tx_data, .tx_charisk, .tx_is_comma
  );

  // --------------------------------------------- DDMTD reference channel
  pi_ppm_driver #(.ACC_W(ACC_W)) u_ref_pi (
    .clk(clk_sys), .rst_n(rst_sys_n), .en(cfg_ref_en),
    .rate_inc(cfg_ref_rate), .step_codes(cfg_ref_step), .pi(ch2_pi)
  );

  // --------------------------------------------------------- measurement
  logic [CNT_W-1:0] tx_phase, loop_phase, period_raw;
  logic             tx_valid, loop_valid, period_valid;

  ddmtd #(.CNT_W(CNT_W), .THRESH(THRESH)) u_ddmtd (
    .clk_ref, .rst_n(rst_ref_n),
    .sys_clk_in(clk_sys), .tx_clk_in(txoutclkpcs), .loop_clk_in(rxoutclkpcs),
    .tx_phase, .tx_valid, .loop_phase, .loop_valid,
    .period(period_raw), .period_valid, .beat(ddmtd_beat)
  );

  delay_calc #(.CNT_W(CNT_W), .AVG_LOG2(AVG_LOG2)) u_delay (
    .clk(clk_ref), .rst_n(rst_ref_n), .clear(cfg_meas_clear),
    .tx_phase, .tx_valid, .loop_phase, .loop_valid,
    .period_in(period_raw), .period_valid,
    .tx_delay, .loop_delay, .rx_delay, .period(beat_period), .meas_valid
  );

  // -------------------------------------------------------- compensation
  logic ld_req, ld_dir, fl_req, fl_dir;

  // Leader TX PI against the drift of the TX delay.
  pi_compensator #(.DLY_W(DLY_W), .POS_W(POS_W), .SETTLE(SETTLE)) u_comp_leader (
    .clk(clk_ref), .rst_n(rst_ref_n), .en(cfg_comp_leader_en),
    .delay(tx_delay), .delay_valid(meas_valid), .deadband(cfg_deadband),
    .step_req(ld_req), .step_dir(ld_dir), .pi_pos(leader_pi_pos), .error(leader_error)
  );

  // Follower TX PI against the drift of the RX delay.
  pi_compensator #(.DLY_W(DLY_W), .POS_W(POS_W), .SETTLE(SETTLE)) u_comp_follower (
    .clk(clk_ref), .rst_n(rst_ref_n), .en(cfg_comp_follower_en),
    .delay(rx_delay), .delay_valid(meas_valid), .deadband(cfg_deadband),
    .step_req(fl_req), .step_dir(fl_dir), .pi_pos(follower_pi_pos), .error(follower_error)
  );

  pi_step_sync u_ch1_sync (
    .src_clk(clk_ref), .src_rst_n(rst_ref_n), .src_req(ld_req), .src_dir(ld_dir),
    .dst_clk(clk_sys), .dst_rst_n(rst_sys_n), .pi(ch1_pi)
  );

  pi_step_sync u_fl_sync (
    .src_clk(clk_ref), .src_rst_n(rst_ref_n), .src_req(fl_req), .src_dir(fl_dir),
    .dst_clk(clk_sys), .dst_rst_n(rst_sys_n), .pi(follower_pi)
  );

endmodule
