// End-to-end testbench of mgt_sync_leader at its default parameters.
//
// The leader logic runs against link_model (oscillator, transceivers,
// follower). The testbench
//   1. starts the link: data words, reference-clock PI rotation at one
//      PI code per system-clock cycle (beat period N = 40 * 64 = 2560);
//   2. characterises without compensation: sweeps the leader temperature
//      from 35 to 80 degC, letting the oscillator drift by -0.5 ppm/degC
//      (22.5 ppm in all); the beat period, and so the resolution, must stay
//      within the +/-3 cycles that jitter causes (a free-running reference 2.44 ps/cycle away would see N
//      change by about 6 %); and checks that the measured TX, RX and loop
//      drifts, converted to ps with T/N per count, match the model's
//      1.42, 0.59 and 2.01 ps/degC: end-to-end drift within 4 ps and
//      least-squares slopes within 0.1 ps/degC;
//   3. compensates: back at 35 degC, clears the measurement, enables both
//      compensators and sweeps 35 -> 80 -> 35 degC, checking that the
//      model's true TX and loop delays stay within 8 ps of their starting
//      values (against 64 ps and 90 ps uncompensated);
//   4. checks that the data controller sent commas and counter words.
// Every mechanism is counted: comma words, data words, reference PI steps,
// measurement sets, leader and follower steps in both directions, beat
// period readings; a mechanism that never happened is a failure.
`timescale 1ps/1fs
module tb_mgt_sync_leader;
  import mgt_sync_pkg::*;

  localparam int unsigned CNT_W = 16;
  localparam int unsigned AVG   = 4;
  localparam int unsigned DLY_W = CNT_W + AVG + 2;
  localparam int unsigned POS_W = 12;
  localparam real T_PS = 6250.0;

  real temp_c = 35.0;
  real sys_ppm = 0.0;
  logic clk_sys, clk_ref, txoutclkpcs, rxoutclkpcs;
  real true_tx_ps, true_loop_ps;
  int ref_steps, leader_steps, follower_steps;

  logic arst_n = 1'b0;
  logic cfg_data_en = 1'b0, cfg_ref_en = 1'b0;
  logic [16:0] cfg_ref_rate = 17'h10000;
  logic [3:0]  cfg_ref_step = 4'd1;
  logic cfg_comp_leader_en = 1'b0, cfg_comp_follower_en = 1'b0;
  logic [DLY_W-2:0] cfg_deadband = (DLY_W-1)'(12);
  logic cfg_meas_clear = 1'b0;
  logic [31:0] tx_data;
  logic [3:0]  tx_charisk;
  logic        tx_is_comma;
  pi_ctrl_t    ch1_pi, ch2_pi, follower_pi;
  logic signed [DLY_W-1:0] tx_delay, loop_delay, rx_delay;
  logic [CNT_W-1:0] beat_period;
  logic meas_valid;
  logic [2:0] ddmtd_beat;
  logic signed [POS_W-1:0] leader_pi_pos, follower_pi_pos;
  logic signed [DLY_W:0] leader_error, follower_error;

  int checks = 0, failures = 0;

  link_model u_link (.*);
  mgt_sync_leader dut (.*);

  // ------------------------------------------------------------ counters
  int n_comma = 0, n_data = 0, n_meas = 0;
  int n_ld_adv = 0, n_ld_ret = 0, n_fl_adv = 0, n_fl_ret = 0;
  // Counting starts at reset release: before reset the flops hold random
  // values and may pulse their outputs.
  int ld0, fl0;
  bit track_n = 0;
  always @(posedge clk_sys) begin
    if (arst_n && cfg_data_en) begin
      if (tx_is_comma) n_comma++; else n_data++;
    end
    if (arst_n && ch1_pi.ppm_en) begin
      if (ch1_pi.stepsize[4] == PI_DIR_ADVANCE) n_ld_adv++; else n_ld_ret++;
    end
    if (arst_n && follower_pi.ppm_en) begin
      if (follower_pi.stepsize[4] == PI_DIR_ADVANCE) n_fl_adv++; else n_fl_ret++;
    end
  end

  // beat period range seen at measurement sets
  int min_n = 1 << 30, max_n = 0;

  // latest measurement, in ps
  real m_tx, m_loop, m_rx;
  always @(posedge clk_ref) begin
    if (meas_valid && arst_n) begin
      real cnt_ps;
      n_meas++;
      cnt_ps = T_PS / real'(beat_period) / real'(1 << AVG);
      m_tx   = real'(tx_delay) * cnt_ps;
      m_loop = real'(loop_delay) * cnt_ps;
      m_rx   = real'(rx_delay) * cnt_ps;
      if (track_n && int'(beat_period) < min_n) min_n = int'(beat_period);
      if (track_n && int'(beat_period) > max_n) max_n = int'(beat_period);
    end
  end

  task automatic wait_meas(input int n);
    int target;
    target = n_meas + n;
    while (n_meas < target) @(posedge clk_ref);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  real tx0, loop0, rx0, ttx0, tloop0, max_tx, max_loop;

  // least-squares line through (temperature, measured delay)
  real sx = 0, sxx = 0, sy_tx = 0, sxy_tx = 0, sy_rx = 0, sxy_rx = 0, sy_lp = 0, sxy_lp = 0;
  int  nfit = 0;
  task automatic fit_add(input real t);
    nfit++; sx += t; sxx += t * t;
    sy_tx += m_tx;   sxy_tx += t * m_tx;
    sy_rx += m_rx;   sxy_rx += t * m_rx;
    sy_lp += m_loop; sxy_lp += t * m_loop;
  endtask
  function automatic real slope(input real sy, input real sxy);
    return (nfit * sxy - sx * sy) / (nfit * sxx - sx * sx);
  endfunction

  initial begin
    #100000 arst_n = 1'b1;
    ld0 = leader_steps; fl0 = follower_steps;
    #50000;
    cfg_data_en = 1'b1;
    cfg_ref_en  = 1'b1;
    wait_meas(3);
    check(beat_period >= 16'd2557 && beat_period <= 16'd2563, $sformatf("beat period %0d, expected 2560 +/- 3", beat_period));

    // ---------------------------------------------- 2. characterisation
    temp_c = 35.0;
    wait_meas(2);
    track_n = 1;
    tx0 = m_tx; loop0 = m_loop; rx0 = m_rx;
    fit_add(35.0);
    for (int t = 40; t <= 80; t += 5) begin
      temp_c = real'(t);
      sys_ppm = -0.5 * (temp_c - 35.0);
      wait_meas(2);
      fit_add(temp_c);
    end
    $display("oscillator drift 0 to %0.1f ppm: beat period %0d..%0d", sys_ppm, min_n, max_n);
    track_n = 0;
    check(min_n >= 2557 && max_n <= 2563, "beat period constant while the oscillator drifts");
    check(sys_ppm < -20.0, "oscillator drift applied");
    $display("fitted coefficients: TX %0.3f, RX %0.3f, loop %0.3f ps/degC",
             slope(sy_tx, sxy_tx), slope(sy_rx, sxy_rx), slope(sy_lp, sxy_lp));
    check(slope(sy_tx, sxy_tx) > 1.32 && slope(sy_tx, sxy_tx) < 1.52, "TX coefficient");
    check(slope(sy_rx, sxy_rx) > 0.49 && slope(sy_rx, sxy_rx) < 0.69, "RX coefficient");
    check(slope(sy_lp, sxy_lp) > 1.91 && slope(sy_lp, sxy_lp) < 2.11, "loop coefficient");
    $display("uncompensated drift 35->80 degC: TX %0.1f ps, RX %0.1f ps, loop %0.1f ps",
             m_tx - tx0, m_rx - rx0, m_loop - loop0);
    check((m_tx - tx0) > 1.42 * 45.0 - 4.0 && (m_tx - tx0) < 1.42 * 45.0 + 4.0, "TX drift");
    check((m_rx - rx0) > 0.59 * 45.0 - 4.0 && (m_rx - rx0) < 0.59 * 45.0 + 4.0, "RX drift");
    check((m_loop - loop0) > 2.01 * 45.0 - 4.0 && (m_loop - loop0) < 2.01 * 45.0 + 4.0, "loop drift");
    check(leader_steps == ld0 && follower_steps == fl0, "no PI steps while compensation is off");

    // ------------------------------------------------- 3. compensation
    temp_c = 35.0;
    sys_ppm = 0.0;
    wait_meas(1);
    @(posedge clk_ref) cfg_meas_clear <= 1'b1;
    @(posedge clk_ref) cfg_meas_clear <= 1'b0;
    wait_meas(1);
    cfg_comp_leader_en = 1'b1;
    cfg_comp_follower_en = 1'b1;
    wait_meas(2);
    ttx0 = true_tx_ps; tloop0 = true_loop_ps;
    max_tx = 0.0; max_loop = 0.0;
    for (int i = 1; i <= 36; i++) begin
      temp_c = (i <= 18) ? 35.0 + 2.5 * i : 80.0 - 2.5 * (i - 18);
      wait_meas(4);
      if (true_tx_ps - ttx0 > max_tx) max_tx = true_tx_ps - ttx0;
      if (ttx0 - true_tx_ps > max_tx) max_tx = ttx0 - true_tx_ps;
      if (true_loop_ps - tloop0 > max_loop) max_loop = true_loop_ps - tloop0;
      if (tloop0 - true_loop_ps > max_loop) max_loop = tloop0 - true_loop_ps;
    end
    $display("compensated 35->80->35 degC: max TX drift %0.1f ps, max loop drift %0.1f ps, leader PI %0d, follower PI %0d",
             max_tx, max_loop, leader_pi_pos, follower_pi_pos);
    check(max_tx < 8.0, $sformatf("compensated TX drift %0.1f ps", max_tx));
    check(max_loop < 8.0, $sformatf("compensated loop drift %0.1f ps", max_loop));
    // let a step requested by the last measurement cross to clk_sys
    repeat (10) @(posedge clk_sys);
    check(int'(leader_pi_pos) == n_ld_ret - n_ld_adv, "leader pi_pos equals net steps");
    check(int'(follower_pi_pos) == n_fl_ret - n_fl_adv, "follower pi_pos equals net steps");
    check(leader_steps - ld0 == n_ld_adv + n_ld_ret && follower_steps - fl0 == n_fl_adv + n_fl_ret, "steps reach the PIs");

    // ------------------------------------------------ 4. mechanisms seen
    check(n_comma > 0, "comma words sent");
    check(n_data > 0, "counter words sent");
    check(ref_steps > 0, "reference PI rotated");
    check(n_meas > 0, "measurement sets");
    check(n_ld_adv > 0, "leader advancing steps");
    check(n_ld_ret > 0, "leader retarding steps");
    check(n_fl_adv > 0, "follower advancing steps");
    check(n_fl_ret > 0, "follower retarding steps");
    $display("mechanisms: commas %0d, data words %0d, reference steps %0d, measurement sets %0d, leader steps %0d/%0d, follower steps %0d/%0d (advance/retard)",
             n_comma, n_data, ref_steps, n_meas, n_ld_adv, n_ld_ret, n_fl_adv, n_fl_ret);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: far beyond the ~220 measurement sets of 256 us each
  initial begin
    #120_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
