// Self-checking testbench for pi_compensator.
// A plant in the testbench turns a drifting "true" delay plus the PI
// correction (one step = STEP units, applied when a step is requested)
// into measurements. Each measurement is also fed to an independent
// reference of the control rule (baseline on the first measurement after
// enable, step against |error| > deadband, SETTLE measurements skipped
// after a step); the step request, its direction, pi_pos and error must
// match it. The drift goes up and then down so both directions are used,
// and the corrected delay must stay within the deadband plus one step of
// the baseline.
`timescale 1ns/1ps
module tb_pi_compensator;
  import mgt_sync_pkg::*;

  localparam int unsigned DLY_W  = 22;
  localparam int unsigned POS_W  = 12;
  localparam int unsigned SETTLE = 2;
  localparam int STEP = 16;    // plant: delay units per PI step
  localparam int DB   = 12;    // deadband

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [DLY_W-1:0] delay = '0;
  logic delay_valid = 1'b0;
  logic [DLY_W-2:0] deadband = (DLY_W-1)'(DB);
  logic step_req, step_dir;
  logic signed [POS_W-1:0] pi_pos;
  logic signed [DLY_W:0] error;
  int checks = 0, failures = 0;

  pi_compensator #(.DLY_W(DLY_W), .POS_W(POS_W), .SETTLE(SETTLE)) dut (.*);

  always #5 clk = ~clk;

  int plant_pos = 0;          // steps applied to the plant
  int n_adv = 0, n_ret = 0;

  // reference model of the rule
  int m_base = 0, m_skip = 0, m_pos = 0;
  bit m_ok = 0;

  task automatic measure(input int true_delay, input bit expect_track);
    int meas, err;
    bit exp_req, exp_dir;
    meas = true_delay - plant_pos * STEP;
    @(posedge clk);
    delay <= DLY_W'(meas); delay_valid <= 1'b1;
    @(posedge clk);
    delay_valid <= 1'b0;
    // reference
    exp_req = 0; exp_dir = 0; err = 0;
    if (en) begin
      if (!m_ok) begin m_base = meas; m_ok = 1; end
      else begin
        err = meas - m_base;
        if (m_skip > 0) m_skip--;
        else if (err > DB) begin exp_req = 1; exp_dir = PI_DIR_ADVANCE; m_pos--; m_skip = SETTLE; end
        else if (err < -DB) begin exp_req = 1; exp_dir = PI_DIR_RETARD; m_pos++; m_skip = SETTLE; end
      end
    end
    #1;
    checks += 3;
    if (step_req != exp_req || (exp_req && step_dir != exp_dir)) begin
      failures++; $display("FAIL meas %0d: req %b dir %b, expected %b %b", meas, step_req, step_dir, exp_req, exp_dir);
    end
    if (int'(pi_pos) != m_pos) begin failures++; $display("FAIL pi_pos %0d exp %0d", pi_pos, m_pos); end
    if (en && m_ok && int'(error) != err) begin failures++; $display("FAIL error %0d exp %0d", error, err); end
    if (step_req) begin
      // the plant: advancing removes delay, retarding adds it
      if (step_dir == PI_DIR_ADVANCE) begin plant_pos++; n_adv++; end
      else begin plant_pos--; n_ret++; end
    end
    if (expect_track) begin
      checks++;
      if (meas - m_base > DB + STEP + 8 || meas - m_base < -(DB + STEP + 8)) begin
        failures++; $display("FAIL not tracking: error %0d", meas - m_base);
      end
    end
    repeat (4) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // disabled: no steps whatever the delay
    for (int i = 0; i < 5; i++) measure(1000 + 100 * i, 0);
    @(posedge clk); en <= 1'b1;
    // rising drift: 2 units per measurement
    for (int i = 0; i < 150; i++) measure(3000 + 2 * i, 1);
    // falling drift
    for (int i = 0; i < 150; i++) measure(3300 - 2 * i, 1);
    // disable and re-enable: new baseline
    @(posedge clk); en <= 1'b0; m_ok = 0; m_skip = 0;
    measure(9999, 0);
    @(posedge clk); en <= 1'b1;
    for (int i = 0; i < 20; i++) measure(5000 + 3 * i, 1);
    checks += 2;
    if (n_adv < 10) begin failures++; $display("FAIL only %0d advancing steps", n_adv); end
    if (n_ret < 10) begin failures++; $display("FAIL only %0d retarding steps", n_ret); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
