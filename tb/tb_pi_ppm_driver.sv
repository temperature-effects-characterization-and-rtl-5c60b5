// Self-checking testbench for pi_ppm_driver.
// For several rates the number of steps over a window must equal the
// number of accumulator carries, floor((k * rate) / 2**ACC_W), counted
// independently; every step must retard by the requested step size, the
// gap between steps must never exceed ceil(2**ACC_W / rate), and nothing
// may step while disabled.
`timescale 1ns/1ps
module tb_pi_ppm_driver;
  import mgt_sync_pkg::*;

  localparam int unsigned ACC_W = 8;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [ACC_W:0] rate_inc = '0;
  logic [3:0]     step_codes = 4'd3;
  pi_ctrl_t       pi;
  int checks = 0, failures = 0;

  pi_ppm_driver #(.ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic run_rate(input int unsigned rate, input int unsigned cycles);
    int unsigned steps = 0, gap = 0, maxgap = 0, expect_steps, bound;
    longint unsigned acc_m = 0;
    @(posedge clk);
    rst_n <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1; rate_inc <= (ACC_W+1)'(rate); en <= 1'b1;
    // The output follows the accumulator by one register stage.
    @(posedge clk);
    for (int k = 0; k < cycles; k++) begin
      @(posedge clk); #1;
      gap++;
      if (pi.ppm_en) begin
        steps++;
        if (gap > maxgap && steps > 1) maxgap = gap;
        gap = 0;
        checks++;
        if (pi.stepsize != {PI_DIR_RETARD, step_codes} || !pi.ovrd_en || pi.pd) begin
          failures++; $display("FAIL step fields %b", pi.stepsize);
        end
      end
    end
    expect_steps = ((rate > (1 << ACC_W) ? (1 << ACC_W) : rate) * cycles) >> ACC_W;
    checks++;
    if (steps != expect_steps) begin
      failures++; $display("FAIL rate %0d: %0d steps, expected %0d", rate, steps, expect_steps);
    end
    if (rate != 0) begin
      bound = ((1 << ACC_W) + rate - 1) / rate;
      checks++;
      if (maxgap > bound) begin failures++; $display("FAIL gap %0d > %0d", maxgap, bound); end
    end
    en <= 1'b0;
  endtask

  initial begin
    run_rate(256, 100);   // one step per cycle
    run_rate(64, 400);    // every 4th cycle
    run_rate(3, 2560);    // 30 steps, uneven spacing
    run_rate(500, 50);    // above full rate: limited to one per cycle
    // disabled: no steps
    rst_n <= 1'b0; @(posedge clk); rst_n <= 1'b1; rate_inc <= 9'd200; en <= 1'b0;
    repeat (50) begin
      @(posedge clk); #1;
      checks++;
      if (pi.ppm_en) begin failures++; $display("FAIL step while disabled"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
