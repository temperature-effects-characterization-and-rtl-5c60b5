// Self-checking testbench for pi_step_sync.
// Requests with random directions are issued in a 7 ns source domain; the
// 5 ns destination side must show exactly one ppm_en pulse per request, in
// order, with the requested direction and step size, within 5 destination
// cycles, and idle PI controls otherwise.
`timescale 1ns/1ps
module tb_pi_step_sync;
  import mgt_sync_pkg::*;

  logic src_clk = 1'b0, dst_clk = 1'b0, src_rst_n = 1'b0, dst_rst_n = 1'b0;
  logic src_req = 1'b0, src_dir = 1'b0;
  pi_ctrl_t pi;
  int checks = 0, failures = 0;

  pi_step_sync #(.STEP_CODES(2)) dut (.*);

  always #3.5 src_clk = ~src_clk;
  always #2.5 dst_clk = ~dst_clk;

  logic dirs[$];
  realtime req_t[$];
  int n_req = 0, n_step = 0;

  always @(posedge dst_clk) begin
    #0.1;
    if (pi.ppm_en) begin
      logic d; realtime t;
      n_step++;
      checks += 3;
      if (dirs.size() == 0) begin
        failures++; $display("FAIL step without request");
      end else begin
        d = dirs.pop_front();
        t = req_t.pop_front();
        if (pi.stepsize != {d, 4'd2}) begin failures++; $display("FAIL stepsize %b dir %b", pi.stepsize, d); end
        if ($realtime - t > 5 * 5.0 + 7.0) begin failures++; $display("FAIL latency %0t", $realtime - t); end
      end
      if (!pi.ovrd_en || !pi.sel || pi.pd) begin failures++; $display("FAIL control bits"); end
    end else if (pi != PI_CTRL_IDLE) begin
      failures++; $display("FAIL bundle not idle");
    end
  end

  initial begin
    #20 src_rst_n = 1'b1; dst_rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      @(posedge src_clk);
      src_req <= 1'b1; src_dir <= 1'($urandom_range(0, 1));
      #0.1;
      dirs.push_back(src_dir); req_t.push_back($realtime);
      n_req++;
      @(posedge src_clk);
      src_req <= 1'b0;
      repeat ($urandom_range(5, 12)) @(posedge src_clk);
    end
    repeat (10) @(posedge src_clk);
    checks++;
    if (n_step != n_req) begin failures++; $display("FAIL %0d steps for %0d requests", n_step, n_req); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
