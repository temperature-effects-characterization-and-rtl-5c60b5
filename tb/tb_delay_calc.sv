// Self-checking testbench for delay_calc.
// The testbench draws "true" continuous phases (integers that drift and may
// cross a multiple of the beat period P) for the TX and loop channels,
// hands the unit only their values modulo P, and checks every published
// set against sums of the true values: the TX and loop results must be the
// window sums shifted by the multiple of P that puts the channel's first
// sample in [0, P), and the RX result their difference. A clear in the
// middle must re-fix the reference.
`timescale 1ns/1ps
module tb_delay_calc;

  localparam int unsigned CNT_W = 16;
  localparam int unsigned AVG   = 2;
  localparam int unsigned NS    = 1 << AVG;
  localparam int unsigned DLY_W = CNT_W + AVG + 2;
  localparam int P = 1000;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [CNT_W-1:0] tx_phase = '0, loop_phase = '0, period_in = '0;
  logic tx_valid = 1'b0, loop_valid = 1'b0, period_valid = 1'b0;
  logic signed [DLY_W-1:0] tx_delay, loop_delay, rx_delay;
  logic [CNT_W-1:0] period;
  logic meas_valid;
  int checks = 0, failures = 0;

  delay_calc #(.CNT_W(CNT_W), .AVG_LOG2(AVG)) dut (.*);

  always #5 clk = ~clk;

  function automatic int pmod(input int v);
    int m;
    m = v % P;
    return m < 0 ? m + P : m;
  endfunction

  // expected results queue
  int exp_tx[$], exp_loop[$];
  int n_sets = 0;

  always @(negedge clk) begin
    if (meas_valid) begin
      int et, el;
      n_sets++;
      checks += 3;
      if (exp_tx.size() == 0 || exp_loop.size() == 0) begin
        failures++; $display("FAIL unexpected result");
      end else begin
        et = exp_tx.pop_front();
        el = exp_loop.pop_front();
        if (tx_delay != DLY_W'(et)) begin failures++; $display("FAIL tx %0d exp %0d", tx_delay, et); end
        if (loop_delay != DLY_W'(el)) begin failures++; $display("FAIL loop %0d exp %0d", loop_delay, el); end
        if (rx_delay != DLY_W'(el - et)) begin failures++; $display("FAIL rx %0d exp %0d", rx_delay, el - et); end
      end
    end
  end

  // Feed windows. base_* are the true values; shift_* fixed per reference.
  task automatic run(input int windows, input int base_tx, input int base_loop, input int drift);
    int vt, vl, st, sl, shift_t, shift_l;
    int at[NS], al[NS];
    for (int w = 0; w < windows; w++) begin
      st = 0; sl = 0;
      for (int i = 0; i < int'(NS); i++) begin
        vt = base_tx + drift * (w * int'(NS) + i) + $urandom_range(0, 6) - 3;
        vl = base_loop - drift * (w * int'(NS) + i) + $urandom_range(0, 6) - 3;
        if (w == 0 && i == 0) begin
          shift_t = vt - pmod(vt);
          shift_l = vl - pmod(vl);
        end
        st += vt - shift_t;
        sl += vl - shift_l;
        at[i] = vt; al[i] = vl;
      end
      exp_tx.push_back(st);
      exp_loop.push_back(sl);
      for (int i = 0; i < int'(NS); i++) begin
        // TX and loop samples arrive on different cycles, sometimes the same
        @(posedge clk);
        tx_phase <= CNT_W'(pmod(at[i])); tx_valid <= 1'b1;
        if (i % 2 == 0) begin loop_phase <= CNT_W'(pmod(al[i])); loop_valid <= 1'b1; end
        @(posedge clk);
        tx_valid <= 1'b0; loop_valid <= 1'b0;
        if (i % 2 == 1) begin loop_phase <= CNT_W'(pmod(al[i])); loop_valid <= 1'b1; end
        @(posedge clk);
        loop_valid <= 1'b0;
        repeat (3) @(posedge clk);
      end
    end
    repeat (5) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // a phase before the period is known is ignored
    @(posedge clk); tx_phase <= 16'd5; tx_valid <= 1'b1; loop_valid <= 1'b1;
    @(posedge clk); tx_valid <= 1'b0; loop_valid <= 1'b0;
    @(posedge clk); period_in <= CNT_W'(P); period_valid <= 1'b1;
    @(posedge clk); period_valid <= 1'b0;
    run(4, 994, 305, 1);        // TX crosses P upwards, loop falls
    @(posedge clk); clear <= 1'b1;
    @(posedge clk); clear <= 1'b0;
    run(3, 5200, 2, -1);        // new reference; loop wraps near 0
    checks++;
    if (n_sets != 7 || exp_tx.size() != 0) begin
      failures++; $display("FAIL %0d sets published, %0d pending", n_sets, exp_tx.size());
    end
    checks++;
    if (period != CNT_W'(P)) begin failures++; $display("FAIL period"); end
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
