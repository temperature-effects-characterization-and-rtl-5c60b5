// Self-checking testbench for ddmtd.
// The system clock (period T = 6250 ps), a delayed copy standing for
// TXOUTCLKPCS and another for the loop-back clock are sampled by a
// reference clock of period T * (N + 1) / N with N = 256 and a few ps of
// random jitter, so the beat waves glitch near their transitions. For a
// set of delays d the reported phases must equal d * N / T (mod N) within
// one count, and the beat period must be N within one count.
`timescale 1ps/1fs
module tb_ddmtd;

  localparam int unsigned CNT_W = 16;
  localparam int unsigned N     = 256;
  localparam real T      = 6250.0;
  localparam real HALF   = T / 2.0;
  localparam real HALF_R = T * (N + 1) / N / 2.0;

  logic clk_ref = 1'b0, rst_n = 1'b0;
  logic sys_clk_in = 1'b0, tx_clk_in = 1'b0, loop_clk_in = 1'b0;
  logic [CNT_W-1:0] tx_phase, loop_phase, period;
  logic tx_valid, loop_valid, period_valid;
  logic [2:0] beat;
  int checks = 0, failures = 0;
  real d_tx = 0.0, d_loop = 0.0;

  ddmtd #(.CNT_W(CNT_W), .THRESH(8)) dut (.*);

  // clock sources: edge k of a clock with delay d is at k*HALF + d
  initial begin : g_sys
    longint k = 0; real t;
    forever begin
      t = k * HALF;
      if (t > $realtime) #(t - $realtime);
      sys_clk_in = (k % 2 == 0);
      k++;
    end
  end
  initial begin : g_tx
    longint k = 0; real t;
    forever begin
      t = k * HALF + d_tx;
      if (t > $realtime) #(t - $realtime);
      tx_clk_in = (k % 2 == 0);
      k++;
    end
  end
  initial begin : g_loop
    longint k = 0; real t;
    forever begin
      t = k * HALF + d_loop;
      if (t > $realtime) #(t - $realtime);
      loop_clk_in = (k % 2 == 0);
      k++;
    end
  end
  initial begin : g_ref
    longint k = 1; real t;
    forever begin
      t = k * HALF_R + 0.5 * (real'($urandom_range(0, 8)) - 4.0);
      if (t > $realtime) #(t - $realtime);
      clk_ref = ~clk_ref;
      k++;
    end
  end

  // latest results
  int last_tx = -1, last_loop = -1, last_period = -1;
  int n_tx = 0;
  always @(posedge clk_ref) begin
    if (tx_valid) begin last_tx = int'(tx_phase); n_tx++; end
    if (loop_valid) last_loop = int'(loop_phase);
    if (period_valid) last_period = int'(period);
  end

  function automatic int wrap_err(input int got, input real exp_counts);
    real e;
    e = real'(got) - exp_counts;
    while (e > N / 2) e -= N;
    while (e < -(N / 2.0)) e += N;
    return (e > 1.5 || e < -1.5) ? 1 : 0;
  endfunction

  task automatic measure(input real dt, input real dl);
    real et, el;
    d_tx = dt; d_loop = dl;
    repeat (4 * N) @(posedge clk_ref);   // settle: several beats
    for (int r = 0; r < 3; r++) begin
      repeat (N) @(posedge clk_ref);
      et = dt * N / T;
      el = dl * N / T;
      checks += 3;
      if (wrap_err(last_tx, et) != 0) begin
        failures++; $display("FAIL tx d=%0.1f: phase %0d, expected %0.2f", dt, last_tx, et);
      end
      if (wrap_err(last_loop, el) != 0) begin
        failures++; $display("FAIL loop d=%0.1f: phase %0d, expected %0.2f", dl, last_loop, el);
      end
      if (last_period < int'(N) - 1 || last_period > int'(N) + 1) begin
        failures++; $display("FAIL period %0d, expected %0d", last_period, N);
      end
    end
  endtask

  initial begin
    #20000 rst_n = 1'b1;
    measure(0.0, 1000.0);
    measure(3690.0, 7870.0);   // leader TX delay and TX+RX delay of the link
    measure(1500.0, 6100.0);   // loop near one clock period: wraps
    measure(3720.0, 7900.0);
    checks++;
    if (n_tx < 20) begin failures++; $display("FAIL only %0d TX results", n_tx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
