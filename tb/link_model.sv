// Behavioural model (testbench only, not synthesizable) of everything
// around the leader's fabric logic: the system-clock oscillator, the
// transceivers of both nodes and the follower's loop-back.
//
// Clocks are produced edge by edge from absolute times, so delays can be
// fractions of a picosecond and can change while the model runs:
//   clk_sys       edges every T/2 * (1 + sys_ppm * 1e-6), T = 6250 ps
//                 (160 MHz); sys_ppm lets the oscillator drift
//   clk_ref       edge k at system edge k + phi_ref, where phi_ref grows by
//                 stepsize[3:0] * PI_PS for every retarding step the leader
//                 applies to the reference channel's PI (ch2_pi)
//   txoutclkpcs   system edge k delayed by the TX delay
//   rxoutclkpcs   system edge k delayed by the TX delay plus the RX delay
// with TX delay = 3644.53 + 1.42 * temp_c + leader PI shift and
// RX delay = 4159.29 + 0.59 * temp_c + follower PI shift (ps): the linear
// fits of the measured drifts. A PI step moves the phase by PI_PS =
// T / 40 / 64 ps per code (a 40-bit internal width, 1/64 UI per code);
// stepsize[4] = 1 retards (adds delay). Every edge gets up to +/-JIT_PS of
// uniform random jitter. PI bundles are sampled on clk_sys.
// true_tx_ps and true_loop_ps give the model's current delays for checks.
`timescale 1ps/1fs
module link_model
  import mgt_sync_pkg::*;
#(
  parameter real T_PS   = 6250.0,
  parameter real JIT_PS = 2.0
) (
  input  real      temp_c,
  input  real      sys_ppm,     // oscillator frequency error, ppm
  input  pi_ctrl_t ch1_pi,
  input  pi_ctrl_t ch2_pi,
  input  pi_ctrl_t follower_pi,
  output logic     clk_sys,
  output logic     clk_ref,
  output logic     txoutclkpcs,
  output logic     rxoutclkpcs,
  output real      true_tx_ps,
  output real      true_loop_ps,
  output int       ref_steps,
  output int       leader_steps,
  output int       follower_steps
);

  localparam real HALF  = T_PS / 2.0;
  localparam real PI_PS = T_PS / 40.0 / 64.0;

  real phi_ref = 0.0, sh_leader = 0.0, sh_follower = 0.0;

  initial begin
    clk_sys = 1'b0; clk_ref = 1'b0; txoutclkpcs = 1'b0; rxoutclkpcs = 1'b0;
    ref_steps = 0; leader_steps = 0; follower_steps = 0;
  end

  always_comb begin
    true_tx_ps   = 3644.53 + 1.42 * temp_c + sh_leader;
    true_loop_ps = true_tx_ps + 4159.29 + 0.59 * temp_c + sh_follower;
  end

  function automatic real jit();
    return JIT_PS * (real'($urandom_range(0, 1000)) / 500.0 - 1.0);
  endfunction

  function automatic real pi_shift(input pi_ctrl_t p);
    real s;
    s = real'(p.stepsize[3:0]) * PI_PS;
    return p.stepsize[4] == PI_DIR_RETARD ? s : -s;
  endfunction

  always @(posedge clk_sys) begin
    if (ch2_pi.ppm_en) begin phi_ref += pi_shift(ch2_pi); ref_steps++; end
    if (ch1_pi.ppm_en) begin sh_leader += pi_shift(ch1_pi); leader_steps++; end
    if (follower_pi.ppm_en) begin sh_follower += pi_shift(follower_pi); follower_steps++; end
  end

  // The oscillator sets every edge time; the other clocks take each system
  // edge time from a queue and add their own delay, so they follow any
  // frequency drift of the oscillator, as clocks derived from it by PLLs do.
  real q_ref[$], q_tx[$], q_loop[$];

  initial begin : g_sys
    real t = 0.0;
    forever begin
      t += HALF * (1.0 + sys_ppm * 1.0e-6);
      q_ref.push_back(t);
      q_tx.push_back(t);
      q_loop.push_back(t);
      #(t - $realtime);
      clk_sys = ~clk_sys;
    end
  end
  initial begin : g_ref
    real t;
    forever begin
      while (q_ref.size() == 0) @(clk_sys);
      t = q_ref.pop_front() + phi_ref + jit();
      if (t > $realtime) #(t - $realtime);
      clk_ref = ~clk_ref;
    end
  end
  initial begin : g_tx
    real t;
    forever begin
      while (q_tx.size() == 0) @(clk_sys);
      t = q_tx.pop_front() + true_tx_ps + jit();
      if (t > $realtime) #(t - $realtime);
      txoutclkpcs = ~txoutclkpcs;
    end
  end
  initial begin : g_loop
    real t;
    forever begin
      while (q_loop.size() == 0) @(clk_sys);
      t = q_loop.pop_front() + true_loop_ps + jit();
      if (t > $realtime) #(t - $realtime);
      rxoutclkpcs = ~rxoutclkpcs;
    end
  end

endmodule
