// Dual-mixer time-difference (DDMTD) phase detector with three inputs:
// the leader's system clock, the TX clock TXOUTCLKPCS and the loop-back
// clock RXOUTCLKPCS. It holds both measurements of the paper, DDMTD(TX)
// and DDMTD(Loop), sharing one reference clock and one system-clock
// channel.
//
// How it works. Every input clock is sampled as data by clk_ref, a clock
// whose frequency is slightly lower than the system clock, so that
// f_sys = f_ref * (N + 1) / N. Each sampled clock becomes a square "beat"
// wave with a period of N reference cycles, and a delay d between two
// input clocks appears as a delay of d * N / T_sys reference cycles between
// their beats: the time difference is magnified N times. The sampled bits
// pass a two-flop synchroniser and a deglitcher (ddmtd_deglitch). A
// free-running counter of clk_ref cycles is captured ("tagged") at each
// rising beat edge. The phase of a channel is its tag minus the tag of the
// latest system-clock beat edge, in reference cycles; one count is T_sys/N.
// The beat period N itself is measured between successive system-clock
// beat edges.
//
// Interface (all outputs in the clk_ref domain, registered):
//   tx_phase/tx_valid     phase of TXOUTCLKPCS against the system clock
//   loop_phase/loop_valid phase of RXOUTCLKPCS against the system clock
//   period/period_valid   beat period N in reference cycles
// A phase is in [0, N) as long as N is steady; a channel whose beat edge
// comes just before the system-clock edge reads close to N, and the
// consumer (delay_calc) unwraps that. beat shows the three filtered beat
// waves, for observation. No result is given before the first
// system-clock beat edge. Timing: one result per channel per beat period,
// latency 2 (synchroniser) + THRESH (deglitcher) + 1 reference cycles after
// the beat transition, equal for every channel.
//
// The paper gives the method and what each measurement compares; sampling,
// deglitching and tagging are the usual way to build it and are this
// design's own choices.
module ddmtd #(
  parameter int unsigned CNT_W  = 16,  // tag counter width, N < 2**CNT_W
  parameter int unsigned THRESH = 16   // deglitcher threshold (samples)
) (
  input  logic             clk_ref,
  input  logic             rst_n,
  // clocks under measurement, used only as data sampled by clk_ref
  input  logic             sys_clk_in,
  input  logic             tx_clk_in,
  input  logic             loop_clk_in,
  output logic [CNT_W-1:0] tx_phase,
  output logic             tx_valid,
  output logic [CNT_W-1:0] loop_phase,
  output logic             loop_valid,
  output logic [CNT_W-1:0] period,
  output logic             period_valid,
  output logic [2:0]       beat         // filtered beats: {loop, tx, sys}
);

  // Sampling flop followed by one synchroniser flop, per channel:
  // [0] system clock, [1] TX clock, [2] loop clock.
  logic [2:0] samp, sync;
  logic [2:0] rise;

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      samp <= '0;
      sync <= '0;
    end else begin
      samp <= {loop_clk_in, tx_clk_in, sys_clk_in};
      sync <= samp;
    end
  end

  for (genvar c = 0; c < 3; c++) begin : g_deglitch
    ddmtd_deglitch #(.THRESH(THRESH)) u_dg (
      .clk  (clk_ref),
      .rst_n(rst_n),
      .d    (sync[c]),
      .q    (beat[c]),
      .rise (rise[c])
    );
  end

  logic [CNT_W-1:0] tcnt;     // free-running time base
  logic [CNT_W-1:0] sys_tag;  // time of the latest system-clock beat edge
  logic             sys_seen; // a system-clock beat edge has been tagged

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      tcnt         <= '0;
      sys_tag      <= '0;
      sys_seen     <= 1'b0;
      tx_phase     <= '0;
      tx_valid     <= 1'b0;
      loop_phase   <= '0;
      loop_valid   <= 1'b0;
      period       <= '0;
      period_valid <= 1'b0;
    end else begin
      tcnt         <= tcnt + 1'b1;
      tx_valid     <= 1'b0;
      loop_valid   <= 1'b0;
      period_valid <= 1'b0;
      if (rise[0]) begin
        sys_tag  <= tcnt;
        sys_seen <= 1'b1;
        if (sys_seen) begin
          period       <= tcnt - sys_tag;
          period_valid <= 1'b1;
        end
      end
      // An edge on the same cycle as the system-clock edge has phase 0.
      if (rise[1] && (sys_seen || rise[0])) begin
        tx_phase <= rise[0] ? '0 : tcnt - sys_tag;
        tx_valid <= 1'b1;
      end
      if (rise[2] && (sys_seen || rise[0])) begin
        loop_phase <= rise[0] ? '0 : tcnt - sys_tag;
        loop_valid <= 1'b1;
      end
    end
  end

endmodule
