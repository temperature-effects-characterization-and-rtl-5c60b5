// Delay calculator: turns the raw DDMTD phases into the three delays of the
// characterisation, the TX delay, the loop delay and the RX delay.
//
// Following the paper's measurement steps, the TX delay is the phase of
// TXOUTCLKPCS against the system clock, the loop delay is the phase of the
// loop-back clock RXOUTCLKPCS against the system clock, and the RX delay is
// the loop delay minus the TX delay. Each channel is averaged over
// 2**AVG_LOG2 beat periods by a phase_avg (which also unwraps it); when
// both channels have produced a fresh average the three delays are output
// together.
//
// Interface: inputs straight from ddmtd. Outputs are signed fixed-point
// numbers in DDMTD counts (one count = T_sys / N) with AVG_LOG2 fraction
// bits; they are continuous (unwrapped) rather than reduced modulo the
// clock period, so only their changes are physically meaningful beyond one
// clock period. meas_valid strobes for one cycle with each new set.
// Timing: one set per 2**AVG_LOG2 beat periods. clear restarts the
// averaging and re-fixes the unwrapping references.
//
// The subtraction is the paper's; averaging, unwrapping and the number
// format are this design's choices.
module delay_calc #(
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned AVG_LOG2 = 4,
  localparam int unsigned DLY_W   = CNT_W + AVG_LOG2 + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic [CNT_W-1:0]        tx_phase,
  input  logic                    tx_valid,
  input  logic [CNT_W-1:0]        loop_phase,
  input  logic                    loop_valid,
  input  logic [CNT_W-1:0]        period_in,
  input  logic                    period_valid,
  output logic signed [DLY_W-1:0] tx_delay,
  output logic signed [DLY_W-1:0] loop_delay,
  output logic signed [DLY_W-1:0] rx_delay,
  output logic [CNT_W-1:0]        period,
  output logic                    meas_valid
);

  logic                    period_ok;
  logic signed [DLY_W-1:0] tx_avg, loop_avg;
  logic                    tx_done, loop_done;
  logic                    tx_new, loop_new;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      period    <= '0;
      period_ok <= 1'b0;
    end else if (period_valid) begin
      period    <= period_in;
      period_ok <= 1'b1;
    end
  end

  phase_avg #(.CNT_W(CNT_W), .AVG_LOG2(AVG_LOG2)) u_tx_avg (
    .clk, .rst_n, .clear,
    .phase(tx_phase), .valid(tx_valid),
    .period, .period_ok,
    .avg(tx_avg), .done(tx_done)
  );

  phase_avg #(.CNT_W(CNT_W), .AVG_LOG2(AVG_LOG2)) u_loop_avg (
    .clk, .rst_n, .clear,
    .phase(loop_phase), .valid(loop_valid),
    .period, .period_ok,
    .avg(loop_avg), .done(loop_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_new     <= 1'b0;
      loop_new   <= 1'b0;
      tx_delay   <= '0;
      loop_delay <= '0;
      rx_delay   <= '0;
      meas_valid <= 1'b0;
    end else begin
      meas_valid <= 1'b0;
      if (clear) begin
        tx_new   <= 1'b0;
        loop_new <= 1'b0;
      end else if ((tx_new || tx_done) && (loop_new || loop_done)) begin
        // Both channels fresh: publish the set.
        tx_delay   <= tx_done ? tx_avg : tx_delay;
        loop_delay <= loop_done ? loop_avg : loop_delay;
        rx_delay   <= (loop_done ? loop_avg : loop_delay)
                      - (tx_done ? tx_avg : tx_delay);
        meas_valid <= 1'b1;
        tx_new     <= 1'b0;
        loop_new   <= 1'b0;
      end else begin
        if (tx_done) begin
          tx_delay <= tx_avg;
          tx_new   <= 1'b1;
        end
        if (loop_done) begin
          loop_delay <= loop_avg;
          loop_new   <= 1'b1;
        end
      end
    end
  end

endmodule
