// Data controller: source of the parallel words that the leader's MGT TX
// serialises on the downlink.
//
// The downlink exists to carry the system clock to the follower, so the
// payload only has to keep the follower's receiver locked and word-aligned.
// Every COMMA_PERIOD words the controller sends a comma word (K28.5 in the
// lowest byte, flagged as a control byte for the transceiver's 8b/10b
// encoder); all other words carry a free-running word counter, which gives
// the link transitions and lets the far end check the stream.
//
// Interface: tx_data/tx_charisk go to the transceiver's TXDATA/TXCTRL
// inputs; tx_is_comma marks comma words. Timing: one word per clk cycle,
// outputs registered; after en rises the first word is a comma. While en is
// low the controller sends comma words only.
//
// The paper names this block and shows it clocked by the system clock and
// feeding the PISO over a bus; the word format, the comma spacing and the
// counter payload are this design's choices.
module data_controller
  import mgt_sync_pkg::*;
#(
  parameter int unsigned DATA_W       = 32,   // transceiver user data width
  parameter int unsigned COMMA_PERIOD = 256   // words between commas
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  output logic [DATA_W-1:0]   tx_data,
  output logic [DATA_W/8-1:0] tx_charisk,
  output logic                tx_is_comma
);

  localparam int unsigned PW = $clog2(COMMA_PERIOD);

  logic [PW-1:0]     slot;     // position within the comma period
  logic [DATA_W-1:0] payload;  // running word counter

  initial begin
    assert (COMMA_PERIOD >= 2 && (COMMA_PERIOD & (COMMA_PERIOD - 1)) == 0)
      else $error("COMMA_PERIOD must be a power of two >= 2");
    assert (DATA_W % 8 == 0) else $error("DATA_W must be a whole number of bytes");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot        <= '0;
      payload     <= '0;
      tx_data     <= DATA_W'(K28_5);
      tx_charisk  <= (DATA_W/8)'(1);
      tx_is_comma <= 1'b1;
    end else if (!en) begin
      slot        <= '0;
      tx_data     <= DATA_W'(K28_5);
      tx_charisk  <= (DATA_W/8)'(1);
      tx_is_comma <= 1'b1;
    end else begin
      slot <= slot + 1'b1;
      if (slot == '0) begin
        tx_data     <= DATA_W'(K28_5);
        tx_charisk  <= (DATA_W/8)'(1);
        tx_is_comma <= 1'b1;
      end else begin
        payload     <= payload + 1'b1;
        tx_data     <= payload;
        tx_charisk  <= '0;
        tx_is_comma <= 1'b0;
      end
    end
  end

endmodule
