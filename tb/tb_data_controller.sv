// Self-checking testbench for data_controller.
// A reference model tracks the comma slot and the word counter; every word
// is compared, with the enable dropped once in the middle to check that the
// controller falls back to commas and restarts its period with a comma.
`timescale 1ns/1ps
module tb_data_controller;
  import mgt_sync_pkg::*;

  localparam int unsigned DATA_W = 32;
  localparam int unsigned CP     = 8;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [DATA_W-1:0]   tx_data;
  logic [DATA_W/8-1:0] tx_charisk;
  logic                tx_is_comma;
  int checks = 0, failures = 0;

  data_controller #(.DATA_W(DATA_W), .COMMA_PERIOD(CP)) dut (.*);

  always #5 clk = ~clk;

  // reference model state
  int unsigned slot_m = 0;
  logic [DATA_W-1:0] cnt_m = '0;
  logic exp_comma;
  logic [DATA_W-1:0] exp_data;
  int commas = 0;

  task automatic check_word(input logic comma, input logic [DATA_W-1:0] data);
    checks++;
    if (comma) begin
      if (!(tx_is_comma && tx_data == DATA_W'(K28_5) && tx_charisk == 4'b0001)) begin
        failures++;
        $display("FAIL comma expected: data=%h k=%b", tx_data, tx_charisk);
      end
    end else if (!(tx_is_comma == 1'b0 && tx_data == data && tx_charisk == 4'b0000)) begin
      failures++;
      $display("FAIL data expected %h got %h k=%b", data, tx_data, tx_charisk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check_word(1'b1, '0);               // idle: commas
    @(posedge clk); en <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 5 * CP + 3; i++) begin
      @(negedge clk);
      if (slot_m == 0) begin exp_comma = 1; commas++; end
      else begin exp_comma = 0; exp_data = cnt_m; cnt_m++; end
      check_word(exp_comma, exp_data);
      slot_m = (slot_m + 1) % CP;
    end
    @(posedge clk); en <= 1'b0;
    // the edge that samples en low still sees it high: one more word
    if (slot_m != 0) cnt_m++; else commas++;
    @(posedge clk);
    repeat (3) begin @(negedge clk); check_word(1'b1, '0); end
    @(posedge clk); en <= 1'b1; slot_m = 0;
    @(posedge clk);
    for (int i = 0; i < 2 * CP; i++) begin
      @(negedge clk);
      if (slot_m == 0) begin exp_comma = 1; commas++; end
      else begin exp_comma = 0; exp_data = cnt_m; cnt_m++; end
      check_word(exp_comma, exp_data);
      slot_m = (slot_m + 1) % CP;
    end
    checks++;
    if (commas != 8) begin failures++; $display("FAIL comma count %0d", commas); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
