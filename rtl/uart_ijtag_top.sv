// uart_ijtag_top -- IEEE 1687 instrument access network reached through a
// UART functional port instead of a dedicated JTAG TAP.
//
// Three parts, connected as in the full-featured reference design:
//   uart_transceiver  : 8N1 serial port (115200 baud at 100 MHz by default);
//   master_controller : interprets the host's setup/apply/data bytes, holds
//                       the SIB Control Register and the Instrument Length
//                       Memory, drives the network with shift/capture/update
//                       enables and a generated TDI sequence, and returns only
//                       the read instruments' bits (Output Discard Unit);
//   ijtag_network     : flat chain of NUM_INSTR SIBs, each hosting a scan
//                       register and an 8/16/32-bit inverter instrument.
//
// Ports: clk, rst (asynchronous, active high), rx and tx (serial line, idle
// high).  busy, fin and overrun are status outputs (fin pulses once per
// apply group).  sib_open shows which SIBs are open.
//
// NUM_INSTR defaults to 150, the largest network of the reference evaluation;
// elaboration stops with an error above the reference limit of 1000.  The
// clock frequency behind CLKS_PER_BIT = 868 (100 MHz) and the status outputs
// are this design's own.
module uart_ijtag_top #(
  parameter int unsigned NUM_INSTR    = 150,
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 rx,
  output logic                 tx,
  output logic                 busy,
  output logic                 fin,
  output logic                 overrun,
  output logic [NUM_INSTR-1:0] sib_open
);

  logic [7:0] rx_data, tx_data;
  logic       rx_done, tx_send, tx_busy;
  logic       tdi, tdo, shift_en, capture_en, update_en, sib_reset;

  // The reference network is specified for at most 1000 instruments.
  if (NUM_INSTR < 1 || NUM_INSTR > ijtag_pkg::MAX_INSTR) begin : g_size_check
    $error("uart_ijtag_top: NUM_INSTR must be between 1 and %0d", ijtag_pkg::MAX_INSTR);
  end

  uart_transceiver #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk     (clk),
    .rst     (rst),
    .rx      (rx),
    .tx      (tx),
    .rx_data (rx_data),
    .rx_done (rx_done),
    .tx_data (tx_data),
    .tx_send (tx_send),
    .tx_busy (tx_busy)
  );

  master_controller #(.NUM_INSTR(NUM_INSTR)) u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .rx_data    (rx_data),
    .rx_done    (rx_done),
    .tx_data    (tx_data),
    .tx_send    (tx_send),
    .tx_busy    (tx_busy),
    .tdi        (tdi),
    .tdo        (tdo),
    .shift_en   (shift_en),
    .capture_en (capture_en),
    .update_en  (update_en),
    .sib_reset  (sib_reset),
    .busy       (busy),
    .fin        (fin),
    .overrun    (overrun)
  );

  ijtag_network #(.NUM_INSTR(NUM_INSTR)) u_net (
    .clk        (clk),
    .rst        (rst),
    .tdi        (tdi),
    .tdo        (tdo),
    .shift_en   (shift_en),
    .capture_en (capture_en),
    .update_en  (update_en),
    .sib_reset  (sib_reset),
    .sib_open   (sib_open)
  );

endmodule
