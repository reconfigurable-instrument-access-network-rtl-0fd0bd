// master_controller -- the controller that sits between the UART and the
// IEEE 1687 network in place of a TAP controller.
//
// It wires together the command interpreter (UART bytes to SCR writes, apply
// requests and data bytes), the SIB Control Register, the Instrument Length
// Memory, the main 1687 state machine (network enables and TDI sequence) and
// the Output Discard Unit (returns only the bits of read instruments to the
// UART).  The main FSM copies the SCR and clears it when it starts a group;
// it does not start one before the ILM has finished initialising.
//
// Interface: rx_data/rx_done come from the UART receiver, tx_data/tx_send/
// tx_busy go to the UART transmitter; tdi, tdo, the three enables and sib_reset
// connect to the network.  busy is high while a group is being applied or returned bytes
// are still waiting for the transmitter; fin pulses once per finished group;
// overrun is the interpreter's sticky data overrun flag.
//
// The partition into these four components is the reference design's
// full-featured controller.
module master_controller
  import ijtag_pkg::*;
#(
  parameter int unsigned NUM_INSTR = 150
) (
  input  logic       clk,
  input  logic       rst,        // asynchronous, active high
  // UART
  input  logic [7:0] rx_data,
  input  logic       rx_done,
  output logic [7:0] tx_data,
  output logic       tx_send,
  input  logic       tx_busy,
  // 1687 network
  output logic       tdi,
  input  logic       tdo,
  output logic       shift_en,
  output logic       capture_en,
  output logic       update_en,
  output logic       sib_reset,
  // status
  output logic       busy,
  output logic       fin,
  output logic       overrun
);

  localparam int unsigned IW = (NUM_INSTR > 1) ? $clog2(NUM_INSTR) : 1;

  logic              scr_we, scr_clear;
  logic [ADDR_W-1:0] scr_addr;
  scr_mode_e         scr_mode;
  scr_mode_e         scr_modes [NUM_INSTR];
  logic              control_ready, start_ack;
  logic              data_valid, data_take;
  logic [7:0]        data_byte;
  logic [IW-1:0]     ilm_idx;
  logic [LEN_W-1:0]  ilm_len;
  logic              out_valid, out_bit, odu_stall, odu_pending, fsm_busy;
  logic              ilm_ready;

  uart_interpreter u_interp (
    .clk           (clk),
    .rst           (rst),
    .rx_data       (rx_data),
    .rx_done       (rx_done),
    .scr_we        (scr_we),
    .scr_addr      (scr_addr),
    .scr_mode      (scr_mode),
    .control_ready (control_ready),
    .start_ack     (start_ack),
    .data_valid    (data_valid),
    .data_byte     (data_byte),
    .data_take     (data_take),
    .overrun       (overrun)
  );

  sib_control_register #(.NUM_INSTR(NUM_INSTR)) u_scr (
    .clk   (clk),
    .rst   (rst),
    .we    (scr_we),
    .addr  (scr_addr),
    .mode  (scr_mode),
    .clear (scr_clear),
    .modes (scr_modes)
  );

  ilm #(.NUM_INSTR(NUM_INSTR)) u_ilm (
    .clk   (clk),
    .rst   (rst),
    .idx   (ilm_idx),
    .len   (ilm_len),
    .ready (ilm_ready)
  );

  fsm_1687 #(.NUM_INSTR(NUM_INSTR)) u_fsm (
    .clk           (clk),
    .rst           (rst),
    .control_ready (control_ready && ilm_ready),
    .scr_modes     (scr_modes),
    .scr_clear     (scr_clear),
    .data_valid    (data_valid),
    .data_byte     (data_byte),
    .data_take     (data_take),
    .ilm_idx       (ilm_idx),
    .ilm_len       (ilm_len),
    .tdi           (tdi),
    .tdo           (tdo),
    .shift_en      (shift_en),
    .capture_en    (capture_en),
    .update_en     (update_en),
    .sib_reset     (sib_reset),
    .out_valid     (out_valid),
    .out_bit       (out_bit),
    .odu_stall     (odu_stall),
    .busy          (fsm_busy),
    .fin           (fin)
  );

  assign start_ack = scr_clear;

  odu u_odu (
    .clk       (clk),
    .rst       (rst),
    .bit_valid (out_valid),
    .bit_in    (out_bit),
    .stall     (odu_stall),
    .tx_data   (tx_data),
    .tx_send   (tx_send),
    .tx_busy   (tx_busy),
    .pending   (odu_pending)
  );

  assign busy = fsm_busy || odu_pending || !ilm_ready;

endmodule
