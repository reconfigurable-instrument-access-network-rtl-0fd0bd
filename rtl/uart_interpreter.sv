// uart_interpreter -- decodes the byte protocol that the host sends over the
// UART into work for the master controller.
//
// Protocol (see ijtag_pkg): a byte with bit 7 = 0 in IDLE starts a setup word
// (REC_ADDRESS waits for its low byte); UPDATE_ADDRESS then writes the command
// (00 = iRead, 01 = iWrite, bits 15:14) into the SCR entry named by bits 13:0.
// A byte with bit 7 = 1 starts the apply word; REC_BYTE waits for its low byte
// and READ_CHECK looks at the 15-bit data byte count.  control_ready is then
// raised and held until the main FSM starts the group (start_ack).  If the
// count is zero (only iReads) the interpreter returns to IDLE; otherwise
// REC_DATA passes that many following bytes to the main FSM as data, whatever
// their value, and then returns to IDLE.
//
// Data bytes are offered in a one-byte register: data_valid rises the clock
// after the byte arrives and falls on data_take.  A byte that arrives while
// the register is still full sets the sticky overrun flag (cleared by reset)
// and replaces the old byte.  Setup words received while control_ready is
// still waiting for the main FSM go into the SCR for the next group, so the
// host should not start the next group's setup words before the current
// group's returned bytes have arrived.
//
// Interface timing: rx_done is the receiver's one-clock byte strobe; scr_we is
// a one-clock write strobe.  The word layout and the state names follow the
// reference design; the data register, the overrun flag and the
// control_ready/start_ack handshake are this design's choices.
module uart_interpreter
  import ijtag_pkg::*;
(
  input  logic              clk,
  input  logic              rst,        // asynchronous, active high
  input  logic [7:0]        rx_data,
  input  logic              rx_done,
  // SCR write port
  output logic              scr_we,
  output logic [ADDR_W-1:0] scr_addr,
  output scr_mode_e         scr_mode,
  // main FSM
  output logic              control_ready,
  input  logic              start_ack,
  output logic              data_valid,
  output logic [7:0]        data_byte,
  input  logic              data_take,
  output logic              overrun
);

  typedef enum logic [2:0] {
    IDLE, REC_ADDRESS, UPDATE_ADDRESS, REC_BYTE, READ_CHECK, REC_DATA
  } state_e;

  state_e      state;
  logic [7:0]  hi_q;        // first byte of the current word
  logic [7:0]  lo_q;        // second byte of the current word
  logic [14:0] remaining;   // data bytes still expected in REC_DATA

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state         <= IDLE;
      hi_q          <= '0;
      lo_q          <= '0;
      remaining     <= '0;
      scr_we        <= 1'b0;
      scr_addr      <= '0;
      scr_mode      <= SCR_OFF;
      control_ready <= 1'b0;
      data_valid    <= 1'b0;
      data_byte     <= '0;
      overrun       <= 1'b0;
    end else begin
      scr_we <= 1'b0;
      if (start_ack) control_ready <= 1'b0;
      if (data_take) data_valid    <= 1'b0;

      unique case (state)
        IDLE: begin
          if (rx_done) begin
            hi_q  <= rx_data;
            state <= rx_data[7] ? REC_BYTE : REC_ADDRESS;
          end
        end
        REC_ADDRESS: begin
          if (rx_done) begin
            lo_q  <= rx_data;
            state <= UPDATE_ADDRESS;
          end
        end
        UPDATE_ADDRESS: begin
          scr_we   <= 1'b1;
          scr_addr <= {hi_q[5:0], lo_q};
          scr_mode <= (hi_q[7:6] == CMD_WRITE) ? SCR_WRITE :
                      (hi_q[7:6] == CMD_READ)  ? SCR_READ  : SCR_OFF;
          state    <= IDLE;
        end
        REC_BYTE: begin
          if (rx_done) begin
            lo_q  <= rx_data;
            state <= READ_CHECK;
          end
        end
        READ_CHECK: begin
          control_ready <= 1'b1;
          remaining     <= {hi_q[6:0], lo_q};
          state         <= ({hi_q[6:0], lo_q} == 15'd0) ? IDLE : REC_DATA;
        end
        REC_DATA: begin
          if (rx_done) begin
            data_byte  <= rx_data;
            data_valid <= 1'b1;
            if (data_valid && !data_take) overrun <= 1'b1;
            remaining  <= remaining - 1'b1;
            if (remaining == 15'd1) state <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
