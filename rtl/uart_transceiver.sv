// uart_transceiver -- 8N1 UART receiver and transmitter (8 data bits, no
// parity, one stop bit, least significant bit first).
//
// Receiver: rx is first passed through a two-flop synchroniser.  In IDLE a low
// level starts the START state, which waits half a bit period and checks that
// the line is still low (a real start bit).  RECEIVE_DATA then samples the line
// once per bit period, in the middle of each bit, and stores the 8 bits.  STOP
// samples the middle of the stop bit; if it is high, rx_data is updated and
// rx_done pulses for one clock.  A low stop bit (framing error) drops the byte,
// and the receiver then waits in BREAK for the line to return high before it
// looks for the next start bit.
//
// Transmitter: when tx_send is high while the transmitter is idle, the byte on
// tx_data is framed as start bit, 8 data bits, stop bit and sent, 10 bit
// periods in all.  tx_busy is high from the clock after tx_send until the stop
// bit has ended.  Receiver and transmitter run independently (full duplex).
//
// Timing: one bit lasts CLKS_PER_BIT clocks.  The default 868 gives 115200 baud
// from a 100 MHz clock.  The frame format and baud rate follow the reference
// design; the 100 MHz clock, the synchroniser, the stop bit check and the
// separate receive and transmit state machines are this design's choices.
module uart_transceiver #(
  parameter int unsigned CLKS_PER_BIT = 868
) (
  input  logic       clk,
  input  logic       rst,       // asynchronous, active high
  // serial side
  input  logic       rx,
  output logic       tx,
  // receive side towards the controller
  output logic [7:0] rx_data,
  output logic       rx_done,   // one-clock pulse, rx_data valid
  // transmit side from the controller
  input  logic [7:0] tx_data,
  input  logic       tx_send,
  output logic       tx_busy
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);
  localparam logic [CW-1:0] FULL = CW'(CLKS_PER_BIT - 1);
  localparam logic [CW-1:0] HALF = CW'(CLKS_PER_BIT / 2);

  // ---------------------------------------------------------------- receiver
  typedef enum logic [2:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP, RX_BREAK} rx_state_e;

  rx_state_e       rx_state;
  logic [1:0]      rx_sync;
  logic [CW-1:0]   rx_cnt;
  logic [2:0]      rx_bit;
  logic [7:0]      rx_store;
  logic            rx_s;

  assign rx_s = rx_sync[1];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rx_sync  <= 2'b11;
      rx_state <= RX_IDLE;
      rx_cnt   <= '0;
      rx_bit   <= '0;
      rx_store <= '0;
      rx_data  <= '0;
      rx_done  <= 1'b0;
    end else begin
      rx_sync <= {rx_sync[0], rx};
      rx_done <= 1'b0;
      unique case (rx_state)
        RX_IDLE: begin
          rx_cnt <= '0;
          if (!rx_s) rx_state <= RX_START;
        end
        RX_START: begin
          if (rx_cnt == HALF) begin
            rx_cnt   <= '0;
            rx_bit   <= '0;
            rx_state <= rx_s ? RX_IDLE : RX_DATA;
          end else begin
            rx_cnt <= rx_cnt + 1'b1;
          end
        end
        RX_DATA: begin
          if (rx_cnt == FULL) begin
            rx_cnt   <= '0;
            rx_store <= {rx_s, rx_store[7:1]};
            rx_bit   <= rx_bit + 1'b1;
            if (rx_bit == 3'd7) rx_state <= RX_STOP;
          end else begin
            rx_cnt <= rx_cnt + 1'b1;
          end
        end
        RX_STOP: begin
          if (rx_cnt == FULL) begin
            rx_cnt   <= '0;
            if (rx_s) begin
              rx_data  <= rx_store;
              rx_done  <= 1'b1;
              rx_state <= RX_IDLE;
            end else begin
              rx_state <= RX_BREAK;
            end
          end else begin
            rx_cnt <= rx_cnt + 1'b1;
          end
        end
        RX_BREAK: begin
          if (rx_s) rx_state <= RX_IDLE;
        end
        default: rx_state <= RX_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------- transmitter
  logic [9:0]    tx_frame;
  logic [3:0]    tx_idx;
  logic [CW-1:0] tx_cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      tx_busy  <= 1'b0;
      tx_frame <= '1;
      tx_idx   <= '0;
      tx_cnt   <= '0;
      tx       <= 1'b1;
    end else if (!tx_busy) begin
      tx <= 1'b1;
      if (tx_send) begin
        tx_busy  <= 1'b1;
        tx_frame <= {1'b1, tx_data, 1'b0};
        tx_idx   <= '0;
        tx_cnt   <= '0;
        tx       <= 1'b0;          // start bit goes out immediately
      end
    end else begin
      if (tx_cnt == FULL) begin
        tx_cnt <= '0;
        if (tx_idx == 4'd9) begin  // stop bit finished: 10 bits sent
          tx_busy <= 1'b0;
          tx      <= 1'b1;
        end else begin
          tx_idx <= tx_idx + 1'b1;
          tx     <= tx_frame[tx_idx + 1'b1];
        end
      end else begin
        tx_cnt <= tx_cnt + 1'b1;
      end
    end
  end

endmodule
