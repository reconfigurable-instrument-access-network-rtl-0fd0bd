// odu -- Output Discard Unit together with the output state machine.
//
// The main FSM marks with bit_valid each tdo bit that belongs to an instrument
// being read; every other bit leaving the network (SIB bits, configuration
// phase output, write and unselected segments) is never presented and so is
// discarded.  Kept bits are packed least significant bit first: the first kept
// bit becomes bit 0 of the first byte.  A full byte moves to a one-byte output
// register, which is handed to the UART transmitter (tx_send for one clock)
// as soon as the transmitter is idle.  While a full byte is waiting for the
// output register and that register is still occupied, stall is high and the
// main FSM holds the network, so no output bit is lost however slow the UART
// is.  Instrument lengths are whole bytes, so a group never leaves a partial
// byte behind.
//
// Timing: bit_valid is accepted in any clock where stall is low; tx_send is
// high in a clock where tx_busy is low and a byte is waiting.  pending is high
// while any kept output has not yet been handed to the transmitter.
//
// Discarding all but the useful bits and stalling the network while the UART
// sends follow the reference design; the accumulator plus output register
// arrangement is this design's choice.
module odu (
  input  logic       clk,
  input  logic       rst,       // asynchronous, active high
  input  logic       bit_valid,
  input  logic       bit_in,
  output logic       stall,
  output logic [7:0] tx_data,
  output logic       tx_send,
  input  logic       tx_busy,
  output logic       pending
);

  logic [7:0] acc;
  logic [2:0] cnt;
  logic       acc_full;
  logic [7:0] out_q;
  logic       out_valid;
  logic       move;

  assign tx_send = out_valid && !tx_busy;
  assign tx_data = out_q;
  // the accumulator can move into the output register when that register is
  // empty or is being sent in this clock
  assign move    = acc_full && (!out_valid || tx_send);
  assign stall   = acc_full && !move;
  assign pending = acc_full || out_valid || (cnt != 3'd0);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      acc       <= '0;
      cnt       <= '0;
      acc_full  <= 1'b0;
      out_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      if (move) begin
        out_q     <= acc;
        out_valid <= 1'b1;
      end else if (tx_send) begin
        out_valid <= 1'b0;
      end

      if (move) acc_full <= 1'b0;

      if (bit_valid && !stall) begin
        acc <= {bit_in, acc[7:1]};
        cnt <= cnt + 1'b1;
        if (cnt == 3'd7) acc_full <= 1'b1;
      end
    end
  end

  // The main FSM must not offer a bit while the unit stalls.
  a_no_bit_in_stall: assert property (@(posedge clk) disable iff (rst)
    stall |-> !bit_valid);

endmodule
