// ilm -- Instrument Length Memory.
//
// Holds the data length, in bits, of the instrument at every position of the
// network, so that the host does not have to send it with each access.  The
// memory is an array of NUM_INSTR words with one write port and one
// asynchronous read port.  After reset an initialisation sequencer fills it,
// one word per clock, from the network's length rule 8, 16, 32, 8, ... bits
// (8 << (position mod 3), kept with a modulo-3 counter instead of a divider);
// ready rises when all NUM_INSTR words are written, NUM_INSTR clocks after
// reset.  The read port gives the length of the instrument at position idx in
// the same clock (0 for an index outside the network).
//
// What the ILM holds follows the reference design; filling it from the length
// rule after reset, rather than over the UART, is this design's choice.  The
// controller needs no length before the first apply group, which cannot arrive
// within NUM_INSTR clocks of reset over the UART.
module ilm
  import ijtag_pkg::*;
#(
  parameter int unsigned NUM_INSTR = 150,
  localparam int unsigned IW = (NUM_INSTR > 1) ? $clog2(NUM_INSTR) : 1
) (
  input  logic             clk,
  input  logic             rst,      // asynchronous, active high
  input  logic [IW-1:0]    idx,
  output logic [LEN_W-1:0] len,
  output logic             ready
);

  localparam logic [IW-1:0] LAST = IW'(NUM_INSTR - 1);

  logic [LEN_W-1:0] mem [NUM_INSTR];
  logic [IW-1:0]    init_idx;
  logic [1:0]       init_mod3;     // init_idx mod 3

  // initialisation sequencer
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      init_idx  <= '0;
      init_mod3 <= '0;
      ready     <= 1'b0;
    end else if (!ready) begin
      if (init_idx == LAST) begin
        ready <= 1'b1;
      end else begin
        init_idx  <= init_idx + 1'b1;
        init_mod3 <= (init_mod3 == 2'd2) ? 2'd0 : init_mod3 + 1'b1;
      end
    end
  end

  // memory write port
  always_ff @(posedge clk) begin
    if (!ready) mem[init_idx] <= LEN_W'(8) << init_mod3;
  end

  assign len = (32'(idx) < NUM_INSTR) ? mem[idx] : '0;

endmodule
