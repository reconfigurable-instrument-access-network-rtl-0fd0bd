// sib_control_register -- SIB Control Register (SCR).
//
// One entry per instrument position says what the next apply group does with
// that instrument: leave its SIB closed (SCR_OFF), open it and read it
// (SCR_READ) or open it and write it (SCR_WRITE).  The command interpreter
// writes one entry per setup word (we, addr, mode); addresses at or above
// NUM_INSTR are ignored.  clear empties the whole register; it is pulsed when
// the main FSM takes the register contents for an apply group, so each group
// starts from an empty register.  clear wins over a write in the same clock.
// All entries are visible in parallel on modes.  Reset empties the register.
//
// The SCR and its role follow the reference design; the entry encoding and the
// clear-on-apply behaviour are this design's choices.
module sib_control_register
  import ijtag_pkg::*;
#(
  parameter int unsigned NUM_INSTR = 150
) (
  input  logic              clk,
  input  logic              rst,      // asynchronous, active high
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  scr_mode_e         mode,
  input  logic              clear,
  output scr_mode_e         modes [NUM_INSTR]
);

  localparam int unsigned IW = (NUM_INSTR > 1) ? $clog2(NUM_INSTR) : 1;

  scr_mode_e regs [NUM_INSTR];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < NUM_INSTR; i++) regs[i] <= SCR_OFF;
    end else if (clear) begin
      for (int i = 0; i < NUM_INSTR; i++) regs[i] <= SCR_OFF;
    end else if (we && (32'(addr) < NUM_INSTR)) begin
      regs[IW'(addr)] <= mode;
    end
  end

  assign modes = regs;

endmodule
