// inverter_instrument -- the test instrument of the reference network: a word
// register whose inverse is presented to the scan register.
//
// On load (the segment is selected and update_en is high) the instrument takes
// the scan register's contents; dout, captured by the scan register, is always
// the bitwise inverse of the stored word.  Writing 0xAA therefore reads back as
// 0x55.  Reset clears the stored word, so an instrument never written reads as
// all ones.  Instruments are simple inverters of 8, 16 or 32 bits in the
// reference design; storing the written word in a register is this design's
// reading of how such an inverter holds its input between accesses.
module inverter_instrument #(
  parameter int unsigned LEN = 8
) (
  input  logic           clk,
  input  logic           rst,     // asynchronous, active high
  input  logic           load,
  input  logic [LEN-1:0] din,
  output logic [LEN-1:0] dout
);

  logic [LEN-1:0] word_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       word_q <= '0;
    else if (load) word_q <= din;
  end

  assign dout = ~word_q;

endmodule
