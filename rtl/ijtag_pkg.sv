// ijtag_pkg -- types, constants and helper functions shared by the UART
// controlled IEEE 1687 instrument access network.
//
// Command protocol on the UART (all words are sent high byte first):
//   setup word  : bits [15:14] = command (00 = iRead, 01 = iWrite)
//                 bits [13:0]  = instrument address (0 = instrument next to TDI)
//   apply word  : bit 15 = 1, bits [14:0] = number of data bytes that follow
//   data bytes  : instrument data for every iWrite of the group, in scan
//                 order (instrument farthest from TDI first), each instrument
//                 least significant byte first.
// The two command codes, the bit 15 apply marker and the byte count field follow
// the bit-wise command tables of the original design; the byte order of data
// inside a group is this design's choice.
//
// Instrument lengths repeat 8, 16, 32 bits along the chain (position mod 3),
// as in the reference network.  The SCR entry encoding is this design's own.
package ijtag_pkg;

  // Largest network the 14-bit address field and the reference design support.
  localparam int unsigned MAX_INSTR = 1000;
  localparam int unsigned ADDR_W    = 14;
  // Instrument lengths are at most 32 bits; LEN_W holds the value 32.
  localparam int unsigned MAX_LEN   = 32;
  localparam int unsigned LEN_W     = $clog2(MAX_LEN + 1);

  // Command field of a setup word.
  localparam logic [1:0] CMD_READ  = 2'b00;
  localparam logic [1:0] CMD_WRITE = 2'b01;

  // One SIB Control Register entry: what the next apply group does with an
  // instrument.
  typedef enum logic [1:0] {
    SCR_OFF   = 2'b00,   // SIB stays closed, instrument not in the scan path
    SCR_READ  = 2'b01,   // SIB opened, captured data returned to the host
    SCR_WRITE = 2'b10    // SIB opened, host data loaded into the instrument
  } scr_mode_e;

  // Data length of the instrument at chain position idx: 8, 16, 32, 8, ...
  function automatic int unsigned instr_len(input int unsigned idx);
    return 32'd8 << (idx % 3);
  endfunction

endpackage
