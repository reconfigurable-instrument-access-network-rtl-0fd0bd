// sib -- Segment Insertion Bit of the IEEE 1687 network.
//
// A shift flip-flop S and an update flip-flop U with a host-port multiplexer H
// and two keeper multiplexers K1, K2, as in the reference SIB schematic:
//   * shift_en = 1: S loads the output of H, otherwise S keeps its value (K1).
//   * update_en = 1: U loads S, otherwise U keeps its value (K2).
//   * H selects tdi when U = 0 (SIB closed: the hosted segment is bypassed) and
//     fso, the scan-out of the hosted segment, when U = 1 (SIB open).
//   * tsi (scan-in of the hosted segment) is tdi; to_sel = U tells the hosted
//     segment that it is part of the active scan path; tdo is S.
// The SIB is therefore one scan bit placed after its segment.  Both flip-flops
// are cleared by rst (the CLR pins in the schematic), so after reset every SIB
// is closed.  clr is a synchronous clear of both flip-flops that the controller
// pulses at the end of every apply group, so each group starts from a closed
// network; this clear input is this design's addition to the schematic.  capture_en is not used inside the SIB; it goes straight to the
// hosted segment.
module sib (
  input  logic clk,
  input  logic rst,        // asynchronous, active high
  input  logic tdi,
  input  logic shift_en,
  input  logic update_en,
  input  logic clr,        // synchronous clear of S and U
  input  logic fso,        // from scan-out of the hosted segment
  output logic tsi,        // to scan-in of the hosted segment
  output logic to_sel,     // hosted segment selected (U flip-flop)
  output logic tdo
);

  logic s_q, u_q;
  logic h_out;

  assign h_out  = u_q ? fso : tdi;
  assign tsi    = tdi;
  assign to_sel = u_q;
  assign tdo    = s_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      s_q <= 1'b0;
      u_q <= 1'b0;
    end else if (clr) begin
      s_q <= 1'b0;
      u_q <= 1'b0;
    end else begin
      if (shift_en)  s_q <= h_out;
      if (update_en) u_q <= s_q;
    end
  end

endmodule
