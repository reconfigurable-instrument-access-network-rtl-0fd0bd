// scan_register -- shift register of one instrument segment, hosted by a SIB.
//
// While sel (the SIB's to_sel) is high the register takes part in the scan
// path: with shift_en it shifts one place towards fso, taking tsi in at the
// top (bit LEN-1), so the first bit shifted in ends in bit 0 after LEN clocks
// and bit 0 leaves first; with capture_en it loads cap_data, the instrument's
// output.  While sel is low it holds its contents.  par_out is the register
// contents, loaded into the instrument on update.  Only one of shift_en and
// capture_en is high at a time.
//
// The capture and shift behaviour follow the reference network; the bit order
// (least significant bit first) is this design's choice.
module scan_register #(
  parameter int unsigned LEN = 8
) (
  input  logic           clk,
  input  logic           rst,       // asynchronous, active high
  input  logic           sel,
  input  logic           shift_en,
  input  logic           capture_en,
  input  logic           tsi,
  output logic           fso,
  input  logic [LEN-1:0] cap_data,
  output logic [LEN-1:0] par_out
);

  logic [LEN-1:0] sr;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                    sr <= '0;
    else if (sel && shift_en)   sr <= {tsi, sr[LEN-1:1]};
    else if (sel && capture_en) sr <= cap_data;
  end

  assign fso     = sr[0];
  assign par_out = sr;

endmodule
