// ijtag_network -- flat IEEE 1687 instrument access network.
//
// NUM_INSTR SIBs form one chain from tdi to tdo.  SIB i hosts a segment made of
// a scan register and an inverter instrument of instr_len(i) bits: 8, 16, 32,
// 8, 16, 32, ... counted from the SIB next to tdi (position 0).  Each SIB's
// scan bit sits after its segment, so when SIB i is open the scan path runs
// ... -> segment i -> S(i) -> ...  All SIBs are closed after reset, leaving a
// path of NUM_INSTR bits, and sib_reset (synchronous) closes every SIB again
// without touching the scan registers or instruments.
//
// Control: shift_en, capture_en and update_en go to every SIB and segment;
// a segment shifts and captures only while its SIB is open, and its instrument
// loads on update_en only while its SIB is open.  Every element acts on the
// rising clock edge.  sib_open shows the U flip-flop of every SIB (bit i for
// position i) for observation.
//
// The chain structure, the SIB placement and the 8/16/32 length sequence follow
// the reference network; the default of 150 instruments is the largest network
// evaluated there.
module ijtag_network
  import ijtag_pkg::*;
#(
  parameter int unsigned NUM_INSTR = 150
) (
  input  logic                 clk,
  input  logic                 rst,        // asynchronous, active high
  input  logic                 tdi,
  output logic                 tdo,
  input  logic                 shift_en,
  input  logic                 capture_en,
  input  logic                 update_en,
  input  logic                 sib_reset,
  output logic [NUM_INSTR-1:0] sib_open
);

  logic [NUM_INSTR:0] chain;

  assign chain[0] = tdi;
  assign tdo      = chain[NUM_INSTR];

  for (genvar i = 0; i < NUM_INSTR; i++) begin : g_seg
    localparam int unsigned L = instr_len(i);

    logic         tsi, fso, sel;
    logic [L-1:0] sr_par, instr_out;

    sib u_sib (
      .clk       (clk),
      .rst       (rst),
      .tdi       (chain[i]),
      .shift_en  (shift_en),
      .update_en (update_en),
      .clr       (sib_reset),
      .fso       (fso),
      .tsi       (tsi),
      .to_sel    (sel),
      .tdo       (chain[i+1])
    );

    scan_register #(.LEN(L)) u_sr (
      .clk        (clk),
      .rst        (rst),
      .sel        (sel),
      .shift_en   (shift_en),
      .capture_en (capture_en),
      .tsi        (tsi),
      .fso        (fso),
      .cap_data   (instr_out),
      .par_out    (sr_par)
    );

    inverter_instrument #(.LEN(L)) u_instr (
      .clk  (clk),
      .rst  (rst),
      .load (sel && update_en),
      .din  (sr_par),
      .dout (instr_out)
    );

    assign sib_open[i] = sel;
  end

endmodule
