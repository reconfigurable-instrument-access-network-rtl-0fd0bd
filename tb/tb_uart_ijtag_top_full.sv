// tb_uart_ijtag_top_full -- the design at its default size (150 instruments,
// 868 clocks per bit, i.e. 115200 baud at 100 MHz) taken through the
// single-instrument and whole-network apply groups of the reference
// evaluation: iWrite 1 / iRead 1 with 0xAA / 0x55, write all, read all and
// the flat BASTION benchmark (all instruments written and read in one apply
// group each, then every instrument written and read in its own groups).
// Returned bytes, SIB states and shift counts are compared with the model in
// ijtag_host_tasks.svh, and the number of bits exchanged on the serial line
// is compared with the full-featured data overhead figures.
//
// The apply groups and bit totals come from the reference evaluation.
module tb_uart_ijtag_top_full;
  localparam int N   = 150;
  localparam int CPB = 868;

  logic         clk, rst, rx, tx, busy, fin, overrun;
  logic [N-1:0] sib_open;

  uart_ijtag_top dut (
    .clk(clk), .rst(rst), .rx(rx), .tx(tx),
    .busy(busy), .fin(fin), .overrun(overrun), .sib_open(sib_open)
  );

  `include "ijtag_host_tasks.svh"

  initial begin : watchdog
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int EXP_USEFUL = 2800;
  `include "ijtag_workload_groups.svh"

  initial begin
    host_reset();
    run_workload_groups();

    require(n_odu_stall,  "output stall");
    require(n_data_wait,  "write data wait");
    require(n_discard,    "discarded output bits");
    require(n_kept,       "returned output bits");
    require(n_read_only,  "read-only group");
    require(n_write_grp,  "group with data");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
