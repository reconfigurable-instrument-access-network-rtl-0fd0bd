// tb_uart_ijtag_workloads_n100 -- the design with a 100-instrument network, one
// of the three network sizes of the reference evaluation, taken through its
// apply groups (iWrite 1, iRead 1, write all, read all, BASTION) by the host
// model.  Returned bytes, SIB states and shift counts are checked after every
// group, and the bits exchanged on the serial line are compared with the
// reference overhead rule (16 bits per setup and apply word plus 1856 data
// bits for the whole network).  The network size follows the reference
// evaluation; the UART runs at 16 clocks per bit here, instead of 868, only to
// shorten the simulation: the bit counts do not depend on it.
module tb_uart_ijtag_workloads_n100;
  localparam int N   = 100;
  localparam int CPB = 16;

  logic         clk, rst, rx, tx, busy, fin, overrun;
  logic [N-1:0] sib_open;

  uart_ijtag_top #(.NUM_INSTR(N), .CLKS_PER_BIT(CPB)) dut (
    .clk(clk), .rst(rst), .rx(rx), .tx(tx),
    .busy(busy), .fin(fin), .overrun(overrun), .sib_open(sib_open)
  );

  `include "ijtag_host_tasks.svh"

  initial begin : watchdog
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int EXP_USEFUL = 1856;
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
