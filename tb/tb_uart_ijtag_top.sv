// tb_uart_ijtag_top -- end-to-end test of the UART controlled 1687 network at
// a reduced size (12 instruments, 8 clocks per UART bit).
//
// A host model sends apply groups as serial bytes: the single-instrument
// write and read of 0xAA / 0x55, write-all and read-all, groups that mix reads
// and writes, and random groups.  In mixed groups the host holds back each
// instrument's write data until the bytes read ahead of it have returned.  After each group the testbench compares the
// returned bytes, the SIB states and the number of shift clocks of both
// phases with an independent model, and at the end checks that every
// mechanism of the controller (output stall, data wait, discarding, opening
// and closing SIBs, read-only, write and mixed groups) occurred.
//
// The protocol words and the phase sequence follow the reference design; the
// data byte order and the host pacing rule are this design's own.
module tb_uart_ijtag_top;
  localparam int N   = 12;
  localparam int CPB = 8;

  logic         clk, rst, rx, tx, busy, fin, overrun;
  logic [N-1:0] sib_open;

  uart_ijtag_top #(.NUM_INSTR(N), .CLKS_PER_BIT(CPB)) dut (
    .clk(clk), .rst(rst), .rx(rx), .tx(tx),
    .busy(busy), .fin(fin), .overrun(overrun), .sib_open(sib_open)
  );

  `include "ijtag_host_tasks.svh"

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host_reset();

    // iWrite(0, 0xAA); iApply;  then iRead(0); iApply;  -> 0x55
    op_mode[0] = 2; op_data[0] = 64'hAA; run_group();
    op_mode[0] = 1; run_group();

    // write all, read all
    for (int i = 0; i < N; i++) begin op_mode[i] = 2; op_data[i] = rand64(); end
    run_group();
    for (int i = 0; i < N; i++) op_mode[i] = 1;
    run_group();

    // an empty group closes every SIB
    run_group();

    // random groups, mixing reads and writes
    for (int g = 0; g < 20; g++) begin
      for (int i = 0; i < N; i++) begin
        op_mode[i] = $urandom_range(0, 2);
        op_data[i] = rand64();
      end
      run_group();
    end

    require(n_odu_stall,  "output stall");
    require(n_data_wait,  "write data wait");
    require(n_discard,    "discarded output bits");
    require(n_kept,       "returned output bits");
    require(n_sib_open,   "SIB opened");
    require(n_sib_close,  "SIB closed after group");
    require(n_read_only,  "read-only group");
    require(n_write_grp,  "group with data");
    require(n_mixed_grp,  "mixed read/write group");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
