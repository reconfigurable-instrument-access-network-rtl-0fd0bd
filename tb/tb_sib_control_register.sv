// tb_sib_control_register -- random writes (including addresses beyond the
// network) and clears, compared entry by entry with a model.
//
// The off/read/write entry per instrument follows the reference controller;
// the encoding and the clear-over-write priority are this design's own.
module tb_sib_control_register;
  import ijtag_pkg::*;
  localparam int N = 20;
  logic clk = 1'b0, rst, we, clear;
  logic [ADDR_W-1:0] addr;
  scr_mode_e mode;
  scr_mode_e modes [N];
  scr_mode_e m [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sib_control_register #(.NUM_INSTR(N)) dut (.*);

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; clear = 0; addr = '0; mode = SCR_OFF;
    for (int i = 0; i < N; i++) m[i] = SCR_OFF;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 3000; k++) begin
      we    = ($urandom_range(0, 1) == 0);
      clear = ($urandom_range(0, 40) == 0);
      addr  = ADDR_W'($urandom_range(0, N + 5));
      mode  = ($urandom_range(0, 1) == 0) ? SCR_READ : SCR_WRITE;
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (modes[i] !== m[i]) begin failures++; $display("FAIL: entry %0d = %0d, expected %0d", i, modes[i], m[i]); end
      end
      @(posedge clk);
      if (clear) for (int i = 0; i < N; i++) m[i] = SCR_OFF;
      else if (we && addr < N) m[addr] = mode;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
