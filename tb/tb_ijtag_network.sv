// tb_ijtag_network -- drives a 7-instrument network directly with the three
// enables and checks it against a model of the scan path.
// Each round: shift a configuration of N bits (the bit for the SIB farthest
// from tdi first), update, and check which SIBs opened; capture and shift the
// new path, checking that the bits leaving tdo are the SIB bits followed by
// the inverse of each open instrument's word (LSB first), while writing new
// random words; update, then clear the SIBs and check that all closed.
//
// The SIB behaviour and the 8/16/32-bit length pattern checked here follow the
// reference network; the scan register bit order is this design's own.
module tb_ijtag_network;
  localparam int N = 7;
  logic clk = 1'b0, rst, tdi, tdo, shift_en, capture_en, update_en, sib_reset;
  logic [N-1:0] sib_open;
  longint unsigned model [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ijtag_network #(.NUM_INSTR(N)) dut (.*);

  function automatic int ilen(int i); return 8 << (i % 3); endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one shift clock: present b on tdi, return the bit that leaves tdo
  task automatic shift_bit(input bit b, output bit o);
    tdi = b; shift_en = 1; #1;
    o = tdo;
    @(posedge clk); #1;
    shift_en = 0;
  endtask

  task automatic pulse(input int which);
    if (which == 0) capture_en = 1; else if (which == 1) update_en = 1; else sib_reset = 1;
    @(posedge clk); #1;
    capture_en = 0; update_en = 0; sib_reset = 0;
  endtask

  initial begin
    bit sel [N];
    longint unsigned wdata [N];
    bit o;
    rst = 1; tdi = 0; shift_en = 0; capture_en = 0; update_en = 0; sib_reset = 0;
    for (int i = 0; i < N; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(sib_open == '0, "all SIBs closed after reset");

    for (int r = 0; r < 30; r++) begin
      for (int i = 0; i < N; i++) begin
        sel[i] = (r == 0) ? 1'b1 : 1'($urandom());
        wdata[i] = {$urandom(), $urandom()} & ((64'd1 << ilen(i)) - 1);
      end
      // configuration: path is N closed SIBs; farthest SIB's bit first
      for (int i = N - 1; i >= 0; i--) begin
        shift_bit(sel[i], o);
        check(o == 1'b0, "closed-network shift returns zeros from cleared SIBs");
      end
      pulse(1);
      for (int i = 0; i < N; i++) check(sib_open[i] == sel[i], $sformatf("round %0d SIB %0d open", r, i));
      pulse(0);
      // data: walk the path from the tdo end
      for (int i = N - 1; i >= 0; i--) begin
        shift_bit(sel[i], o);
        check(o == sel[i], $sformatf("round %0d SIB %0d bit on tdo", r, i));
        if (sel[i]) begin
          longint unsigned exp;
          exp = ~model[i];
          for (int b = 0; b < ilen(i); b++) begin
            shift_bit(wdata[i][b], o);
            check(o == exp[b], $sformatf("round %0d instrument %0d bit %0d", r, i, b));
          end
        end
      end
      pulse(1);
      for (int i = 0; i < N; i++) if (sel[i]) model[i] = wdata[i];
      pulse(2);
      check(sib_open == '0, $sformatf("round %0d all SIBs closed by sib_reset", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
