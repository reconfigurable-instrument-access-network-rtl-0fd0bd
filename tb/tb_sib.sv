// tb_sib -- checks the Segment Insertion Bit against a reference model of its
// schematic: S loads (U ? fso : tdi) on shift_en, U loads S on update_en, clr
// clears both, tsi = tdi, to_sel = U, tdo = S.  Random stimulus, compared
// every clock.
//
// The S/U flip-flops and the H, K1, K2 multiplexers follow the reference SIB
// schematic; the synchronous clr input is this design's addition.
module tb_sib;
  logic clk = 1'b0, rst, tdi, shift_en, update_en, clr, fso, tsi, to_sel, tdo;
  logic s_m, u_m;
  int checks = 0, failures = 0;
  int opened = 0;

  always #5 clk = ~clk;

  sib dut (.*);

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; tdi = 0; shift_en = 0; update_en = 0; clr = 0; fso = 0;
    s_m = 0; u_m = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int k = 0; k < 5000; k++) begin
      // drive new inputs away from the clock edge
      tdi       = 1'($urandom());
      fso       = 1'($urandom());
      shift_en  = ($urandom_range(0, 2) == 0);
      update_en = !shift_en && ($urandom_range(0, 3) == 0);
      clr       = ($urandom_range(0, 60) == 0);
      #1;
      checks++;
      if (tsi !== tdi || to_sel !== u_m || tdo !== s_m) begin
        failures++;
        $display("FAIL: cycle %0d tsi=%b to_sel=%b tdo=%b, expected %b %b %b", k, tsi, to_sel, tdo, tdi, u_m, s_m);
      end
      @(posedge clk);
      if (clr) begin s_m = 0; u_m = 0; end
      else begin
        if (update_en) u_m = s_m;
        if (shift_en)  s_m = u_m ? fso : tdi;
      end
      if (u_m) opened++;
      #1;
    end
    checks++;
    if (opened == 0) begin failures++; $display("FAIL: SIB never opened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
