// tb_ilm -- checks that the Instrument Length Memory becomes ready NUM_INSTR
// clocks after reset and then holds 8, 16, 32, 8, ... bits for positions
// 0, 1, 2, 3, ... at the default size of 150 instruments.
//
// The 8/16/32 length pattern follows the reference network; filling it in
// hardware after reset and the ready flag are this design's own.
module tb_ilm;
  import ijtag_pkg::*;
  localparam int N = 150;
  logic clk = 1'b0, rst, ready;
  logic [7:0] idx;
  logic [LEN_W-1:0] len;
  int checks = 0, failures = 0;
  int t = 0;

  always #5 clk = ~clk;

  ilm dut (.*);

  initial begin : watchdog
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; idx = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    while (!ready) begin @(posedge clk); #1 t++; end
    checks++;
    if (t != N) begin failures++; $display("FAIL: ready after %0d clocks, expected %0d", t, N); end
    for (int i = 0; i < N; i++) begin
      idx = 8'(i); #1;
      checks++;
      if (len !== LEN_W'(8 << (i % 3))) begin failures++; $display("FAIL: len[%0d] = %0d", i, len); end
    end
    idx = 8'(N + 3); #1;
    checks++;
    if (len !== '0) begin failures++; $display("FAIL: out-of-range index gives %0d", len); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
