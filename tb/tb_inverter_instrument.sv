// tb_inverter_instrument -- checks that the instrument (LEN = 32) stores its
// input on load and always presents the inverse; after reset it reads all ones.
//
// Inverting instruments come from the reference design; the load-on-update
// and reset value checked here are this design's own.
module tb_inverter_instrument;
  localparam int L = 32;
  logic clk = 1'b0, rst, load;
  logic [L-1:0] din, dout, m;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  inverter_instrument #(.LEN(L)) dut (.*);

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; din = '0; m = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (dout !== '1) begin failures++; $display("FAIL: reset value %h", dout); end
    for (int k = 0; k < 2000; k++) begin
      load = ($urandom_range(0, 2) == 0);
      din  = $urandom();
      #1;
      checks++;
      if (dout !== ~m) begin failures++; $display("FAIL: dout=%h expected %h", dout, ~m); end
      @(posedge clk);
      if (load) m = din;
      #1;
    end
    // the reference example: write 0xAA, read 0x55
    load = 1; din = 32'hAA; @(posedge clk); #1 load = 0;
    checks++;
    if (dout[7:0] !== 8'h55) begin failures++; $display("FAIL: 0xAA read back as %h", dout[7:0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
