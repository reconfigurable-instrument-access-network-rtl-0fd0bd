// tb_scan_register -- checks the segment shift register (LEN = 16) against a
// model: shifts towards fso (tsi enters at the top) and captures cap_data only
// while sel is high, holds otherwise.
//
// The parallel capture and update of a hosted register follow the reference
// network; the shift direction is this design's own.
module tb_scan_register;
  localparam int L = 16;
  logic clk = 1'b0, rst, sel, shift_en, capture_en, tsi, fso;
  logic [L-1:0] cap_data, par_out, m;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scan_register #(.LEN(L)) dut (.*);

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; sel = 0; shift_en = 0; capture_en = 0; tsi = 0; cap_data = '0; m = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 4000; k++) begin
      sel        = ($urandom_range(0, 3) != 0);
      shift_en   = ($urandom_range(0, 1) == 0);
      capture_en = !shift_en && ($urandom_range(0, 4) == 0);
      tsi        = 1'($urandom());
      cap_data   = L'($urandom());
      #1;
      checks++;
      if (par_out !== m || fso !== m[0]) begin
        failures++;
        $display("FAIL: cycle %0d par_out=%h fso=%b, expected %h", k, par_out, fso, m);
      end
      @(posedge clk);
      if (sel && shift_en) m = {tsi, m[L-1:1]};
      else if (sel && capture_en) m = cap_data;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
