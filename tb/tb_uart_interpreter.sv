// tb_uart_interpreter -- feeds protocol bytes to the command interpreter and
// checks the SCR writes (address and command), the control_ready /
// start_ack handshake, the hand-over of data bytes (including bytes with bit 7
// set, which must not be taken for commands) and the overrun flag.
//
// The setup/apply word layout follows the reference protocol's example bytes;
// the data hand-over register and the overrun flag are this design's own.
module tb_uart_interpreter;
  import ijtag_pkg::*;
  logic clk = 1'b0, rst, rx_done, scr_we, control_ready, start_ack, data_valid, data_take, overrun;
  logic [7:0] rx_data, data_byte;
  logic [ADDR_W-1:0] scr_addr;
  scr_mode_e scr_mode;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  uart_interpreter dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SCR writes seen
  int        w_addr[$];
  scr_mode_e w_mode[$];
  always @(negedge clk) if (scr_we) begin w_addr.push_back(int'(scr_addr)); w_mode.push_back(scr_mode); end

  task automatic give(input byte unsigned b);
    rx_data = b; rx_done = 1;
    @(posedge clk); #1;
    rx_done = 0;
    repeat (5) @(posedge clk);
    #1;
  endtask

  task automatic expect_write(input int a, input scr_mode_e m);
    check(w_addr.size() == 1, $sformatf("one SCR write (saw %0d)", w_addr.size()));
    if (w_addr.size() > 0) begin
      check(w_addr[0] == a && w_mode[0] == m, $sformatf("SCR write addr %0d mode %0d, expected %0d %0d", w_addr[0], w_mode[0], a, m));
    end
    w_addr.delete(); w_mode.delete();
  endtask

  task automatic ack();
    check(control_ready, "control_ready raised by the apply word");
    start_ack = 1; @(posedge clk); #1; start_ack = 0; @(posedge clk); #1;
    check(!control_ready, "control_ready dropped after start_ack");
  endtask

  task automatic take(input byte unsigned exp);
    check(data_valid && data_byte == exp, $sformatf("data byte %02h valid=%b, expected %02h", data_byte, data_valid, exp));
    data_take = 1; @(posedge clk); #1; data_take = 0;
    check(!data_valid, "data_valid dropped after data_take");
  endtask

  initial begin
    rst = 1; rx_done = 0; rx_data = 0; start_ack = 0; data_take = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    give(8'h40); check(w_addr.size() == 0, "no SCR write after half a setup word");
    give(8'h05); expect_write(5, SCR_WRITE);
    give(8'h12); give(8'h34); expect_write(14'h1234, SCR_READ);
    give(8'h00); give(8'h00); expect_write(0, SCR_READ);
    check(!control_ready, "no control_ready before an apply word");

    // read-only apply: no data bytes
    give(8'h80); give(8'h00);
    ack();
    give(8'h00); give(8'h07); expect_write(7, SCR_READ);

    // apply with three data bytes that look like commands
    give(8'h80); give(8'h03);
    ack();
    give(8'h80); take(8'h80);
    give(8'hFF); take(8'hFF);
    give(8'h41); take(8'h41);
    check(w_addr.size() == 0, "data bytes not taken as setup words");
    give(8'h41); give(8'h02); expect_write(14'h0102, SCR_WRITE);

    // byte count above 255 uses the high byte
    give(8'h81); give(8'h00);
    ack();
    for (int i = 0; i < 256; i++) begin give(8'(i)); take(8'(i)); end
    give(8'h00); give(8'h09); expect_write(9, SCR_READ);
    check(!overrun, "no overrun while bytes are taken");

    // overrun: two data bytes without a take
    give(8'h80); give(8'h02);
    ack();
    give(8'hA1); give(8'hA2);
    check(overrun, "overrun flagged");
    take(8'hA2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
