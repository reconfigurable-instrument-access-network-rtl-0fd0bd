// tb_uart_transceiver -- checks the 8N1 receiver and transmitter.
// Random bytes are sent serially into rx and must appear on rx_data with one
// rx_done pulse about 9.5 bit periods after the start edge; a byte with a low
// stop bit must be dropped.  Random bytes given to tx_send must appear on tx
// as start bit, 8 data bits LSB first and stop bit, with tx_busy high for
// exactly 10 bit periods.  Transmission and reception overlap (full duplex).
//
// The 8N1 frame follows the reference design; the framing-error handling
// checked here is this design's own.
module tb_uart_transceiver;
  localparam int CPB = 16;

  logic       clk = 1'b0, rst, rx, tx, rx_done, tx_send, tx_busy;
  logic [7:0] rx_data, tx_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  uart_transceiver #(.CLKS_PER_BIT(CPB)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver side ----------------------------------------------------------
  byte unsigned rx_exp[$];
  int           done_cnt = 0;
  int           edge_cycle = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rx_done) begin
      done_cnt++;
      check(rx_exp.size() > 0, "rx_done without a byte sent");
      if (rx_exp.size() > 0) begin
        check(rx_data == rx_exp[0], $sformatf("received %02h, expected %02h", rx_data, rx_exp[0]));
        void'(rx_exp.pop_front());
      end
      // start edge to done: middle of the stop bit plus synchroniser and state delays
      check(cyc - edge_cycle >= 9 * CPB + CPB / 2 && cyc - edge_cycle <= 9 * CPB + CPB / 2 + 6,
            $sformatf("rx latency %0d clocks", cyc - edge_cycle));
    end
  end

  task automatic send_serial(input byte unsigned v, input bit stop);
    edge_cycle = cyc + 1;
    rx <= 1'b0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx <= v[i]; repeat (CPB) @(posedge clk); end
    rx <= stop;
    repeat (CPB) @(posedge clk);
    rx <= 1'b1;
    repeat (2 * CPB) @(posedge clk);
  endtask

  // transmitter side -------------------------------------------------------
  byte unsigned tx_exp[$];
  int           tx_seen = 0;
  initial begin : tx_monitor
    byte unsigned b;
    int           busy_len;
    @(negedge rst);
    forever begin
      @(negedge tx);
      busy_len = 0;
      repeat (CPB / 2) @(posedge clk);
      check(tx == 1'b0, "tx start bit");
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = tx; end
      repeat (CPB) @(posedge clk);
      check(tx == 1'b1, "tx stop bit");
      check(tx_exp.size() > 0, "tx byte without a send");
      if (tx_exp.size() > 0) begin
        check(b == tx_exp[0], $sformatf("sent %02h, expected %02h", b, tx_exp[0]));
        void'(tx_exp.pop_front());
      end
      tx_seen++;
    end
  end

  int busy_cycles = 0;
  always @(posedge clk) if (tx_busy) busy_cycles++;

  task automatic send_tx(input byte unsigned v);
    int n0;
    while (tx_busy) @(posedge clk);
    tx_exp.push_back(v);
    n0 = busy_cycles;
    tx_data <= v; tx_send <= 1'b1;
    @(posedge clk);
    tx_send <= 1'b0;
    @(posedge clk);
    while (tx_busy) @(posedge clk);
    check(busy_cycles - n0 == 10 * CPB, $sformatf("tx_busy %0d clocks", busy_cycles - n0));
  endtask

  initial begin
    rx = 1'b1; tx_send = 1'b0; tx_data = '0; rst = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    repeat (3) @(posedge clk);
    fork
      begin
        for (int k = 0; k < 40; k++) begin
          byte unsigned v;
          v = 8'($urandom());
          rx_exp.push_back(v);
          send_serial(v, 1'b1);
        end
        // framing error: must not be delivered
        begin
          int n0;
          n0 = done_cnt;
          send_serial(8'h5A, 1'b0);
          repeat (2 * CPB) @(posedge clk);
          check(done_cnt == n0, "byte with low stop bit dropped");
        end
        rx_exp.push_back(8'hC3);
        send_serial(8'hC3, 1'b1);
      end
      begin
        for (int k = 0; k < 40; k++) send_tx(8'($urandom()));
      end
    join
    repeat (20 * CPB) @(posedge clk);
    check(rx_exp.size() == 0, "all sent bytes received");
    check(tx_exp.size() == 0 && tx_seen == 40, "all bytes transmitted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
