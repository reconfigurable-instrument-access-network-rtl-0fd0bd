// tb_master_controller -- the master controller on a 6-instrument network,
// fed with protocol bytes directly (no serial line) and with a modelled
// transmitter that stays busy for a while after each send.  Groups: the
// reference single-instrument write 0xAA / read 0x55, writing two instruments
// and reading them back, write-all / read-all with random words.  Returned
// bytes must be exactly the inverse words of the read instruments, in scan
// order, least significant byte first; fin must pulse once per group.  Then 40
// random read-only or write-only groups on random instrument subsets; every
// SIB must be closed again after each group.
//
// The block partition and the protocol words follow the reference design; byte
// order and the transmitter handshake are this design's own.
module tb_master_controller;
  localparam int N = 6;
  logic clk = 1'b0, rst, rx_done, tx_send, tx_busy;
  logic [7:0] rx_data, tx_data;
  logic tdi, tdo, shift_en, capture_en, update_en, sib_reset, busy, fin, overrun;
  logic [N-1:0] sib_open;
  int checks = 0, failures = 0, fins = 0;
  longint unsigned model [N];
  byte unsigned got[$];
  int busy_left = 0;
  bit sent = 0;

  always #5 clk = ~clk;

  master_controller #(.NUM_INSTR(N)) dut (.*);
  ijtag_network #(.NUM_INSTR(N)) u_net (.*);

  function automatic int ilen(int i); return 8 << (i % 3); endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitter model
  assign tx_busy = (busy_left != 0);
  always @(negedge clk) begin
    sent = tx_send;
    if (tx_send) got.push_back(tx_data);
    if (fin) fins++;
  end
  always @(posedge clk) begin
    if (sent) busy_left <= 30;
    else if (busy_left != 0) busy_left <= busy_left - 1;
  end

  task automatic give(input byte unsigned b);
    @(negedge clk);
    rx_data = b; rx_done = 1;
    @(negedge clk);
    rx_done = 0;
    repeat (40) @(posedge clk);
  endtask

  // mode: 0 off, 1 read, 2 write
  task automatic group(input int mode [N], input longint unsigned wd [N]);
    byte unsigned exp[$];
    int count = 0, f0;
    longint unsigned w;
    f0 = fins;
    got.delete();
    for (int i = N - 1; i >= 0; i--) begin
      if (mode[i] != 0) begin give({(mode[i] == 2) ? 2'b01 : 2'b00, 6'd0}); give(8'(i)); end
      if (mode[i] == 2) count += ilen(i) / 8;
      if (mode[i] == 1) begin
        w = ~model[i];
        for (int j = 0; j < ilen(i) / 8; j++) exp.push_back(8'(w >> (8 * j)));
      end
    end
    give(8'h80); give(8'(count));
    for (int i = N - 1; i >= 0; i--)
      if (mode[i] == 2) for (int j = 0; j < ilen(i) / 8; j++) give(8'(wd[i] >> (8 * j)));
    while (busy) @(posedge clk);
    repeat (40) @(posedge clk);
    check(fins == f0 + 1, "one fin per group");
    check(sib_open == '0, "all SIBs closed after the group");
    check(got.size() == exp.size(), $sformatf("%0d bytes returned, expected %0d", got.size(), exp.size()));
    foreach (exp[k]) if (k < got.size()) check(got[k] == exp[k], $sformatf("byte %0d = %02h, expected %02h", k, got[k], exp[k]));
    for (int i = 0; i < N; i++) begin
      if (mode[i] == 2) model[i] = wd[i] & ((64'd1 << ilen(i)) - 1);
      if (mode[i] == 1) model[i] = 0;
    end
  endtask

  initial begin
    int m [N];
    longint unsigned d [N];
    rst = 1; rx_done = 0; rx_data = 0;
    for (int i = 0; i < N; i++) begin model[i] = 0; m[i] = 0; d[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    repeat (20) @(posedge clk);

    m[0] = 2; d[0] = 64'hAA; group(m, d);
    m[0] = 1; group(m, d);
    check(got.size() == 1 && got[0] == 8'h55, "iWrite 0xAA then iRead gives 0x55");
    m[0] = 0;
    m[1] = 2; d[1] = 64'h1234; m[5] = 2; d[5] = 64'hDEADBEEF; group(m, d);
    m[1] = 1; m[5] = 1; group(m, d);
    for (int i = 0; i < N; i++) begin m[i] = 2; d[i] = {$urandom(), $urandom()}; end
    group(m, d);
    for (int i = 0; i < N; i++) m[i] = 1;
    group(m, d);
    // random read-only and write-only groups on random instrument subsets
    for (int g = 0; g < 40; g++) begin
      bit wr;
      wr = $urandom_range(0, 1) == 1;
      for (int i = 0; i < N; i++) begin
        m[i] = ($urandom_range(0, 1) == 1) ? (wr ? 2 : 1) : 0;
        d[i] = {$urandom(), $urandom()};
      end
      group(m, d);
    end
    check(!overrun, "no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
