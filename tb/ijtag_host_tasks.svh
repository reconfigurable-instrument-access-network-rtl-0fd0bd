// ijtag_host_tasks.svh -- host side of the UART instrument access protocol,
// shared by the top-level testbenches.  The including module declares
//   localparam int N, CPB  (instruments, clocks per UART bit)
//   logic clk, rst, rx, tx, busy, fin, overrun; logic [N-1:0] sib_open;
// and instantiates the design as `dut`.  The tasks play the part of the host
// re-targeting software: they encode iRead/iWrite/iApply groups into bytes,
// send them serially, collect the returned bytes and compare them, and the
// SIB states and shift counts, with an independent model of the network.
//
// The setup/apply word layout follows the reference protocol; write-data byte
// order and the pacing of data behind returned bytes are this design's own.

int checks   = 0;
int failures = 0;

// ---------------------------------------------------------------- reference
longint unsigned model   [N];   // word stored in each inverter instrument
int              op_mode [N];   // 0 off, 1 iRead, 2 iWrite for the next group
longint unsigned op_data [N];

function automatic int ilen(int i);
  return 8 << (i % 3);
endfunction

function automatic longint unsigned lmask(int i);
  return (ilen(i) == 64) ? '1 : ((64'd1 << ilen(i)) - 1);
endfunction

// ---------------------------------------------------------------- mechanisms
int n_odu_stall   = 0;  // clocks a read bit waited for the UART transmitter
int n_data_wait   = 0;  // clocks a write segment waited for a data byte
int n_discard     = 0;  // data-phase tdo bits thrown away by the discard unit
int n_kept        = 0;  // data-phase tdo bits returned to the host
int n_sib_open    = 0;  // SIBs seen open during a data phase
int n_sib_close   = 0;  // SIBs closed again at the end of a group
int n_read_only   = 0;  // groups with a zero data byte count
int n_write_grp   = 0;  // groups carrying data bytes
int n_mixed_grp   = 0;  // groups with both reads and writes
int n_groups      = 0;

// ---------------------------------------------------------------- clock
initial clk = 1'b0;
always #5 clk = ~clk;

// ---------------------------------------------------------------- UART receive
byte unsigned rxq[$];

initial begin : host_rx
  byte unsigned b;
  @(negedge rst);
  forever begin
    @(negedge tx);
    repeat (CPB / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(posedge clk);
      b[i] = tx;
    end
    repeat (CPB) @(posedge clk);
    checks++;
    if (tx !== 1'b1) begin
      failures++;
      $display("FAIL: stop bit of returned byte is low");
    end
    rxq.push_back(b);
  end
end

int n_sent = 0;   // bytes sent by the host

task automatic send_byte(input byte unsigned v);
  n_sent++;
  rx <= 1'b0;
  repeat (CPB) @(posedge clk);
  for (int i = 0; i < 8; i++) begin
    rx <= v[i];
    repeat (CPB) @(posedge clk);
  end
  rx <= 1'b1;
  repeat (CPB) @(posedge clk);
endtask

// ---------------------------------------------------------------- monitors
int phase      = 0;     // 0 configuration shift, 1 data shift, 2 done
int cfg_shifts = 0;
int dat_shifts = 0;
int cfg_clocks = 0;     // clocks from group start to the first update
int fin_seen   = 0;
logic [N-1:0] open_at_update;   // SIB states at the data-phase update

always @(posedge clk) begin
  if (!rst) begin
    if (dut.u_ctrl.u_fsm.read_seg && dut.u_ctrl.odu_stall) n_odu_stall++;
    if (dut.u_ctrl.u_fsm.need_byte && !dut.u_ctrl.data_valid) n_data_wait++;
    if (dut.u_ctrl.scr_clear) begin
      phase = 0; cfg_shifts = 0; dat_shifts = 0; cfg_clocks = 0;
    end else begin
      if (phase == 0) cfg_clocks++;
      if (dut.u_ctrl.shift_en) begin
        if (phase == 0) cfg_shifts++;
        else if (phase == 1) begin
          dat_shifts++;
          if (dut.u_ctrl.out_valid) n_kept++;
          else n_discard++;
        end
      end
      if (dut.u_ctrl.update_en) begin
        if (phase == 1) open_at_update = sib_open;
        phase++;
      end
    end
    if (fin) fin_seen++;
  end
end

// ---------------------------------------------------------------- checks
task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL: %s", what);
  end
endtask

// Send the group described by op_mode/op_data, wait for it to finish and
// compare everything that can be observed.
task automatic run_group();
  byte unsigned    bytes[$];
  byte unsigned    expect_q[$];
  int              count = 0;
  int              new_open_bits  = 0;
  int              nr = 0, nw = 0;
  int              fin_before;
  int              waited;
  longint unsigned w;

  for (int i = 0; i < N; i++) begin
    if (op_mode[i] != 0) new_open_bits += ilen(i);
    if (op_mode[i] == 1) nr++;
    if (op_mode[i] == 2) begin nw++; count += ilen(i) / 8; end
  end
  // setup words, farthest instrument first as in the reference benchmark
  for (int i = N - 1; i >= 0; i--) begin
    if (op_mode[i] != 0) begin
      bytes.push_back({(op_mode[i] == 2) ? 2'b01 : 2'b00, 6'(i >> 8)});
      bytes.push_back(8'(i));
    end
  end
  // apply word with the data byte count
  bytes.push_back({1'b1, 7'(count >> 8)});
  bytes.push_back(8'(count));
  // expected returned bytes: inverse of each read instrument, same order
  for (int i = N - 1; i >= 0; i--) begin
    if (op_mode[i] == 1) begin
      w = ~model[i] & lmask(i);
      for (int j = 0; j < ilen(i) / 8; j++) expect_q.push_back(8'(w >> (8 * j)));
    end
  end

  fin_before = fin_seen;
  foreach (bytes[k]) send_byte(bytes[k]);
  // data bytes in scan order, least significant byte first.  There is no flow
  // control, so the data of an instrument is sent only once the bytes read
  // from the instruments ahead of it in the scan path have come back.
  begin
    int reads_ahead = 0;
    for (int i = N - 1; i >= 0; i--) begin
      if (op_mode[i] == 1) reads_ahead += ilen(i) / 8;
      if (op_mode[i] == 2) begin
        while (rxq.size() < reads_ahead) @(posedge clk);
        for (int j = 0; j < ilen(i) / 8; j++) send_byte(8'(op_data[i] >> (8 * j)));
      end
    end
  end

  waited = 0;
  while ((fin_seen == fin_before || busy || rxq.size() < expect_q.size())
         && waited < 200 * CPB * (expect_q.size() + 4)) begin
    @(posedge clk);
    waited++;
  end
  repeat (4 * CPB) @(posedge clk);

  check(fin_seen == fin_before + 1, $sformatf("group %0d: one fin pulse (saw %0d)", n_groups, fin_seen - fin_before));
  check(rxq.size() == expect_q.size(),
        $sformatf("group %0d: %0d bytes returned, %0d expected", n_groups, rxq.size(), expect_q.size()));
  foreach (expect_q[k]) begin
    if (k < rxq.size())
      check(rxq[k] == expect_q[k],
            $sformatf("group %0d: returned byte %0d = %02h, expected %02h", n_groups, k, rxq[k], expect_q[k]));
  end
  rxq.delete();
  // shift lengths and configuration-phase latency
  check(cfg_shifts == N,
        $sformatf("group %0d: %0d configuration shifts, expected %0d", n_groups, cfg_shifts, N));
  check(cfg_clocks == N + 1,
        $sformatf("group %0d: configuration phase %0d clocks, expected %0d", n_groups, cfg_clocks, N + 1));
  check(dat_shifts == N + new_open_bits,
        $sformatf("group %0d: %0d data shifts, expected %0d", n_groups, dat_shifts, N + new_open_bits));
  check(!overrun, "no data overrun");

  // update the reference: written words land, read instruments receive the
  // zero dummy bits on the final update
  for (int i = 0; i < N; i++) begin
    if (op_mode[i] == 2) model[i] = op_data[i] & lmask(i);
    if (op_mode[i] == 1) model[i] = 0;
    check(open_at_update[i] == (op_mode[i] != 0),
          $sformatf("group %0d: SIB %0d open state in the data phase", n_groups, i));
    check(sib_open[i] == 1'b0, $sformatf("group %0d: SIB %0d closed after the group", n_groups, i));
    if (open_at_update[i]) n_sib_open++;
    if (open_at_update[i] && !sib_open[i]) n_sib_close++;
  end
  if (count == 0) n_read_only++; else n_write_grp++;
  if (nr > 0 && nw > 0) n_mixed_grp++;
  n_groups++;
  for (int i = 0; i < N; i++) op_mode[i] = 0;
endtask

task automatic host_reset();
  rx  = 1'b1;
  rst = 1'b1;
  for (int i = 0; i < N; i++) begin
    model[i] = 0; op_mode[i] = 0; op_data[i] = 0;
  end
  repeat (5) @(posedge clk);
  rst = 1'b0;
  repeat (5) @(posedge clk);
endtask

function automatic longint unsigned rand64();
  return {$urandom(), $urandom()};
endfunction

task automatic require(input int n, input string what);
  checks++;
  if (n == 0) begin
    failures++;
    $display("FAIL: mechanism never happened: %s", what);
  end else begin
    $display("mechanism %-28s %0d", what, n);
  end
endtask
