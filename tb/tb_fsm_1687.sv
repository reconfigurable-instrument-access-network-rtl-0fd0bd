// tb_fsm_1687 -- runs the main 1687 FSM on a real 8-instrument network and
// ILM, with the SCR contents, the data bytes and the discard unit's stall
// driven by the testbench.  For random apply groups it checks the enable
// sequence (N configuration shifts, update, capture, data shifts over the new
// path, update, SIB reset, fin), that the configuration lands in the SIBs,
// that written words reach the instruments (read back by a later group) and
// that out_valid marks exactly the bits of read instruments, in scan order and
// least significant bit first, with the expected inverse values.  Data bytes
// arrive after random delays and odu_stall is raised at random, so both
// stalls occur.
//
// The expected phase lengths (N configuration shifts, one update, one capture,
// the data path, one update) follow the reference FSM; the byte order and the
// zero dummy bits checked here are this design's own conventions.
module tb_fsm_1687;
  import ijtag_pkg::*;
  localparam int N = 8;

  logic clk = 1'b0, rst;
  logic control_ready, scr_clear, data_valid, data_take;
  logic [7:0] data_byte;
  scr_mode_e scr_modes [N];
  logic [2:0] ilm_idx;
  logic [LEN_W-1:0] ilm_len;
  logic ilm_ready;
  logic tdi, tdo, shift_en, capture_en, update_en, sib_reset;
  logic out_valid, out_bit, odu_stall, busy, fin;
  logic [N-1:0] sib_open;
  int checks = 0, failures = 0;
  longint unsigned model [N];
  int n_data_stall = 0, n_odu_stall = 0;

  always #5 clk = ~clk;

  fsm_1687 #(.NUM_INSTR(N)) dut (.*);
  ilm #(.NUM_INSTR(N)) u_ilm (.clk(clk), .rst(rst), .idx(ilm_idx), .len(ilm_len), .ready(ilm_ready));
  ijtag_network #(.NUM_INSTR(N)) u_net (.*);

  function automatic int ilen(int i); return 8 << (i % 3); endfunction

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

  // record the enable sequence and the kept output bits
  string seq;
  int    shifts;
  bit    kept[$];
  logic [N-1:0] open_at_data;
  always @(negedge clk) begin
    if (!rst) begin
      if (dut.stall && dut.need_byte) n_data_stall++;
      if (dut.stall && dut.read_seg)  n_odu_stall++;
      // shift clocks are summed up to the next other event, across stalls
      if (shift_en) shifts++;
      else if (shifts != 0 && (capture_en || update_en || sib_reset || fin)) begin
        seq = {seq, $sformatf("S%0d", shifts)}; shifts = 0;
      end
      if (capture_en) seq = {seq, "C"};
      if (update_en) begin seq = {seq, "U"}; open_at_data = sib_open; end
      if (sib_reset) seq = {seq, "R"};
      if (fin) seq = {seq, "F"};
      if (out_valid) kept.push_back(out_bit);
    end
  end

  // data byte source with random delays
  byte unsigned dq[$];
  always @(posedge clk or posedge rst) begin : data_src
    if (rst) begin
      data_valid <= 1'b0;
      data_byte  <= '0;
    end else if (data_valid && data_take) begin
      data_valid <= 1'b0;
    end else if (!data_valid && dq.size() > 0 && $urandom_range(0, 6) == 0) begin
      data_byte  <= dq.pop_front();
      data_valid <= 1'b1;
    end
  end
  always @(posedge clk) odu_stall <= ($urandom_range(0, 3) == 0);

  initial begin
    int mode [N];
    longint unsigned wd [N];
    bit exp_bits[$];
    int path;
    rst = 1; control_ready = 0;
    for (int i = 0; i < N; i++) begin scr_modes[i] = SCR_OFF; model[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst = 0;
    while (!ilm_ready) @(posedge clk);
    #1;
    for (int g = 0; g < 40; g++) begin
      path = N;
      exp_bits.delete();
      for (int i = 0; i < N; i++) begin
        mode[i] = (g == 0) ? 2 : $urandom_range(0, 2);
        wd[i]   = {$urandom(), $urandom()} & ((64'd1 << ilen(i)) - 1);
        scr_modes[i] = (mode[i] == 2) ? SCR_WRITE : (mode[i] == 1) ? SCR_READ : SCR_OFF;
        if (mode[i] != 0) path += ilen(i);
      end
      for (int i = N - 1; i >= 0; i--) begin
        if (mode[i] == 2) for (int j = 0; j < ilen(i) / 8; j++) dq.push_back(8'(wd[i] >> (8 * j)));
        if (mode[i] == 1) for (int b = 0; b < ilen(i); b++) exp_bits.push_back(~model[i] >> b);
      end
      seq = ""; shifts = 0; kept.delete();
      control_ready = 1;
      @(posedge clk); #1;
      check(!scr_clear, "scr_clear is a single pulse");
      control_ready = 0;
      while (!fin) @(posedge clk);
      repeat (3) @(posedge clk); #1;
      check(seq == $sformatf("S%0dUCS%0dURF", N, path), $sformatf("group %0d sequence %s, expected S%0dUCS%0dURF", g, seq, N, path));
      check(kept.size() == exp_bits.size(), $sformatf("group %0d: %0d kept bits, expected %0d", g, kept.size(), exp_bits.size()));
      foreach (exp_bits[k]) if (k < kept.size()) check(kept[k] == exp_bits[k], $sformatf("group %0d kept bit %0d", g, k));
      for (int i = 0; i < N; i++) begin
        check(open_at_data[i] == (mode[i] != 0), $sformatf("group %0d SIB %0d open", g, i));
        if (mode[i] == 2) model[i] = wd[i];
        if (mode[i] == 1) model[i] = 0;
      end
      check(sib_open == '0 && !busy, "SIBs closed and FSM idle after the group");
    end
    check(n_data_stall > 0, "data stall occurred");
    check(n_odu_stall > 0, "output stall occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
