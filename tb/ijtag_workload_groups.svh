// ijtag_workload_groups.svh -- the apply groups of the reference evaluation,
// run through the host model of ijtag_host_tasks.svh: iWrite 1 / iRead 1 with
// 0xAA / 0x55, write all, read all, and the flat BASTION benchmark (write all
// and read all in one group each, then every instrument written and read in
// its own groups).  For each, the bits exchanged on the serial line are
// compared with 16 bits per setup word and per apply word plus the data bits,
// the overhead rule of the reference full-featured controller.  The includer
// defines N and EXP_USEFUL (the network's data bits) and calls
// run_workload_groups() after host_reset().

  // Bits exchanged for one group: 8 bits per byte sent or returned.  Expected
  // values: setup word 16 bits per instrument, apply word 16 bits, plus the
  // useful data bits (8/16/32 per instrument).
  int rxq_total = 0;   // bytes the host expects back from the group

  task automatic check_bits(input int exp_bits, input string what);
    int got;
    got = 8 * (n_sent + rxq_total);
    check(got == exp_bits, $sformatf("%s: %0d bits exchanged, expected %0d", what, got, exp_bits));
    $display("%-10s bits exchanged %0d", what, got);
    n_sent = 0; rxq_total = 0;
  endtask

  task automatic check_bits_total(input int got, input int exp_bits, input string what);
    check(got == exp_bits, $sformatf("%s: %0d bits exchanged, expected %0d", what, got, exp_bits));
    $display("%-10s bits exchanged %0d", what, got);
  endtask

  int useful_all;
  int bastion_bits;

  task automatic run_workload_groups();
    useful_all = 0;
    for (int i = 0; i < N; i++) useful_all += ilen(i);
    check(useful_all == EXP_USEFUL, $sformatf("%0d-instrument network holds %0d data bits", N, EXP_USEFUL));

    op_mode[0] = 2; op_data[0] = 64'hAA; run_group();
    check_bits(40, "iWrite 1");
    op_mode[0] = 1; rxq_total = 1; run_group();
    check_bits(40, "iRead 1");

    for (int i = 0; i < N; i++) begin op_mode[i] = 2; op_data[i] = rand64(); end
    run_group();
    check_bits(16 * N + 16 + useful_all, "Write all");
    for (int i = 0; i < N; i++) op_mode[i] = 1;
    rxq_total = useful_all / 8;
    run_group();
    check_bits(16 * N + 16 + useful_all, "Read all");

    // BASTION: write all with 0xAA / apply / read all / apply, then from the
    // farthest instrument to the first: write 0xAA / apply / read / apply.
    bastion_bits = 0;
    for (int i = 0; i < N; i++) begin op_mode[i] = 2; op_data[i] = 64'hAAAA_AAAA_AAAA_AAAA; end
    run_group();
    bastion_bits += 8 * n_sent; n_sent = 0;
    for (int i = 0; i < N; i++) op_mode[i] = 1;
    run_group();
    bastion_bits += 8 * (n_sent + useful_all / 8); n_sent = 0;
    for (int i = N - 1; i >= 0; i--) begin
      op_mode[i] = 2; op_data[i] = 64'hAAAA_AAAA_AAAA_AAAA; run_group();
      op_mode[i] = 1; run_group();
      bastion_bits += 8 * n_sent + ilen(i); n_sent = 0;   // sent bytes + returned bits
    end
    // overhead 16 bits per setup word (4N) and per apply word (2N + 2)
    check_bits_total(bastion_bits, 16 * (4 * N) + 16 * (2 * N + 2) + 4 * useful_all, "BASTION");

  endtask
