// tb_odu -- checks the Output Discard Unit: random kept bits, offered only
// when stall is low, must come out as bytes (first bit = bit 0) in order on
// tx_data/tx_send; tx_busy is modelled as a transmitter that stays busy for
// a random time after each send.  Stall must occur and no byte may be sent
// while the transmitter is busy.
//
// Discarding unrequested bits follows the reference design; the LSB-first
// packing and the stall rule checked here are this design's own.
module tb_odu;
  logic clk = 1'b0, rst, bit_valid, bit_in, stall, tx_send, tx_busy, pending;
  logic [7:0] tx_data;
  int checks = 0, failures = 0;
  int stalls = 0, busy_left = 0;
  bit exp_bits[$];

  always #5 clk = ~clk;

  odu dut (.*);

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitter model and byte checker: a send is seen half a clock before
  // the edge that commits it, and the transmitter turns busy at that edge
  assign tx_busy = (busy_left != 0);
  int nbytes = 0;
  bit sent = 0;
  always @(negedge clk) begin
    if (stall) stalls++;
    sent = tx_send;
    if (tx_send) begin
      checks++;
      if (tx_busy) begin failures++; $display("FAIL: send while busy"); end
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (exp_bits.size() == 0 || tx_data[i] !== exp_bits[0]) begin
          failures++; $display("FAIL: byte %0d bit %0d", nbytes, i);
        end
        if (exp_bits.size() != 0) void'(exp_bits.pop_front());
      end
      nbytes++;
    end
  end
  always @(posedge clk) begin
    if (sent) busy_left <= $urandom_range(1, 40);
    else if (busy_left != 0) busy_left <= busy_left - 1;
  end

  initial begin
    rst = 1; bit_valid = 0; bit_in = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 800; k++) begin
      bit b;
      b = 1'($urandom());
      // wait for a clock where the unit accepts a bit
      while (stall) begin @(posedge clk); #1; end
      if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
      while (stall) begin @(posedge clk); #1; end
      bit_valid = 1; bit_in = b;
      exp_bits.push_back(b);
      @(posedge clk); #1;
      bit_valid = 0;
    end
    while (pending) begin @(posedge clk); #1; end
    repeat (50) @(posedge clk);
    checks++;
    if (nbytes != 100 || exp_bits.size() != 0) begin failures++; $display("FAIL: %0d bytes sent, %0d bits left", nbytes, exp_bits.size()); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL: never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
