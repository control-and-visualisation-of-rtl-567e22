// tb_lfsr_prbs: steps the two-bit-per-strobe LFSR 20000 times at irregular
// intervals and checks the bit stream against the recurrence of the
// polynomial x^15 + x^14 + 1 (o[n+15] = o[n] xor o[n+1]), that the first
// bits follow from the seed 1, that the stream never sticks at zero, and that
// the bits only change on a strobe.
module tb_lfsr_prbs;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       adv;
  logic [1:0] bits, bits_prev;
  lfsr_prbs dut (.clk(clk), .rst(rst), .adv(adv), .bits(bits));

  bit stream [$];
  int ones;

  initial begin
    adv = 0; ones = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk) adv = 1;
      @(negedge clk) adv = 0;
      stream.push_back(bits[1]);
      stream.push_back(bits[0]);
      bits_prev = bits;
      repeat (n % 3) @(negedge clk);
      checks++;
      if (bits !== bits_prev) begin failures++; $display("FAIL bits changed without a strobe"); end
    end
    // seed 1: the register reads 000...001, so the first 14 output bits are 0
    // and the 15th is 1
    for (int k = 0; k < 14; k++) begin
      checks++;
      if (stream[k] != 0) begin failures++; $display("FAIL seed bit %0d", k); end
    end
    checks++;
    if (stream[14] != 1) begin failures++; $display("FAIL seed bit 14"); end
    for (int k = 0; k + 15 < stream.size(); k++) begin
      checks++;
      if (stream[k+15] != (stream[k] ^ stream[k+1])) begin
        failures++;
        if (failures < 5) $display("FAIL recurrence at %0d", k);
      end
      ones += stream[k];
    end
    checks++;
    if (ones < 18000 || ones > 22000) begin failures++; $display("FAIL unbalanced stream: %0d ones", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
