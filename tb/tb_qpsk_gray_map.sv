// tb_qpsk_gray_map: applies all four bit pairs, several times in random order,
// and checks the constellation point (00 -> (+A,+A), 10 -> (-A,+A),
// 11 -> (-A,-A), 01 -> (+A,-A), A = 8192), that neighbouring points differ
// in one bit, and the one-cycle latency of out_valid.
module tb_qpsk_gray_map;
  import sdr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid, out_valid;
  logic [1:0] bits;
  iq_t        sym;
  qpsk_gray_map dut (.clk(clk), .rst(rst), .in_valid(in_valid), .bits(bits), .out_valid(out_valid), .sym(sym));

  initial begin
    int ei, eq;
    in_valid = 0; bits = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      in_valid = 1;
      bits = 2'($urandom_range(0, 3));
      ei = (bits == 2'b00 || bits == 2'b01) ? 8192 : -8192;
      eq = (bits == 2'b00 || bits == 2'b10) ? 8192 : -8192;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(sym.i) != ei || int'(sym.q) != eq) begin
        failures++; $display("FAIL bits %b -> (%0d,%0d)", bits, sym.i, sym.q);
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL out_valid longer than one cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
