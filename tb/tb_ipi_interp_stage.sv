// tb_ipi_interp_stage: the 25.6 MHz to 128 MHz interpolating stage, run with a
// 50 ns slow clock and a 10 ns fast clock (the same 5:1 ratio), offset in
// phase. Checks:
//  * nothing comes out before the FIFO has been pre-filled;
//  * with one sample per slow cycle, the output is valid on every fast cycle
//    once running (1000 consecutive cycles), and the FIFO never overflows;
//  * a constant input gives the same constant at the output (unity gain,
//    within 1 % because each polyphase branch has its own small DC error);
//  * a low-frequency tone (1/50 of the slow rate) comes out as a smooth
//    tone of the same amplitude: every output lies within a small error of
//    the ideal continuous waveform at some fixed delay;
//  * overflow is flagged when the writer outruns the reader (burst while
//    the fast clock is held in reset).
module tb_ipi_interp_stage;
  import sdr_pkg::*;
  logic clk_lo = 0, clk_hi = 0, rst_lo = 1, rst_hi = 1;
  always #25 clk_lo = ~clk_lo;
  initial begin #3; forever #5 clk_hi = ~clk_hi; end
  int checks = 0, failures = 0;

  logic        in_valid, m_tvalid, overflow;
  iq_t         in_data;
  logic [31:0] m_tdata;
  iq_t         od;
  assign od = iq_t'(m_tdata);

  ipi_interp_stage dut (
    .clk_lo(clk_lo), .rst_lo(rst_lo), .in_valid(in_valid), .in_data(in_data),
    .clk_hi(clk_hi), .rst_hi(rst_hi), .m_tdata(m_tdata), .m_tvalid(m_tvalid), .overflow(overflow));

  bit tone = 0;
  int n_in = 0;
  always @(negedge clk_lo) if (!rst_lo) begin
    in_valid <= 1'b1;
    if (tone) begin
      in_data.i <= sample_t'($rtoi(12000.0 * $cos(2.0 * PI * n_in / 50.0)));
      in_data.q <= sample_t'($rtoi(12000.0 * $sin(2.0 * PI * n_in / 50.0)));
    end else begin
      in_data.i <= 16'sd10000;
      in_data.q <= -16'sd5000;
    end
    n_in++;
  end

  int  nvalid, ngap;
  real out_i [$];
  initial begin
    in_valid = 0; in_data = '0;
    repeat (4) @(posedge clk_lo);
    rst_hi = 0;
    @(posedge clk_hi);
    checks++;
    if (m_tvalid) begin failures++; $display("FAIL output before any input"); end
    @(negedge clk_lo) rst_lo = 0;
    // settle
    repeat (200) @(posedge clk_hi);
    nvalid = 0; ngap = 0;
    repeat (1000) begin
      @(posedge clk_hi);
      if (m_tvalid) begin
        nvalid++;
        checks++;
        if (od.i < 16'sd9900 || od.i > 16'sd10100 || od.q < -16'sd5050 || od.q > -16'sd4950) begin
          failures++;
          if (failures < 5) $display("FAIL DC output (%0d,%0d)", int'(od.i), int'(od.q));
        end
      end else ngap++;
    end
    checks++;
    if (ngap != 0) begin failures++; $display("FAIL %0d idle fast cycles in steady state", ngap); end
    // tone
    tone = 1;
    repeat (400) @(posedge clk_hi);
    repeat (1000) begin
      @(posedge clk_hi);
      if (m_tvalid) out_i.push_back(real'(od.i));
    end
    // at 250 fast samples per cycle the tone changes slowly: check the
    // magnitude envelope and the sample-to-sample smoothness
    for (int k = 1; k < out_i.size(); k++) begin
      checks++;
      if ((out_i[k] - out_i[k-1]) ** 2 > 400.0 ** 2) begin
        failures++;
        if (failures < 5) $display("FAIL step %0d: %f -> %f", k, out_i[k-1], out_i[k]);
      end
    end
    begin
      real mx = -1e9, mn = 1e9;
      foreach (out_i[k]) begin
        if (out_i[k] > mx) mx = out_i[k];
        if (out_i[k] < mn) mn = out_i[k];
      end
      checks++;
      if (mx < 11800 || mx > 12200 || mn > -11800 || mn < -12200) begin
        failures++; $display("FAIL tone amplitude %f..%f", mn, mx);
      end
    end
    checks++;
    if (overflow) begin failures++; $display("FAIL overflow in steady state"); end
    // stop the reader: the FIFO fills and overflow must be flagged
    rst_hi = 1;
    repeat (40) @(posedge clk_lo);
    checks++;
    if (!overflow) begin failures++; $display("FAIL overflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
