// tb_ipi_decim_stage: the 128 MHz to 25.6 MHz decimating stage with a 10 ns
// fast clock and a 50 ns slow clock. Checks:
//  * a constant ADC input gives the same constant at the slow side (unity
//    gain) with one valid output per slow cycle (rate 1/5);
//  * a tone at 0.4 of the fast rate (outside the pass band, would alias)
//    is attenuated to a small residue;
//  * a tone at 0.02 of the fast rate passes with its amplitude;
//  * no overflow in steady state.
module tb_ipi_decim_stage;
  import sdr_pkg::*;
  logic clk_lo = 0, clk_hi = 0, rst_lo = 1, rst_hi = 1;
  initial begin #7; forever #25 clk_lo = ~clk_lo; end
  always #5 clk_hi = ~clk_hi;
  int checks = 0, failures = 0;

  logic        adc_valid, out_valid, overflow;
  logic [15:0] adc_i, adc_q;
  iq_t         out_data;

  ipi_decim_stage dut (
    .clk_hi(clk_hi), .rst_hi(rst_hi), .adc_i(adc_i), .adc_q(adc_q), .adc_valid(adc_valid),
    .clk_lo(clk_lo), .rst_lo(rst_lo), .out_valid(out_valid), .out_data(out_data), .overflow(overflow));

  real fnorm = 0.0;  // tone frequency / fast rate; 0 gives DC
  int  n = 0;
  always @(negedge clk_hi) if (!rst_hi) begin
    adc_valid <= 1'b1;
    if (fnorm == 0.0) begin
      adc_i <= 16'(12000);
      adc_q <= 16'(-7000);
    end else begin
      adc_i <= 16'($rtoi(12000.0 * $cos(2.0 * PI * fnorm * n)));
      adc_q <= 16'($rtoi(12000.0 * $sin(2.0 * PI * fnorm * n)));
    end
    n++;
  end

  // measure over 400 slow cycles: number of valid outputs and peak |I|
  task automatic measure(output int nv, output real pk, output real mi, output real mq);
    nv = 0; pk = 0.0; mi = 0.0; mq = 0.0;
    repeat (400) begin
      @(posedge clk_lo);
      if (out_valid) begin
        nv++;
        mi += real'(out_data.i);
        mq += real'(out_data.q);
        if (real'(out_data.i) > pk) pk = real'(out_data.i);
        if (-real'(out_data.i) > pk) pk = -real'(out_data.i);
      end
    end
    if (nv > 0) begin mi = mi / nv; mq = mq / nv; end
  endtask

  initial begin
    int nv;
    real pk, mi, mq;
    adc_valid = 0; adc_i = 0; adc_q = 0;
    repeat (4) @(posedge clk_lo);
    @(negedge clk_hi) begin rst_hi = 0; rst_lo = 0; end
    repeat (100) @(posedge clk_lo);
    measure(nv, pk, mi, mq);
    checks++;
    if (nv < 398 || nv > 400) begin failures++; $display("FAIL %0d outputs in 400 slow cycles", nv); end
    checks++;
    if (pk < 11990 || pk > 12010 || mq < -7010 || mq > -6990) begin
      failures++; $display("FAIL DC gain: |I| %f Q %f", pk, mq);
    end
    fnorm = 0.4;
    repeat (100) @(posedge clk_lo);
    measure(nv, pk, mi, mq);
    checks++;
    if (pk > 600) begin failures++; $display("FAIL stop band tone leaks with peak %f", pk); end
    fnorm = 0.02;
    repeat (100) @(posedge clk_lo);
    measure(nv, pk, mi, mq);
    checks++;
    if (pk < 11000 || pk > 12600) begin failures++; $display("FAIL pass band tone peak %f", pk); end
    checks++;
    if (overflow) begin failures++; $display("FAIL overflow"); end
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
