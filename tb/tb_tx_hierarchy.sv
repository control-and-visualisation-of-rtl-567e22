// tb_tx_hierarchy: the transmit hierarchy (core plus 25.6 -> 128 MHz stage)
// at reduced size (CIC factor 4, 16-point FFT), with a 50 ns processing
// clock and a 10 ns converter clock. Checks:
//  * the DAC stream is valid on every converter clock once running, and
//    the crossing FIFO never overflows;
//  * the DAC stream is a smooth oversampled waveform (no step larger than a
//    few percent of full amplitude between consecutive samples) while the
//    gain is constant;
//  * the gain register, written over AXI-Lite, scales the DAC output
//    (gain 0 gives silence);
//  * an OP1 packet requested over AXI-Lite arrives with tlast on its last
//    beat and holds valid QPSK points.
module tb_tx_hierarchy;
  import sdr_pkg::*;
  logic clk_25 = 0, clk_128 = 0, rst_25 = 1, rst_128 = 1;
  always #25 clk_25 = ~clk_25;
  initial begin #2; forever #5 clk_128 = ~clk_128; end
  int checks = 0, failures = 0;

  axil_req_t   req;
  axil_rsp_t   rsp;
  axis32_t     op_axis [3];
  logic [31:0] dac_tdata;
  logic        dac_tvalid, fifo_overflow;
  iq_t         dac;
  assign dac = iq_t'(dac_tdata);

  tx_hierarchy #(.CIC_R(4), .FFT_LOG2N(4)) dut (
    .clk_25(clk_25), .rst_25(rst_25), .clk_128(clk_128), .rst_128(rst_128),
    .s_axil_req(req), .s_axil_rsp(rsp), .op_axis(op_axis), .op_tready(3'b111),
    .dac_tdata(dac_tdata), .dac_tvalid(dac_tvalid), .fifo_overflow(fifo_overflow));

  axil_bfm bfm (.clk(clk_25), .req(req), .rsp(rsp));

  bit  watch = 0, zero_mode = 0, step_watch = 0;
  int  gaps = 0, big_steps = 0, nonzero = 0, nacc = 0;
  real acc = 0.0;
  iq_t prev;
  always @(posedge clk_128) if (watch) begin
    if (!dac_tvalid) gaps++;
    else begin
      if (step_watch && ((int'(dac.i) - int'(prev.i)) ** 2 > 800 ** 2 || (int'(dac.q) - int'(prev.q)) ** 2 > 800 ** 2)) big_steps++;
      if (zero_mode && dac_tdata != 0) nonzero++;
      acc += real'(dac.i) ** 2 + real'(dac.q) ** 2;
      nacc++;
      prev = dac;
    end
  end

  logic [31:0] op1 [$];
  int          op1_last = 0;
  always @(posedge clk_25) if (!rst_25 && op_axis[0].tvalid) begin
    op1.push_back(op_axis[0].tdata);
    if (op_axis[0].tlast) op1_last = op1.size();
  end

  task automatic rms(input int n, output real r);
    acc = 0.0; nacc = 0;
    step_watch = 1;
    repeat (n) @(posedge clk_128);
    step_watch = 0;
    r = $sqrt(acc / nacc);
  endtask

  initial begin
    real r1, r2;
    int guard;
    repeat (4) @(posedge clk_25);
    rst_128 = 0;
    @(negedge clk_25) rst_25 = 0;
    repeat (400) @(posedge clk_25);
    @(negedge clk_128) begin watch = 1; prev = dac; end
    rms(20000, r1);
    bfm.write(12'h000, 32'd8192);
    repeat (2000) @(posedge clk_128);
    rms(20000, r2);
    checks++;
    if (r1 < 1000.0 || r2 / r1 < 0.15 || r2 / r1 > 0.35) begin
      failures++; $display("FAIL DAC rms %f at unity gain, %f at quarter gain", r1, r2);
    end
    bfm.write(12'h000, 32'd0);
    repeat (2000) @(posedge clk_128);
    zero_mode = 1;
    rms(5000, r2);
    zero_mode = 0;
    checks++;
    if (nonzero != 0) begin failures++; $display("FAIL %0d nonzero DAC samples at gain 0", nonzero); end
    bfm.write(12'h000, 32'd32768);
    bfm.write(12'h004, 32'd20);
    bfm.write(12'h008, 32'd1);
    guard = 0;
    while (op1_last == 0 && guard < 100000) begin @(posedge clk_25); guard++; end
    checks++;
    if (op1.size() != 20 || op1_last != 20) begin failures++; $display("FAIL OP1 packet of %0d", op1.size()); end
    foreach (op1[k]) begin
      automatic iq_t v = iq_t'(op1[k]);
      checks++;
      if ((v.i != 16'sd8192 && v.i != -16'sd8192) || (v.q != 16'sd8192 && v.q != -16'sd8192)) begin
        failures++; $display("FAIL OP1 beat %0d is not a QPSK point", k);
      end
    end
    checks++;
    if (gaps != 0) begin failures++; $display("FAIL %0d idle DAC cycles", gaps); end
    checks++;
    if (big_steps != 0) begin failures++; $display("FAIL %0d large steps in the DAC stream", big_steps); end
    checks++;
    if (fifo_overflow) begin failures++; $display("FAIL crossing FIFO overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
