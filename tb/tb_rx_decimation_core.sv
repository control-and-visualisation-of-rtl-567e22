// tb_rx_decimation_core: the receive decimation chain at reduced size (both
// CIC factors 4, total decimation 64), input valid on every clock. Checks:
//  * one output per 64 inputs;
//  * a constant input gives the same constant (unity gain at R = 4);
//  * a tone at about 1/10 of the output rate passes with its amplitude;
//  * a tone just above the output rate (it would alias onto 0.3 of the
//    output rate) is suppressed;
//  * the OP4 packet (24 samples) equals 24 consecutive chain outputs.
module tb_rx_decimation_core;
  import sdr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  axil_req_t req;
  axil_rsp_t rsp;
  logic      in_valid, out_valid;
  iq_t       in_data, out_data;
  axis32_t   op_axis;
  logic      op_tready;

  rx_decimation_core #(.CIC1_R(4), .CIC2_R(4), .OP_DEPTH(64)) dut (
    .clk(clk), .rst(rst), .s_axil_req(req), .s_axil_rsp(rsp),
    .in_valid(in_valid), .in_data(in_data), .out_valid(out_valid), .out_data(out_data),
    .op_axis(op_axis), .op_tready(op_tready));
  axil_bfm bfm (.clk(clk), .req(req), .rsp(rsp));

  real   fin = 0.0;   // cycles per input sample; 0 gives DC
  longint n = 0;
  always @(negedge clk) begin
    in_valid <= !rst;
    if (fin == 0.0) in_data <= '{q: -16'sd6000, i: 16'sd9000};
    else begin
      in_data.i <= sample_t'($rtoi(10000.0 * $cos(2.0 * PI * fin * n)));
      in_data.q <= sample_t'($rtoi(10000.0 * $sin(2.0 * PI * fin * n)));
    end
    n++;
  end

  logic [31:0] outs [$];
  int nout = 0;
  always @(posedge clk) if (out_valid) begin outs.push_back(out_data); nout++; end

  logic [31:0] pkt [$];
  int pkt_last = 0;
  always @(posedge clk) if (op_axis.tvalid && op_tready) begin
    pkt.push_back(op_axis.tdata);
    if (op_axis.tlast) pkt_last = pkt.size();
  end
  always @(negedge clk) op_tready <= ($urandom_range(0, 1) == 1);

  task automatic peak(input int nsamp, output real pk, output real mq);
    int start = nout;
    pk = 0.0; mq = 0.0;
    while (nout < start + nsamp) @(posedge clk);
    #1;
    for (int k = outs.size() - nsamp; k < outs.size(); k++) begin
      automatic iq_t v = iq_t'(outs[k]);
      automatic real m = $sqrt(real'(v.i) ** 2 + real'(v.q) ** 2);
      if (m > pk) pk = m;
      mq += real'(v.q);
    end
    mq = mq / nsamp;
  endtask

  initial begin
    real pk, mq;
    int n0;
    longint c0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (64 * 40) @(posedge clk);
    n0 = nout;
    repeat (64 * 100) @(posedge clk);
    checks++;
    if (nout - n0 < 99 || nout - n0 > 101) begin failures++; $display("FAIL %0d outputs in 6400 inputs", nout - n0); end
    peak(20, pk, mq);
    checks++;
    if ((pk - $sqrt(9000.0 ** 2 + 6000.0 ** 2)) ** 2 > 4.0 || (mq + 6000.0) ** 2 > 4.0) begin
      failures++; $display("FAIL DC out |x| %f Q %f", pk, mq);
    end
    // OP4 packet while DC is flowing is weak evidence, so switch to a tone first
    fin = 0.1037 / 64.0;
    repeat (64 * 60) @(posedge clk);
    peak(40, pk, mq);
    checks++;
    if (pk < 9000.0 || pk > 10800.0) begin failures++; $display("FAIL pass band tone peak %f", pk); end
    bfm.write(12'h000, 32'd24);
    bfm.write(12'h004, 32'd1);
    c0 = 0;
    while (pkt_last == 0 && c0 < 100000) begin @(posedge clk); c0++; end
    #1;
    checks++;
    if (pkt.size() != 24 || pkt_last != 24) begin failures++; $display("FAIL OP4 packet of %0d", pkt.size()); end
    begin
      int hits = 0;
      for (int s = 0; s + 24 <= outs.size(); s++) begin
        automatic bit ok = 1;
        for (int k = 0; k < 24; k++) if (outs[s+k] != pkt[k]) ok = 0;
        if (ok) hits++;
      end
      checks++;
      if (hits != 1) begin failures++; $display("FAIL OP4 packet found %0d times in the output", hits); end
    end
    fin = 1.3 / 64.0;
    repeat (64 * 60) @(posedge clk);
    peak(40, pk, mq);
    checks++;
    if (pk > 400.0) begin failures++; $display("FAIL aliasing tone peak %f", pk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
