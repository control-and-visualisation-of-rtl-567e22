// tb_rx_coarse_sync_core: the FFT-based coarse frequency correction at 64
// points. The input is random QPSK (amplitude 8000 per rail, 8 samples per
// symbol) rotated by a frequency offset of k0/(4*64) cycles per sample, so
// its fourth power is a tone in FFT bin k0. Checks:
//  * once the averaged spectrum has settled, the read-only correction
//    register holds
//    -k0 * 2^32 / (4*64), for a positive and a negative k0;
//  * the corrected output has the same magnitude as the input and its
//    fourth power no longer rotates (the offset is removed);
//  * with the enable register cleared the correction becomes 0 and the input
//    passes with its offset;
//  * an OP5 packet of 16 samples arrives with tlast on the last beat.
module tb_rx_coarse_sync_core;
  import sdr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LOG2N = 6;

  axil_req_t req;
  axil_rsp_t rsp;
  logic      in_valid, out_valid;
  iq_t       in_data, out_data;
  axis32_t   op_axis;

  rx_coarse_sync_core #(.LOG2N(LOG2N), .OP_DEPTH(64)) dut (
    .clk(clk), .rst(rst), .s_axil_req(req), .s_axil_rsp(rsp),
    .in_valid(in_valid), .in_data(in_data), .out_valid(out_valid), .out_data(out_data),
    .op_axis(op_axis), .op_tready(1'b1));
  axil_bfm bfm (.clk(clk), .req(req), .rsp(rsp));

  // source: on average one sample every 3 clocks
  int  k0 = 5;
  real phi = 0.0, si = 8000.0, sq = 8000.0;
  int  nsamp = 0;
  always @(negedge clk) begin
    in_valid <= 1'b0;
    if (!rst && $urandom_range(0, 2) == 0) begin
      if (nsamp % 8 == 0) begin
        si = $urandom_range(0, 1) ? 8000.0 : -8000.0;
        sq = $urandom_range(0, 1) ? 8000.0 : -8000.0;
      end
      in_valid  <= 1'b1;
      in_data.i <= sample_t'($rtoi(si * $cos(phi) - sq * $sin(phi)));
      in_data.q <= sample_t'($rtoi(si * $sin(phi) + sq * $cos(phi)));
      phi += 2.0 * PI * k0 / (4.0 * (1 << LOG2N));
      nsamp++;
    end
  end

  // angle of the fourth power of each output, unwrapped drift per sample
  real last_a4 = 0.0, drift = 0.0, mag_err = 0.0;
  int  ndrift = 0;
  always @(posedge clk) if (out_valid) begin
    automatic real a4 = 4.0 * $atan2(real'(out_data.q), real'(out_data.i));
    automatic real d = a4 - last_a4;
    automatic real m = $sqrt(real'(out_data.i) ** 2 + real'(out_data.q) ** 2);
    while (d > PI) d -= 2.0 * PI;
    while (d < -PI) d += 2.0 * PI;
    drift += d;
    ndrift++;
    last_a4 = a4;
    if ((m - 8000.0 * $sqrt(2.0)) ** 2 > mag_err) mag_err = (m - 8000.0 * $sqrt(2.0)) ** 2;
  end

  task automatic settle_and_check(input int k, input bit en);
    logic [31:0] pinc, want;
    // twelve full frames (load + transform + output) at one sample per 3
    // clocks: the averaged spectrum needs about six frames to follow a step
    repeat (12 * (3 * 64 + 32 * 6 + 64) + 50) @(posedge clk);
    bfm.read(12'h00C, pinc);
    want = en ? -(32'(k) <<< (32 - LOG2N - 2)) : 32'd0;
    checks++;
    if (pinc != want) begin failures++; $display("FAIL k0=%0d en=%0b: correction %h, want %h", k, en, pinc, want); end
    drift = 0.0; ndrift = 0; mag_err = 0.0;
    repeat (600) @(posedge clk);
    checks++;
    // residual rotation of the fourth power per sample, in radians
    if (en ? (drift / ndrift) ** 2 > 0.02 ** 2
           : ((drift / ndrift) - 4.0 * 2.0 * PI * k / 256.0) ** 2 > 0.05 ** 2) begin
      failures++; $display("FAIL k0=%0d en=%0b: x^4 rotates %f rad/sample", k, en, drift / ndrift);
    end
    checks++;
    if (mag_err > 40.0 ** 2) begin failures++; $display("FAIL magnitude error %f", $sqrt(mag_err)); end
  endtask

  logic [31:0] pkt [$];
  int pkt_last = 0;
  always @(posedge clk) if (!rst && op_axis.tvalid) begin
    pkt.push_back(op_axis.tdata);
    if (op_axis.tlast) pkt_last = pkt.size();
  end

  initial begin
    int guard = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    k0 = 5;
    settle_and_check(5, 1'b1);
    k0 = -7;
    settle_and_check(-7, 1'b1);
    bfm.write(12'h008, 32'd0);
    settle_and_check(-7, 1'b0);
    bfm.write(12'h008, 32'd1);
    bfm.write(12'h000, 32'd16);
    bfm.write(12'h004, 32'd1);
    while (pkt_last == 0 && guard < 10000) begin @(posedge clk); guard++; end
    checks++;
    if (pkt.size() != 16 || pkt_last != 16) begin failures++; $display("FAIL OP5 packet of %0d", pkt.size()); end
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
