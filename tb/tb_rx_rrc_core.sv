// tb_rx_rrc_core: the receive matched filter and the x4 interpolation at
// reduced timing (64 clocks per input sample). Checks:
//  * four outputs per input, evenly spaced 16 clocks apart;
//  * a constant input gives the same constant at the output (within 1 %);
//  * a random QPSK stream pulse-shaped here with a root raised cosine
//    (roll-off 0.5, 8 samples per symbol, computed independently with real
//    arithmetic) comes out with an open eye: at the best of the 32 output
//    phases every symbol lies above 75 % of the nominal level with the right
//    sign, i.e. transmit and receive filters together give little
//    inter-symbol interference;
//  * an OP6 packet of 40 samples equals 40 consecutive outputs.
module tb_rx_rrc_core;
  import sdr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int IN_PERIOD = 64;

  axil_req_t req;
  axil_rsp_t rsp;
  logic      in_valid, out_valid;
  iq_t       in_data, out_data;
  axis32_t   op_axis;

  rx_rrc_core #(.IN_PERIOD(IN_PERIOD), .OP_DEPTH(128)) dut (
    .clk(clk), .rst(rst), .s_axil_req(req), .s_axil_rsp(rsp),
    .in_valid(in_valid), .in_data(in_data), .out_valid(out_valid), .out_data(out_data),
    .op_axis(op_axis), .op_tready(1'b1));
  axil_bfm bfm (.clk(clk), .req(req), .rsp(rsp));

  function automatic real rrc(real t);   // t in symbols, beta 0.5
    real b = 0.5;
    if (t ** 2 < 1e-12) return 1.0 - b + 4.0 * b / PI;
    if ((4.0 * b * t) ** 2 - 1.0 < 1e-9 && (4.0 * b * t) ** 2 - 1.0 > -1e-9)
      return b / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * b)) + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * b)));
    return ($sin(PI * t * (1.0 - b)) + 4.0 * b * t * $cos(PI * t * (1.0 + b))) / (PI * t * (1.0 - (4.0 * b * t) ** 2));
  endfunction

  localparam int NS = 300;
  real si [NS], sq [NS];
  real hsum, hsq;
  // pulse-shaped sample n (8 per symbol), pulse truncated to +-6 symbols and
  // scaled so that after a unity-DC-gain matched filter of 65 taps the
  // symbol peaks sit at +-6000
  function automatic real shaped(int n, bit q);
    real acc = 0.0;
    for (int s = 0; s < NS; s++) begin
      automatic real t = real'(n) / 8.0 - s;
      if (t > -6.0 && t < 6.0) acc += (q ? sq[s] : si[s]) * rrc(t);
    end
    return acc * 6000.0 * hsum / hsq;
  endfunction

  bit  dc_mode = 1;
  int  n_in = 0;
  int  cyc_in = 0;
  always @(negedge clk) if (!rst) begin
    in_valid <= 1'b0;
    if (cyc_in == 0) begin
      in_valid <= 1'b1;
      if (dc_mode) in_data <= '{q: 16'sd3000, i: -16'sd7000};
      else begin
        in_data.i <= sample_t'($rtoi(shaped(n_in, 0)));
        in_data.q <= sample_t'($rtoi(shaped(n_in, 1)));
        n_in++;
      end
    end
    cyc_in = (cyc_in == IN_PERIOD - 1) ? 0 : cyc_in + 1;
  end

  logic [31:0] outs [$];
  int          spacing_err = 0, last_t = -1, t = 0;
  always @(posedge clk) begin
    t++;
    if (out_valid) begin
      outs.push_back(out_data);
      if (last_t >= 0 && t - last_t != IN_PERIOD / 4) spacing_err++;
      last_t = t;
    end
  end

  logic [31:0] pkt [$];
  int pkt_last = 0;
  always @(posedge clk) if (!rst && op_axis.tvalid) begin
    pkt.push_back(op_axis.tdata);
    if (op_axis.tlast) pkt_last = pkt.size();
  end

  initial begin
    int guard = 0, n0;
    real best_min;
    int  best_ph;
    hsum = 0.0; hsq = 0.0;
    for (int k = -32; k <= 32; k++) begin
      hsum += rrc(k / 8.0);
      hsq  += rrc(k / 8.0) ** 2;
    end
    for (int s = 0; s < NS; s++) begin
      si[s] = $urandom_range(0, 1) ? 1.0 : -1.0;
      sq[s] = $urandom_range(0, 1) ? 1.0 : -1.0;
    end
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (IN_PERIOD * 80) @(posedge clk);
    #1;
    checks++;
    if (spacing_err != 0) begin failures++; $display("FAIL %0d output spacing errors", spacing_err); end
    for (int k = outs.size() - 20; k < outs.size(); k++) begin
      automatic iq_t v = iq_t'(outs[k]);
      checks++;
      if (v.i > -16'sd6930 || v.i < -16'sd7070 || v.q < 16'sd2970 || v.q > 16'sd3030) begin
        failures++; $display("FAIL DC output (%0d,%0d)", int'(v.i), int'(v.q));
      end
    end
    // QPSK
    @(negedge clk) dc_mode = 0;
    n0 = outs.size();
    while (n_in < 8 * (NS - 10)) @(posedge clk);
    #1;
    // skip the start-up (first 20 symbols) and search the sampling phase
    best_min = -1e9; best_ph = 0;
    for (int ph = 0; ph < 32; ph++) begin
      automatic real mn = 1e9;
      for (int k = n0 + 20 * 32 + ph; k < outs.size(); k += 32) begin
        automatic iq_t v = iq_t'(outs[k]);
        if ((v.i < 0 ? -real'(v.i) : real'(v.i)) < mn) mn = (v.i < 0 ? -real'(v.i) : real'(v.i));
        if ((v.q < 0 ? -real'(v.q) : real'(v.q)) < mn) mn = (v.q < 0 ? -real'(v.q) : real'(v.q));
      end
      if (mn > best_min) begin best_min = mn; best_ph = ph; end
    end
    checks++;
    if (best_min < 0.75 * 6000.0) begin failures++; $display("FAIL eye opening %f at phase %0d", best_min, best_ph); end
    // OP6
    bfm.write(12'h000, 32'd40);
    bfm.write(12'h004, 32'd1);
    while (pkt_last == 0 && guard < 100000) begin @(posedge clk); guard++; end
    #1;
    checks++;
    if (pkt.size() != 40 || pkt_last != 40) begin failures++; $display("FAIL OP6 packet of %0d", pkt.size()); end
    begin
      int hits = 0;
      for (int s = 0; s + 40 <= outs.size(); s++) begin
        automatic bit ok = 1;
        for (int k = 0; k < 40 && ok; k++) if (outs[s+k] != pkt[k]) ok = 0;
        if (ok) hits++;
      end
      checks++;
      if (hits != 1) begin failures++; $display("FAIL OP6 packet found %0d times in the output", hits); end
    end
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
