// tb_rx_tsync_core: symbol timing and fine carrier recovery at 32 samples per
// symbol. The input is random QPSK with a raised cosine pulse (roll-off 0.5,
// the combined transmit and receive filter), amplitude 6000, generated here
// with real arithmetic, with impairments: a fractional start offset, a
// symbol period of 32.02 samples (clock mismatch), a carrier offset of
// 2e-4 cycles per sample and a fixed phase of 0.5 rad. One input sample
// every 2 clocks. Checks:
//  * after lock (symbols 240..489, before the first periodic loop reset),
//    the recovered bits equal the transmitted bits for some delay and
//    90-degree rotation (the QPSK ambiguity);
//  * the recovered symbols are tight: both rails above 70 % of 6000;
//  * the default loop reset after 16000 samples clears the frequency
//    register, which held the converged offset just before;
//  * exactly one symbol per 32 input samples on average (within the clock
//    mismatch) and the adjustment counter shows timing corrections;
//  * the frequency register converges to -2e-4 * 2^32 within 15 %;
//  * writing sync_reset = 1 clears the loop filters on every sample, so the
//    frequency register then stays near 0;
//  * an OP7 packet of 16 symbols ends with tlast.
module tb_rx_tsync_core;
  import sdr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  axil_req_t  req;
  axil_rsp_t  rsp;
  logic       in_valid, sym_valid;
  iq_t        in_data, sym;
  logic [1:0] sym_bits;
  axis32_t    op_axis;

  rx_tsync_core dut (
    .clk(clk), .rst(rst), .s_axil_req(req), .s_axil_rsp(rsp),
    .in_valid(in_valid), .in_data(in_data), .sym_valid(sym_valid), .sym(sym), .sym_bits(sym_bits),
    .op_axis(op_axis), .op_tready(1'b1));
  axil_bfm bfm (.clk(clk), .req(req), .rsp(rsp));

  localparam int  NS   = 700;
  localparam real TSYM = 32.02;
  localparam real FOFF = 2.0e-4;
  real ai [NS], aq [NS];

  function automatic real rc(real t);
    real b = 0.5;
    real den = 1.0 - (2.0 * b * t) ** 2;
    if (den < 1e-6 && den > -1e-6) return PI / 4.0 * sinc(1.0 / (2.0 * b));
    return sinc(t) * $cos(PI * b * t) / den;
  endfunction

  int n = 0;
  always @(negedge clk) begin
    in_valid <= 1'b0;
    if (!rst && !in_valid) begin
      automatic real t = real'(n) / TSYM + 0.37;
      automatic real yi = 0.0, yq = 0.0, ph;
      automatic int  s0 = int'($floor(t));
      for (int s = s0 - 8; s <= s0 + 8; s++) if (s >= 0 && s < NS) begin
        yi += ai[s] * rc(t - s);
        yq += aq[s] * rc(t - s);
      end
      ph = 2.0 * PI * FOFF * n + 0.5;
      in_valid  <= 1'b1;
      in_data.i <= sample_t'($rtoi(6000.0 * (yi * $cos(ph) - yq * $sin(ph))));
      in_data.q <= sample_t'($rtoi(6000.0 * (yi * $sin(ph) + yq * $cos(ph))));
      n++;
    end
  end

  int          nsym = 0;
  logic [1:0]  rx_bits [$];
  iq_t         rx_sym [$];
  always @(posedge clk) if (!rst && sym_valid) begin
    nsym++;
    rx_bits.push_back(sym_bits);
    rx_sym.push_back(sym);
  end

  logic [31:0] pkt [$];
  int pkt_last = 0;
  always @(posedge clk) if (!rst && op_axis.tvalid) begin
    pkt.push_back(op_axis.tdata);
    if (op_axis.tlast) pkt_last = pkt.size();
  end

  initial begin
    logic [31:0] freq, adj;
    int best_err, guard;
    for (int s = 0; s < NS; s++) begin
      ai[s] = $urandom_range(0, 1) ? 1.0 : -1.0;
      aq[s] = $urandom_range(0, 1) ? 1.0 : -1.0;
    end
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;
    // the default loop reset (every 16000 samples) clears the frequency
    // integrator: read it just before and just after
    while (n < 15900) @(posedge clk);
    bfm.read(12'h00C, freq);
    checks++;
    if (real'($signed(freq)) > -0.85 * FOFF * 2.0 ** 32 || real'($signed(freq)) < -1.15 * FOFF * 2.0 ** 32) begin
      failures++; $display("FAIL frequency register %0d before the loop reset, want about %0d", $signed(freq), -$rtoi(FOFF * 2.0 ** 32));
    end
    while (n < 16010) @(posedge clk);
    bfm.read(12'h00C, freq);
    checks++;
    if (real'($signed(freq)) ** 2 > (0.2 * FOFF * 2.0 ** 32) ** 2) begin
      failures++; $display("FAIL frequency register %0d just after the loop reset", $signed(freq));
    end
    while (n < 32 * 620) @(posedge clk);
    #1;
    // bits: search delay and rotation over the last 250 received symbols
    best_err = 1 << 30;
    for (int d = -40; d <= 40; d++) for (int r = 0; r < 4; r++) begin
      automatic int err = 0;
      for (int j = 240; j < 490; j++) begin
        automatic int s = j + d;
        automatic real xi = ai[s < 0 ? 0 : s], xq = aq[s < 0 ? 0 : s], tmp;
        for (int k = 0; k < r; k++) begin tmp = xi; xi = -xq; xq = tmp; end
        if (rx_bits[j] != {xi < 0.0, xq < 0.0}) err++;
      end
      if (err < best_err) best_err = err;
    end
    checks++;
    if (best_err != 0) begin failures++; $display("FAIL %0d bit pairs wrong out of 250 symbols", best_err); end
    for (int j = 240; j < 490; j++) begin
      checks++;
      if ((rx_sym[j].i < 0 ? -int'(rx_sym[j].i) : int'(rx_sym[j].i)) < 4200 ||
          (rx_sym[j].q < 0 ? -int'(rx_sym[j].q) : int'(rx_sym[j].q)) < 4200) begin
        failures++;
        if (failures < 6) $display("FAIL loose symbol %0d: (%0d,%0d)", j, int'(rx_sym[j].i), int'(rx_sym[j].q));
      end
    end
    checks++;
    if (nsym < 620 * 32 / TSYM - 3 || nsym > 620 * 32 / TSYM + 3) begin
      failures++; $display("FAIL %0d symbols for %0d samples", nsym, n);
    end
    bfm.read(12'h010, adj);
    checks++;
    if (adj == 0) begin failures++; $display("FAIL no timing adjustments"); end
    bfm.read(12'h00C, freq);
    checks++;
    if (real'($signed(freq)) > -0.85 * FOFF * 2.0 ** 32 || real'($signed(freq)) < -1.15 * FOFF * 2.0 ** 32) begin
      failures++; $display("FAIL frequency register %0d, want about %0d", $signed(freq), -$rtoi(FOFF * 2.0 ** 32));
    end
    // OP7
    bfm.write(12'h000, 32'd16);
    bfm.write(12'h004, 32'd1);
    guard = 0;
    while (pkt_last == 0 && guard < 200000) begin @(posedge clk); guard++; end
    checks++;
    if (pkt.size() != 16 || pkt_last != 16) begin failures++; $display("FAIL OP7 packet of %0d", pkt.size()); end
    // periodic loop reset every sample: the integrator cannot build up
    bfm.write(12'h014, 32'd1);
    repeat (2000) @(posedge clk);
    bfm.read(12'h00C, freq);
    checks++;
    if (real'($signed(freq)) ** 2 > (0.1 * FOFF * 2.0 ** 32) ** 2) begin
      failures++; $display("FAIL frequency register %0d with the loop reset every sample", $signed(freq));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
