// tb_rx_hierarchy: the receive hierarchy (128 -> 25.6 MHz stage, decimation,
// coarse sync, matched filter, timing sync, AXI-Lite decoder) at reduced size
// (CIC factors 2 and 2, 64-point coarse FFT). The ADC input is generated
// here with real arithmetic: random QPSK with a root raised cosine pulse
// (roll-off 0.5) at 640 converter samples per symbol, amplitude 8000, with a
// carrier offset of -2.2 coarse FFT bins. Checks:
//  * recovered bits equal the transmitted ones for some delay and 90-degree
//    rotation over 120 symbols;
//  * the coarse correction register (0x10C) holds +2 * 2^24;
//  * packets from OP4..OP7, requested through the decoder windows 0x000,
//    0x100, 0x200, 0x300, have the requested sizes and end with tlast;
//  * register read-back through each window (packet sizes, sync_reset
//    default 16000), and no crossing FIFO overflow.
module tb_rx_hierarchy;
  import sdr_pkg::*;
  logic clk_25 = 0, clk_128 = 0, rst_25 = 1, rst_128 = 1;
  always #25 clk_25 = ~clk_25;
  initial begin #3; forever #5 clk_128 = ~clk_128; end
  int checks = 0, failures = 0;

  localparam int  NS   = 330;
  localparam int  SPSA = 640;                   // converter samples per symbol
  localparam real FOFF = -2.2 / 256.0 / 80.0;   // cycles per converter sample

  axil_req_t   req;
  axil_rsp_t   rsp;
  logic [15:0] adc_i, adc_q;
  logic        adc_tvalid, sym_valid, ovf;
  axis32_t     op_axis [4];
  iq_t         sym;
  logic [1:0]  sym_bits;

  rx_hierarchy #(.CIC1_R(2), .CIC2_R(2), .COARSE_LOG2N(6)) dut (
    .clk_25(clk_25), .rst_25(rst_25), .clk_128(clk_128), .rst_128(rst_128),
    .s_axil_req(req), .s_axil_rsp(rsp),
    .adc_i_tdata(adc_i), .adc_q_tdata(adc_q), .adc_tvalid(adc_tvalid),
    .op_axis(op_axis), .op_tready(4'hf),
    .sym_valid(sym_valid), .sym(sym), .sym_bits(sym_bits), .fifo_overflow(ovf));
  axil_bfm bfm (.clk(clk_25), .req(req), .rsp(rsp));

  function automatic real rrc(real t);
    real b = 0.5;
    if (t ** 2 < 1e-12) return 1.0 - b + 4.0 * b / PI;
    if ((4.0 * b * t) ** 2 - 1.0 < 1e-9 && (4.0 * b * t) ** 2 - 1.0 > -1e-9)
      return b / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * b)) + (1.0 - 2.0 / PI) * $cos(PI / (4.0 * b)));
    return ($sin(PI * t * (1.0 - b)) + 4.0 * b * t * $cos(PI * t * (1.0 + b))) / (PI * t * (1.0 - (4.0 * b * t) ** 2));
  endfunction

  real ai [NS], aq [NS];
  int  n = 0;
  always @(posedge clk_128) begin
    automatic real t = real'(n) / SPSA;
    automatic real yi = 0.0, yq = 0.0, ph = 2.0 * PI * FOFF * n;
    automatic int  s0 = int'($floor(t));
    for (int s = s0 - 5; s <= s0 + 5; s++) if (s >= 0 && s < NS) begin
      yi += ai[s] * rrc(t - s);
      yq += aq[s] * rrc(t - s);
    end
    adc_tvalid <= !rst_128;
    adc_i <= 16'($rtoi(8000.0 * (yi * $cos(ph) - yq * $sin(ph))));
    adc_q <= 16'($rtoi(8000.0 * (yi * $sin(ph) + yq * $cos(ph))));
    if (!rst_128) n++;
  end

  logic [1:0] rx_bits [$];
  always @(posedge clk_25) if (!rst_25 && sym_valid) rx_bits.push_back(sym_bits);

  logic [31:0] pk [4][$];
  int          last_at [4];
  always @(posedge clk_25) if (!rst_25) for (int p = 0; p < 4; p++)
    if (op_axis[p].tvalid) begin
      pk[p].push_back(op_axis[p].tdata);
      if (op_axis[p].tlast) last_at[p] = pk[p].size();
    end

  function automatic void expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: %0d, want %0d", what, got, want); end
  endfunction

  initial begin
    logic [31:0] v;
    int best_err;
    int sizes [4] = '{64, 48, 80, 12};
    for (int s = 0; s < NS; s++) begin
      ai[s] = $urandom_range(0, 1) ? 1.0 : -1.0;
      aq[s] = $urandom_range(0, 1) ? 1.0 : -1.0;
    end
    repeat (3) @(posedge clk_25);
    rst_128 = 0;
    @(negedge clk_25) rst_25 = 0;
    // register windows
    for (int p = 0; p < 4; p++) bfm.write(12'(p * 256), 32'(sizes[p]));
    for (int p = 0; p < 4; p++) begin
      bfm.read(12'(p * 256), v);
      expect_eq($sformatf("window %0d packet size read-back", p), v, sizes[p]);
    end
    bfm.read(12'h314, v);
    expect_eq("sync_reset default", v, 16000);

    wait (rx_bits.size() >= 190);
    for (int p = 0; p < 4; p++) bfm.write(12'(p * 256 + 4), 32'd1);
    wait (rx_bits.size() >= 310);
    best_err = 1 << 30;
    for (int d = -10; d <= 60; d++) for (int r = 0; r < 4; r++) begin
      automatic int err = 0;
      for (int j = 190; j < 310; j++) begin
        automatic int s = j - d;
        automatic real xi = ai[s], xq = aq[s], tmp;
        for (int k = 0; k < r; k++) begin tmp = xi; xi = -xq; xq = tmp; end
        if (rx_bits[j] != {xi < 0.0, xq < 0.0}) err++;
      end
      if (err < best_err) best_err = err;
    end
    expect_eq("bit pair errors in 120 symbols", best_err, 0);
    bfm.read(12'h10C, v);
    expect_eq("coarse correction", $signed(v), 2 * (1 << 24));
    for (int p = 0; p < 4; p++) begin
      expect_eq($sformatf("OP%0d packet size", p + 4), pk[p].size(), sizes[p]);
      expect_eq($sformatf("OP%0d tlast position", p + 4), last_at[p], sizes[p]);
    end
    expect_eq("FIFO overflow", ovf, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS * SPSA + 50000) @(posedge clk_128);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
