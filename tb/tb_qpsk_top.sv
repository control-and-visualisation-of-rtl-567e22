// tb_qpsk_top: end-to-end test of the transceiver at reduced size. The
// transmitter runs with a CIC factor of 8 (128 processing clocks per symbol)
// and a 16-point FFT; the receiver with CIC factors 2 and 2, so the receive
// chain still sees 8 samples per symbol at its "4 ksps" stage and 32 at the
// synchroniser, and a 64-point coarse FFT. The DAC output is looped back to
// the ADC through a channel model: a carrier offset of 3.1 coarse FFT bins,
// a phase of 1 rad, and a receive clock 0.1 % slower than the transmit
// clock (the converter sample is taken at whatever the DAC holds at the
// receive clock edge). Observation point packets use the reset sizes
// (Table-1 style: OP1 128, OP2 1024, OP4 1024, OP5 1024, OP6 512, OP7 16) and
// OP3 one 16-bin frame.
// Mechanisms counted (each is one or more checks):
//  1. recovered bits equal the PRBS bits (seed 1, x^15 + x^14 + 1) for some
//     delay and 90-degree rotation, over the last 150 symbols;
//  2. coarse correction register = -3 * 2^24 (bin 3 of 64, times 1/4);
//  3. fine frequency register holds the residual 0.1-bin offset (sign and
//     magnitude within 30 %);
//  4. timing adjustments were made (clock mismatch);
//  5. all seven observation points deliver one packet of the requested size
//     with tlast on the last beat; OP1 holds consecutive PRBS symbols; OP3
//     is a whole frame;
//  6. transmit gain: writing 16384 halves the DAC RMS;
//  7. no crossing FIFO overflow on either side;
//  8. the synchroniser loop reset (sync_reset = 1) holds the fine frequency
//     register at 0.
module tb_qpsk_top;
  import sdr_pkg::*;
  // time unit: 1 ns by default; clock half periods below
  logic tx_clk_25 = 0, tx_clk_128 = 0, rx_clk_25 = 0, rx_clk_128 = 0;
  logic tx_rst_25 = 1, tx_rst_128 = 1, rx_rst_25 = 1, rx_rst_128 = 1;
  always #25000 tx_clk_25 = ~tx_clk_25;
  initial begin #1000; forever #5000 tx_clk_128 = ~tx_clk_128; end
  initial begin #333; forever #25025 rx_clk_25 = ~rx_clk_25; end
  initial begin #2777; forever #5005 rx_clk_128 = ~rx_clk_128; end
  int checks = 0, failures = 0;

  localparam int  NSYM  = 700;
  localparam real FOFF  = 3.1 / 256.0 / 80.0;   // cycles per ADC sample

  axil_req_t   tx_req, rx_req;
  axil_rsp_t   tx_rsp, rx_rsp;
  logic [31:0] dac_tdata;
  logic        dac_tvalid, adc_tvalid, rx_sym_valid, tx_ovf, rx_ovf;
  logic [15:0] adc_i, adc_q;
  axis32_t     op_axis [7];
  iq_t         rx_sym;
  logic [1:0]  rx_sym_bits;

  qpsk_top #(.TX_CIC_R(8), .TX_FFT_LOG2N(4), .RX_CIC1_R(2), .RX_CIC2_R(2), .COARSE_LOG2N(6)) dut (
    .tx_clk_25(tx_clk_25), .tx_rst_25(tx_rst_25), .tx_clk_128(tx_clk_128), .tx_rst_128(tx_rst_128),
    .rx_clk_25(rx_clk_25), .rx_rst_25(rx_rst_25), .rx_clk_128(rx_clk_128), .rx_rst_128(rx_rst_128),
    .s_axil_tx_req(tx_req), .s_axil_tx_rsp(tx_rsp), .s_axil_rx_req(rx_req), .s_axil_rx_rsp(rx_rsp),
    .dac_tdata(dac_tdata), .dac_tvalid(dac_tvalid),
    .adc_i_tdata(adc_i), .adc_q_tdata(adc_q), .adc_tvalid(adc_tvalid),
    .op_axis(op_axis), .op_tready(7'h7f),
    .rx_sym_valid(rx_sym_valid), .rx_sym(rx_sym), .rx_sym_bits(rx_sym_bits),
    .tx_fifo_overflow(tx_ovf), .rx_fifo_overflow(rx_ovf));

  axil_bfm tx_bfm (.clk(tx_clk_25), .req(tx_req), .rsp(tx_rsp));
  axil_bfm rx_bfm (.clk(rx_clk_25), .req(rx_req), .rsp(rx_rsp));

  // ---------------- channel ----------------
  real    ph = 1.0;
  longint n_adc = 0;
  always @(posedge rx_clk_128) begin
    automatic iq_t d = iq_t'(dac_tdata);
    adc_tvalid <= !rx_rst_128;
    adc_i <= 16'($rtoi(real'(d.i) * $cos(ph) - real'(d.q) * $sin(ph)));
    adc_q <= 16'($rtoi(real'(d.i) * $sin(ph) + real'(d.q) * $cos(ph)));
    ph += 2.0 * PI * FOFF;
    if (ph > 2.0 * PI) ph -= 2.0 * PI;
    n_adc++;
  end

  // ---------------- PRBS reference ----------------
  int sym_i [NSYM], sym_q [NSYM];
  initial begin
    bit o [2*NSYM];
    for (int n = 0; n < 14; n++) o[n] = 0;
    o[14] = 1;
    for (int n = 15; n < 2 * NSYM; n++) o[n] = o[n-15] ^ o[n-14];
    for (int s = 0; s < NSYM; s++) begin
      sym_i[s] = o[2*s]   ? -8192 : 8192;
      sym_q[s] = o[2*s+1] ? -8192 : 8192;
    end
  end

  // ---------------- receiver output ----------------
  logic [1:0] rx_bits [$];
  always @(posedge rx_clk_25) if (!rx_rst_25 && rx_sym_valid) rx_bits.push_back(rx_sym_bits);

  // ---------------- packet collectors ----------------
  logic [31:0] pk [7][$];
  int          last_at [7];
  always @(posedge tx_clk_25) if (!tx_rst_25) for (int p = 0; p < 3; p++)
    if (op_axis[p].tvalid) begin
      pk[p].push_back(op_axis[p].tdata);
      if (op_axis[p].tlast) last_at[p] = pk[p].size();
    end
  always @(posedge rx_clk_25) if (!rx_rst_25) for (int p = 3; p < 7; p++)
    if (op_axis[p].tvalid) begin
      pk[p].push_back(op_axis[p].tdata);
      if (op_axis[p].tlast) last_at[p] = pk[p].size();
    end

  // DAC power
  real dac_acc = 0.0;
  int  dac_n = 0;
  always @(posedge tx_clk_128) if (dac_tvalid) begin
    automatic iq_t d = iq_t'(dac_tdata);
    dac_acc += real'(d.i) ** 2 + real'(d.q) ** 2;
    dac_n++;
  end
  task automatic dac_rms(output real r);
    dac_acc = 0.0; dac_n = 0;
    repeat (20000) @(posedge tx_clk_128);
    r = $sqrt(dac_acc / dac_n);
  endtask

  function automatic void expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: %0d, want %0d", what, got, want); end
  endfunction

  initial begin
    logic [31:0] v;
    int best_err, best_d, best_r, hits;
    real r1, r2;
    repeat (3) @(posedge tx_clk_25);
    tx_rst_128 = 0; rx_rst_128 = 0;
    @(negedge tx_clk_25) tx_rst_25 = 0;
    @(negedge rx_clk_25) rx_rst_25 = 0;

    // request every observation point once the receiver has settled
    wait (rx_bits.size() >= 420);
    tx_bfm.write(12'h008, 32'd1);
    tx_bfm.write(12'h010, 32'd1);
    tx_bfm.write(12'h018, 32'd1);
    rx_bfm.write(12'h004, 32'd1);
    rx_bfm.write(12'h104, 32'd1);
    rx_bfm.write(12'h204, 32'd1);
    rx_bfm.write(12'h304, 32'd1);
    wait (rx_bits.size() >= 580);

    // 1: bits
    best_err = 1 << 30; best_d = 0; best_r = 0;
    for (int d = -10; d <= 60; d++) for (int r = 0; r < 4; r++) begin
      automatic int err = 0;
      for (int j = 430; j < 580; j++) begin
        automatic int s = j - d;
        automatic int xi = sym_i[s], xq = sym_q[s], tmp;
        for (int k = 0; k < r; k++) begin tmp = xi; xi = -xq; xq = tmp; end
        if (rx_bits[j] != {xi < 0, xq < 0}) err++;
      end
      if (err < best_err) begin best_err = err; best_d = d; best_r = r; end
    end
    expect_eq("bit pair errors in 150 symbols", best_err, 0);
    $display("receiver delay %0d symbols, rotation %0d x 90 deg", best_d, best_r);

    // 2..4: synchroniser registers
    rx_bfm.read(12'h10C, v);
    expect_eq("coarse correction", $signed(v), -3 * (1 << 24));
    rx_bfm.read(12'h30C, v);
    begin
      // residual 0.1 bin at the 16 ksps stage, NCO rotates by +freq
      automatic real want = -0.1 / 256.0 / 4.0 * 2.0 ** 32;
      checks++;
      if (real'($signed(v)) / want < 0.7 || real'($signed(v)) / want > 1.3) begin
        failures++; $display("FAIL fine frequency %0d, want about %0d", $signed(v), $rtoi(want));
      end
    end
    rx_bfm.read(12'h310, v);
    checks++;
    if (v == 0) begin failures++; $display("FAIL no timing adjustments"); end
    $display("timing adjustments: %0d", v);

    // 5: packets
    begin
      int want [7] = '{128, 1024, 16, 1024, 1024, 512, 16};
      for (int p = 0; p < 7; p++) begin
        expect_eq($sformatf("OP%0d packet size", p + 1), pk[p].size(), want[p]);
        expect_eq($sformatf("OP%0d tlast position", p + 1), last_at[p], want[p]);
      end
    end
    hits = 0;
    for (int s0 = 0; s0 + 128 <= NSYM; s0++) begin
      automatic bit ok = 1;
      for (int k = 0; k < 128 && ok; k++) begin
        automatic iq_t q = iq_t'(pk[0][k]);
        if (int'(q.i) != sym_i[s0+k] || int'(q.q) != sym_q[s0+k]) ok = 0;
      end
      if (ok) hits++;
    end
    expect_eq("OP1 packet matches PRBS symbols", hits, 1);

    // 6: transmit gain
    dac_rms(r1);
    tx_bfm.write(12'h000, 32'd16384);
    repeat (2000) @(posedge tx_clk_128);
    dac_rms(r2);
    checks++;
    if (r2 / r1 < 0.4 || r2 / r1 > 0.6) begin failures++; $display("FAIL gain: DAC rms %f -> %f", r1, r2); end

    // 7: overflow flags
    expect_eq("tx FIFO overflow", tx_ovf, 0);
    expect_eq("rx FIFO overflow", rx_ovf, 0);

    // 8: synchroniser loop reset on every sample
    rx_bfm.write(12'h314, 32'd1);
    repeat (200) @(posedge rx_clk_25);
    rx_bfm.read(12'h30C, v);
    checks++;
    if ($signed(v) > 2000 || $signed(v) < -2000) begin
      failures++; $display("FAIL fine frequency %0d with the loop reset on every sample", $signed(v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (700 * 128 + 20000) @(posedge tx_clk_25);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
