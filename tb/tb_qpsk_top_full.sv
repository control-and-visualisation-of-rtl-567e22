// tb_qpsk_top_full: the transceiver top at its default (full-size)
// parameters: 500 symbols/s from a 51200x interpolation chain, 1024-point
// FFTs, receive decimation 6400. The DAC output is looped straight back to the
// ADC. In about 6.6 million processing clocks (0.26 s of device time) it
// checks:
//  * the DAC stream is valid on every converter clock and carries signal;
//  * an OP1 packet of the reset size, 128 symbols, holds the first 128 PRBS
//    symbols (seed 1, x^15 + x^14 + 1, Gray mapped);
//  * an OP4 packet of the reset size, 1024 samples, arrives from the 4 ksps
//    receive stage (one sample per 6400 processing clocks) with tlast on the
//    last beat;
//  * register reset values: OP1 packet size 128, OP2 1024, OP3 1024,
//    receive OP6 512, OP7 16, sync_reset 16000;
//  * neither crossing FIFO overflows.
module tb_qpsk_top_full;
  import sdr_pkg::*;
  logic tx_clk_25 = 0, tx_clk_128 = 0, rx_clk_25 = 0, rx_clk_128 = 0;
  logic tx_rst_25 = 1, tx_rst_128 = 1, rx_rst_25 = 1, rx_rst_128 = 1;
  always #20 tx_clk_25 = ~tx_clk_25;
  initial begin #1; forever #4 tx_clk_128 = ~tx_clk_128; end
  initial begin #7; forever #20 rx_clk_25 = ~rx_clk_25; end
  initial begin #2; forever #4 rx_clk_128 = ~rx_clk_128; end
  int checks = 0, failures = 0;

  axil_req_t   tx_req, rx_req;
  axil_rsp_t   tx_rsp, rx_rsp;
  logic [31:0] dac_tdata;
  logic        dac_tvalid, rx_sym_valid, tx_ovf, rx_ovf;
  axis32_t     op_axis [7];
  iq_t         rx_sym;
  logic [1:0]  rx_sym_bits;

  qpsk_top dut (
    .tx_clk_25(tx_clk_25), .tx_rst_25(tx_rst_25), .tx_clk_128(tx_clk_128), .tx_rst_128(tx_rst_128),
    .rx_clk_25(rx_clk_25), .rx_rst_25(rx_rst_25), .rx_clk_128(rx_clk_128), .rx_rst_128(rx_rst_128),
    .s_axil_tx_req(tx_req), .s_axil_tx_rsp(tx_rsp), .s_axil_rx_req(rx_req), .s_axil_rx_rsp(rx_rsp),
    .dac_tdata(dac_tdata), .dac_tvalid(dac_tvalid),
    .adc_i_tdata(dac_tdata[15:0]), .adc_q_tdata(dac_tdata[31:16]), .adc_tvalid(!rx_rst_128),
    .op_axis(op_axis), .op_tready(7'h7f),
    .rx_sym_valid(rx_sym_valid), .rx_sym(rx_sym), .rx_sym_bits(rx_sym_bits),
    .tx_fifo_overflow(tx_ovf), .rx_fifo_overflow(rx_ovf));

  axil_bfm tx_bfm (.clk(tx_clk_25), .req(tx_req), .rsp(tx_rsp));
  axil_bfm rx_bfm (.clk(rx_clk_25), .req(rx_req), .rsp(rx_rsp));

  logic [31:0] pk [7][$];
  int          last_at [7];
  always @(posedge tx_clk_25) if (!tx_rst_25 && op_axis[0].tvalid) begin
    pk[0].push_back(op_axis[0].tdata);
    if (op_axis[0].tlast) last_at[0] = pk[0].size();
  end
  always @(posedge rx_clk_25) if (!rx_rst_25 && op_axis[3].tvalid) begin
    pk[3].push_back(op_axis[3].tdata);
    if (op_axis[3].tlast) last_at[3] = pk[3].size();
  end

  int  gaps = 0, nz = 0;
  bit  started = 0;
  always @(posedge tx_clk_128) if (started) begin
    if (!dac_tvalid) gaps++;
    else if (dac_tdata != 0) nz++;
  end

  function automatic void expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: %0d, want %0d", what, got, want); end
  endfunction

  initial begin
    logic [31:0] v;
    bit o [256];
    repeat (3) @(posedge tx_clk_25);
    tx_rst_128 = 0; rx_rst_128 = 0;
    @(negedge tx_clk_25) tx_rst_25 = 0;
    @(negedge rx_clk_25) rx_rst_25 = 0;
    tx_bfm.read(12'h004, v);  expect_eq("OP1 packet size reset", v, 128);
    tx_bfm.read(12'h00C, v);  expect_eq("OP2 packet size reset", v, 1024);
    tx_bfm.read(12'h014, v);  expect_eq("OP3 packet size reset", v, 1024);
    rx_bfm.read(12'h200, v);  expect_eq("OP6 packet size reset", v, 512);
    rx_bfm.read(12'h300, v);  expect_eq("OP7 packet size reset", v, 16);
    rx_bfm.read(12'h314, v);  expect_eq("sync_reset reset", v, 16000);
    tx_bfm.write(12'h008, 32'd1);
    rx_bfm.write(12'h004, 32'd1);
    repeat (2000) @(posedge tx_clk_128);
    started = 1;
    wait (last_at[0] != 0 && last_at[3] != 0);
    #1;
    // PRBS from seed 1: 14 zeros, a one, then o[n] = o[n-15] ^ o[n-14]
    for (int n = 0; n < 14; n++) o[n] = 0;
    o[14] = 1;
    for (int n = 15; n < 256; n++) o[n] = o[n-15] ^ o[n-14];
    expect_eq("OP1 packet size", pk[0].size(), 128);
    expect_eq("OP1 tlast position", last_at[0], 128);
    for (int k = 0; k < pk[0].size(); k++) begin
      automatic iq_t s = iq_t'(pk[0][k]);
      expect_eq($sformatf("OP1 symbol %0d I", k), s.i, o[2*k] ? -8192 : 8192);
      expect_eq($sformatf("OP1 symbol %0d Q", k), s.q, o[2*k+1] ? -8192 : 8192);
    end
    expect_eq("OP4 packet size", pk[3].size(), 1024);
    expect_eq("OP4 tlast position", last_at[3], 1024);
    expect_eq("idle DAC cycles", gaps, 0);
    checks++;
    if (nz < 1000) begin failures++; $display("FAIL DAC carries no signal (%0d nonzero samples)", nz); end
    expect_eq("tx FIFO overflow", tx_ovf, 0);
    expect_eq("rx FIFO overflow", rx_ovf, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (7000000) @(posedge tx_clk_25);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
