// qpsk_top: programmable-logic part of a single-channel QPSK software-defined
// radio transceiver with software control and observation points. The
// transmitter (LFSR data, Gray QPSK at 500 symbols/s, RRC pulse shaping and
// interpolation to 128 Msps) and the receiver (decimation from 128 Msps to
// 4 ksps, FFT-based coarse frequency correction, matched filtering,
// interpolation to 32 samples per symbol, timing and fine frequency
// synchronisation) share no clocks or signals; they meet only through the RF
// path outside the chip.
// Ports: four clocks with synchronous active-high resets (transmit and receive
// each have a 25.6 MHz processing clock and a 128 MHz converter-stream clock),
// one AXI-Lite control port per direction (25.6 MHz of that direction), the
// 32-bit {Q,I} stream to the RF-DAC, the two 16-bit streams from the RF-ADC,
// the seven observation-point AXI-Stream masters towards the DMA engines
// (index 0..6 = OP1..OP7; 0..2 in the transmit clock domain, 3..6 in the
// receive one), and the recovered symbols.
module qpsk_top
  import sdr_pkg::*;
#(
  parameter int TX_CIC_R     = 3200,
  parameter int TX_FFT_LOG2N = 10,
  parameter int RX_CIC1_R    = 40,
  parameter int RX_CIC2_R    = 40,
  parameter int COARSE_LOG2N = 10
) (
  input  logic        tx_clk_25,
  input  logic        tx_rst_25,
  input  logic        tx_clk_128,
  input  logic        tx_rst_128,
  input  logic        rx_clk_25,
  input  logic        rx_rst_25,
  input  logic        rx_clk_128,
  input  logic        rx_rst_128,
  input  axil_req_t   s_axil_tx_req,
  output axil_rsp_t   s_axil_tx_rsp,
  input  axil_req_t   s_axil_rx_req,
  output axil_rsp_t   s_axil_rx_rsp,
  output logic [31:0] dac_tdata,
  output logic        dac_tvalid,
  input  logic [15:0] adc_i_tdata,
  input  logic [15:0] adc_q_tdata,
  input  logic        adc_tvalid,
  output axis32_t     op_axis [7],
  input  logic [6:0]  op_tready,
  output logic        rx_sym_valid,
  output iq_t         rx_sym,
  output logic [1:0]  rx_sym_bits,
  output logic        tx_fifo_overflow,
  output logic        rx_fifo_overflow
);
  axis32_t tx_op [3];
  axis32_t rx_op [4];

  tx_hierarchy #(.CIC_R(TX_CIC_R), .FFT_LOG2N(TX_FFT_LOG2N)) u_tx (
    .clk_25(tx_clk_25), .rst_25(tx_rst_25), .clk_128(tx_clk_128), .rst_128(tx_rst_128),
    .s_axil_req(s_axil_tx_req), .s_axil_rsp(s_axil_tx_rsp),
    .op_axis(tx_op), .op_tready(op_tready[2:0]),
    .dac_tdata(dac_tdata), .dac_tvalid(dac_tvalid), .fifo_overflow(tx_fifo_overflow)
  );

  rx_hierarchy #(.CIC1_R(RX_CIC1_R), .CIC2_R(RX_CIC2_R), .COARSE_LOG2N(COARSE_LOG2N)) u_rx (
    .clk_25(rx_clk_25), .rst_25(rx_rst_25), .clk_128(rx_clk_128), .rst_128(rx_rst_128),
    .s_axil_req(s_axil_rx_req), .s_axil_rsp(s_axil_rx_rsp),
    .adc_i_tdata(adc_i_tdata), .adc_q_tdata(adc_q_tdata), .adc_tvalid(adc_tvalid),
    .op_axis(rx_op), .op_tready(op_tready[6:3]),
    .sym_valid(rx_sym_valid), .sym(rx_sym), .sym_bits(rx_sym_bits),
    .fifo_overflow(rx_fifo_overflow)
  );

  always_comb begin
    for (int k = 0; k < 3; k++) op_axis[k] = tx_op[k];
    for (int k = 0; k < 4; k++) op_axis[3+k] = rx_op[k];
  end
endmodule
