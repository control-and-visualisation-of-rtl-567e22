// tx_hierarchy: the transmit subsystem. The QPSK transmit core runs in the
// 25.6 MHz domain and produces 25.6 Msps; the interpolation stage carries the
// samples into the 128 MHz domain and raises the rate by 5 to 128 Msps, the
// 32-bit {Q,I} AXI-Stream taken by the RF-DAC (whose own x8 interpolator and
// mixer are outside this design). The three observation-point streams of the
// core leave the hierarchy for their DMA engines. The 25.6 MHz and 128 MHz
// clocks must be frequency locked (one PLL), so that the stage's FIFO neither
// fills nor drains.
module tx_hierarchy
  import sdr_pkg::*;
#(
  parameter int CIC_R     = 3200,
  parameter int FFT_LOG2N = 10
) (
  input  logic        clk_25,
  input  logic        rst_25,
  input  logic        clk_128,
  input  logic        rst_128,
  input  axil_req_t   s_axil_req,
  output axil_rsp_t   s_axil_rsp,
  output axis32_t     op_axis [3],
  input  logic [2:0]  op_tready,
  output logic [31:0] dac_tdata,
  output logic        dac_tvalid,
  output logic        fifo_overflow
);
  iq_t  tx_data;
  logic tx_valid;

  qpsk_tx_core #(.CIC_R(CIC_R), .FFT_LOG2N(FFT_LOG2N)) u_core (
    .clk(clk_25), .rst(rst_25), .s_axil_req(s_axil_req), .s_axil_rsp(s_axil_rsp),
    .tx_data(tx_data), .tx_valid(tx_valid), .op_axis(op_axis), .op_tready(op_tready)
  );

  ipi_interp_stage u_interp (
    .clk_lo(clk_25), .rst_lo(rst_25), .in_valid(tx_valid), .in_data(tx_data),
    .clk_hi(clk_128), .rst_hi(rst_128), .m_tdata(dac_tdata), .m_tvalid(dac_tvalid),
    .overflow(fifo_overflow)
  );
endmodule
