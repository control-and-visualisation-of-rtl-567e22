// rx_hierarchy: the receive subsystem. The two 16-bit RF-ADC streams at
// 128 Msps (the converter's own mixer and /8 decimator are outside this
// design) are decimated by 5 into the 25.6 MHz domain, then pass the four
// receive cores in turn:
//   decimation (25.6 Msps -> 4 ksps, OP4) -> coarse frequency sync (OP5) ->
//   RRC matched filter and x4 interpolation to 16 ksps (OP6) ->
//   timing and fine frequency sync (symbols, OP7).
// One AXI-Lite port reaches the four cores through a decoder, 256 bytes each:
// 0x000 decimation, 0x100 coarse sync, 0x200 RRC, 0x300 timing sync.
// The hierarchy's observation-point streams (OP4..OP7) leave for their DMA
// engines. The receive clocks are not locked to the transmitter's.
module rx_hierarchy
  import sdr_pkg::*;
#(
  parameter int CIC1_R       = 40,
  parameter int CIC2_R       = 40,
  parameter int COARSE_LOG2N = 10
) (
  input  logic        clk_25,
  input  logic        rst_25,
  input  logic        clk_128,
  input  logic        rst_128,
  input  axil_req_t   s_axil_req,
  output axil_rsp_t   s_axil_rsp,
  input  logic [15:0] adc_i_tdata,
  input  logic [15:0] adc_q_tdata,
  input  logic        adc_tvalid,
  output axis32_t     op_axis [4],
  input  logic [3:0]  op_tready,
  output logic        sym_valid,
  output iq_t         sym,
  output logic [1:0]  sym_bits,
  output logic        fifo_overflow
);
  localparam int IN_PERIOD = CIC1_R * 2 * CIC2_R * 2;  // clocks per 4 ksps sample

  axil_req_t m_req [4];
  axil_rsp_t m_rsp [4];
  logic      d_valid, dc_valid, cs_valid, rr_valid;
  iq_t       d_data, dc_data, cs_data, rr_data;

  axil_decoder #(.NS(4), .SUB_AW(8)) u_dec (
    .clk(clk_25), .rst(rst_25), .s_req(s_axil_req), .s_rsp(s_axil_rsp),
    .m_req(m_req), .m_rsp(m_rsp)
  );

  ipi_decim_stage u_decim5 (
    .clk_hi(clk_128), .rst_hi(rst_128), .adc_i(adc_i_tdata), .adc_q(adc_q_tdata),
    .adc_valid(adc_tvalid), .clk_lo(clk_25), .rst_lo(rst_25),
    .out_valid(d_valid), .out_data(d_data), .overflow(fifo_overflow)
  );

  rx_decimation_core #(.CIC1_R(CIC1_R), .CIC2_R(CIC2_R)) u_dec_core (
    .clk(clk_25), .rst(rst_25), .s_axil_req(m_req[0]), .s_axil_rsp(m_rsp[0]),
    .in_valid(d_valid), .in_data(d_data), .out_valid(dc_valid), .out_data(dc_data),
    .op_axis(op_axis[0]), .op_tready(op_tready[0])
  );

  rx_coarse_sync_core #(.LOG2N(COARSE_LOG2N)) u_coarse (
    .clk(clk_25), .rst(rst_25), .s_axil_req(m_req[1]), .s_axil_rsp(m_rsp[1]),
    .in_valid(dc_valid), .in_data(dc_data), .out_valid(cs_valid), .out_data(cs_data),
    .op_axis(op_axis[1]), .op_tready(op_tready[1])
  );

  rx_rrc_core #(.IN_PERIOD(IN_PERIOD)) u_rrc (
    .clk(clk_25), .rst(rst_25), .s_axil_req(m_req[2]), .s_axil_rsp(m_rsp[2]),
    .in_valid(cs_valid), .in_data(cs_data), .out_valid(rr_valid), .out_data(rr_data),
    .op_axis(op_axis[2]), .op_tready(op_tready[2])
  );

  rx_tsync_core u_tsync (
    .clk(clk_25), .rst(rst_25), .s_axil_req(m_req[3]), .s_axil_rsp(m_rsp[3]),
    .in_valid(rr_valid), .in_data(rr_data), .sym_valid(sym_valid), .sym(sym),
    .sym_bits(sym_bits), .op_axis(op_axis[3]), .op_tready(op_tready[3])
  );
endmodule
