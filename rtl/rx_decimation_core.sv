// rx_decimation_core: receive decimation chain, 25.6 Msps to 4 ksps, on I and
// Q separately:
//   3rd-order CIC /CIC1_R (40) -> CIC compensation FIR /2 ->
//   3rd-order CIC /CIC2_R (40) -> CIC compensation FIR /2
// (25.6 M -> 640 k -> 320 k -> 8 k -> 4 k samples/s). Each stage is sample
// driven by the valid strobes of the previous one. The 4 ksps output is
// observation point OP4, captured by an inspection module.
// AXI-Lite registers: 0x00 OP4 packet size, 0x04 OP4 begin (any write),
// 0x08 status (bit 0 = inspector busy). Stage types, orders and factors follow
// the transceiver description; FIR lengths and register layout are this
// design's choices.
// Lint note: write strobes of value-only registers are unused; only the begin
// register acts on a write.
module rx_decimation_core
  import sdr_pkg::*;
#(
  parameter int CIC1_R   = 40,
  parameter int CIC2_R   = 40,
  parameter int OP_DEPTH = 2048
) (
  input  logic      clk,
  input  logic      rst,
  input  axil_req_t s_axil_req,
  output axil_rsp_t s_axil_rsp,
  input  logic      in_valid,
  input  iq_t       in_data,
  output logic      out_valid,
  output iq_t       out_data,
  output axis32_t   op_axis,
  input  logic      op_tready
);
  localparam logic [31:0] RESET_VAL [3] = '{32'd1024, 32'd0, 32'd0};

  logic [31:0] regs [3];
  logic [31:0] rd_data [3];
  logic [2:0]  wr_pulse;
  logic        op_busy;
  logic        c1_v, f1_v, c2_v;
  iq_t         c1_d, f1_d, c2_d;

  axil_regs #(.NREGS(3), .RESET_VAL(RESET_VAL)) u_regs (
    .clk(clk), .rst(rst), .req(s_axil_req), .rsp(s_axil_rsp),
    .regs(regs), .wr_pulse(wr_pulse), .rd_data(rd_data)
  );
  assign rd_data = '{regs[0], 32'd0, {31'd0, op_busy}};

  cic_decim #(.N(3), .R(CIC1_R)) u_cic1 (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data),
    .out_valid(c1_v), .out_data(c1_d)
  );
  fir_decim #(.KIND(FK_CFIR), .M(2), .NTAPS(31), .CIC_N(3)) u_cfir1 (
    .clk(clk), .rst(rst), .in_valid(c1_v), .in_data(c1_d),
    .out_valid(f1_v), .out_data(f1_d)
  );
  cic_decim #(.N(3), .R(CIC2_R)) u_cic2 (
    .clk(clk), .rst(rst), .in_valid(f1_v), .in_data(f1_d),
    .out_valid(c2_v), .out_data(c2_d)
  );
  fir_decim #(.KIND(FK_CFIR), .M(2), .NTAPS(31), .CIC_N(3)) u_cfir2 (
    .clk(clk), .rst(rst), .in_valid(c2_v), .in_data(c2_d),
    .out_valid(out_valid), .out_data(out_data)
  );

  inspector #(.DEPTH(OP_DEPTH)) u_op4 (
    .clk(clk), .rst(rst), .s_tdata(out_data), .s_tvalid(out_valid), .s_tuser(1'b0),
    .pkt_size(regs[0]), .begin_xfer(wr_pulse[1]),
    .m_axis(op_axis), .m_tready(op_tready), .busy(op_busy)
  );
endmodule
