// rx_rrc_core: receive matched filter and interpolation to 32 samples per
// symbol. The 4 ksps stream (8 samples per symbol) passes a single-rate root
// raised cosine filter matched to the transmitter's pulse shape, then two
// cascaded half-band interpolators (x2, x2) raise it to 16 ksps. Each
// interpolator spreads its two outputs evenly over its input period, given by
// IN_PERIOD (clocks per 4 ksps input sample, 6400 at 25.6 MHz). The 16 ksps
// output is observation point OP6.
// AXI-Lite registers: 0x00 OP6 packet size (reset 512), 0x04 OP6 begin,
// 0x08 status (bit 0 inspector busy). The filter sequence and rates follow the
// transceiver description; filter lengths, roll-off 0.5 and register layout
// are this design's choices.
// Lint note: write strobes of value-only registers are unused; only the begin
// register acts on a write.
module rx_rrc_core
  import sdr_pkg::*;
#(
  parameter int IN_PERIOD = 6400,
  parameter int OP_DEPTH  = 8192
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
  localparam logic [31:0] RESET_VAL [3] = '{32'd512, 32'd0, 32'd0};

  logic [31:0] regs [3];
  logic [31:0] rd_data [3];
  logic [2:0]  wr_pulse;
  logic        op_busy;
  logic        mf_v, h1_v;
  iq_t         mf_d, h1_d;

  axil_regs #(.NREGS(3), .RESET_VAL(RESET_VAL)) u_regs (
    .clk(clk), .rst(rst), .req(s_axil_req), .rsp(s_axil_rsp),
    .regs(regs), .wr_pulse(wr_pulse), .rd_data(rd_data)
  );
  assign rd_data = '{regs[0], 32'd0, {31'd0, op_busy}};

  fir_decim #(.KIND(FK_RRC), .M(1), .NTAPS(65), .SPS(8)) u_mf (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data),
    .out_valid(mf_v), .out_data(mf_d)
  );
  fir_interp #(.KIND(FK_LPF), .L(2), .NTAPS(23), .SPACING(IN_PERIOD / 2)) u_hb1 (
    .clk(clk), .rst(rst), .in_valid(mf_v), .in_data(mf_d),
    .out_valid(h1_v), .out_data(h1_d)
  );
  fir_interp #(.KIND(FK_LPF), .L(2), .NTAPS(23), .SPACING(IN_PERIOD / 4)) u_hb2 (
    .clk(clk), .rst(rst), .in_valid(h1_v), .in_data(h1_d),
    .out_valid(out_valid), .out_data(out_data)
  );

  inspector #(.DEPTH(OP_DEPTH)) u_op6 (
    .clk(clk), .rst(rst), .s_tdata(out_data), .s_tvalid(out_valid), .s_tuser(1'b0),
    .pkt_size(regs[0]), .begin_xfer(wr_pulse[1]),
    .m_axis(op_axis), .m_tready(op_tready), .busy(op_busy)
  );
endmodule
