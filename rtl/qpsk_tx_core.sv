// qpsk_tx_core: the transmitter's signal-processing core, clocked at 25.6 MHz.
// A symbol timer strobes once per SYM_PERIOD clocks (51200 = 500 symbols/s);
// each strobe takes two bits from the LFSR (1 kb/s) and maps them onto a
// Gray-coded QPSK point. I and Q then run through the interpolation chain
//   RRC pulse shaping x4 -> half-band x2 -> CIC compensation FIR x2 ->
//   5th-order CIC x CIC_R (3200)
// for an overall factor of 16*CIC_R = 51200, i.e. 25.6 Msps, one sample per
// clock. Every stage is sample driven: an interpolator spreads its L outputs
// evenly over the input period, which plays the role of the clock enables of
// a multi-rate design. The transmit gain control point scales the output by
// gain/32768 (register 0x00, 0 .. 32768 = unity) before saturation to 16 bits.
//
// Three observation points feed inspection modules: OP1 the QPSK symbols,
// OP2 the pulse-shaped signal, OP3 a 2^FFT_LOG2N-point FFT of the
// pulse-shaped signal, sent as whole frames aligned to bin 0.
//
// AXI-Lite registers (byte offset): 0x00 gain, 0x04 OP1 packet size,
// 0x08 OP1 begin (any write), 0x0C OP2 packet size, 0x10 OP2 begin,
// 0x14 OP3 packet size, 0x18 OP3 begin, 0x1C status (read only: bit k =
// inspector k busy, bit 3 = FFT busy). The chain, rates and observation
// points follow the transceiver description; register layout, filter lengths,
// symbol amplitude and the position of the gain multiplier are this design's
// choices.
// Lint note: write strobes of registers that only hold a value (gain, packet
// sizes, status) are unused; only the begin registers act on a write.
module qpsk_tx_core
  import sdr_pkg::*;
#(
  parameter int CIC_R     = 3200,
  parameter int FFT_LOG2N = 10,
  parameter int OP1_DEPTH = 256,
  parameter int OP2_DEPTH = 2048,
  parameter int OP3_DEPTH = 2048,
  parameter int AMP       = 8192
) (
  input  logic        clk,
  input  logic        rst,
  input  axil_req_t   s_axil_req,
  output axil_rsp_t   s_axil_rsp,
  output iq_t         tx_data,
  output logic        tx_valid,
  output axis32_t     op_axis [3],
  input  logic [2:0]  op_tready
);
  localparam int SYM_PERIOD = 16 * CIC_R;
  localparam int SPW        = $clog2(SYM_PERIOD);
  localparam logic [31:0] RESET_VAL [8] = '{32'd32768, 32'd128, 32'd0, 32'd1024,
                                            32'd0, 32'(1 << FFT_LOG2N), 32'd0, 32'd0};

  logic [31:0]    regs [8];
  logic [31:0]    rd_data [8];
  logic [7:0]     wr_pulse;
  logic [SPW-1:0] sym_cnt;
  logic           sym_stb, map_stb;
  logic [1:0]     bits;
  logic           sym_valid, rrc_valid, hb_valid, cf_valid, cic_valid, fft_valid, fft_sof;
  iq_t            sym, rrc_out, hb_out, cf_out, cic_out, fft_out;
  logic [2:0]     op_busy;
  logic           fft_busy;
  longint         gi, gq;

  axil_regs #(.NREGS(8), .RESET_VAL(RESET_VAL)) u_regs (
    .clk(clk), .rst(rst), .req(s_axil_req), .rsp(s_axil_rsp),
    .regs(regs), .wr_pulse(wr_pulse), .rd_data(rd_data)
  );

  always_comb begin
    rd_data    = regs;
    rd_data[2] = 32'd0;
    rd_data[4] = 32'd0;
    rd_data[6] = 32'd0;
    rd_data[7] = {28'd0, fft_busy, op_busy};
  end

  // symbol timer: 500 symbols/s at 25.6 MHz
  always_ff @(posedge clk) begin
    if (rst) begin
      sym_cnt <= '0;
      map_stb <= 1'b0;
    end else begin
      sym_cnt <= (int'(sym_cnt) == SYM_PERIOD - 1) ? '0 : sym_cnt + 1'b1;
      map_stb <= sym_stb;
    end
  end
  assign sym_stb = (sym_cnt == '0);

  lfsr_prbs u_lfsr (.clk(clk), .rst(rst), .adv(sym_stb), .bits(bits));

  qpsk_gray_map #(.AMP(AMP)) u_map (
    .clk(clk), .rst(rst), .in_valid(map_stb), .bits(bits),
    .out_valid(sym_valid), .sym(sym)
  );

  fir_interp #(.KIND(FK_RRC), .L(4), .NTAPS(33), .SPS(4), .SPACING(SYM_PERIOD / 4)) u_rrc (
    .clk(clk), .rst(rst), .in_valid(sym_valid), .in_data(sym),
    .out_valid(rrc_valid), .out_data(rrc_out)
  );

  fir_interp #(.KIND(FK_LPF), .L(2), .NTAPS(23), .SPACING(SYM_PERIOD / 8)) u_hb (
    .clk(clk), .rst(rst), .in_valid(rrc_valid), .in_data(rrc_out),
    .out_valid(hb_valid), .out_data(hb_out)
  );

  fir_interp #(.KIND(FK_CFIR), .L(2), .NTAPS(31), .CIC_N(5), .SPACING(SYM_PERIOD / 16)) u_cfir (
    .clk(clk), .rst(rst), .in_valid(hb_valid), .in_data(hb_out),
    .out_valid(cf_valid), .out_data(cf_out)
  );

  cic_interp #(.N(5), .R(CIC_R), .SPACING(1)) u_cic (
    .clk(clk), .rst(rst), .in_valid(cf_valid), .in_data(cf_out),
    .out_valid(cic_valid), .out_data(cic_out)
  );

  // transmit gain control point
  assign gi = (longint'(cic_out.i) * longint'({1'b0, regs[0][16:0]})) >>> 15;
  assign gq = (longint'(cic_out.q) * longint'({1'b0, regs[0][16:0]})) >>> 15;

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_valid <= 1'b0;
      tx_data  <= '0;
    end else begin
      tx_valid <= cic_valid;
      if (cic_valid) begin
        tx_data.i <= sat16(gi);
        tx_data.q <= sat16(gq);
      end
    end
  end

  // observation points
  fft_frame #(.LOG2N(FFT_LOG2N)) u_fft (
    .clk(clk), .rst(rst), .in_valid(rrc_valid), .in_data(rrc_out),
    .out_valid(fft_valid), .out_sof(fft_sof), .out_data(fft_out), .busy(fft_busy)
  );

  inspector #(.DEPTH(OP1_DEPTH)) u_op1 (
    .clk(clk), .rst(rst), .s_tdata(sym), .s_tvalid(sym_valid), .s_tuser(1'b0),
    .pkt_size(regs[1]), .begin_xfer(wr_pulse[2]),
    .m_axis(op_axis[0]), .m_tready(op_tready[0]), .busy(op_busy[0])
  );

  inspector #(.DEPTH(OP2_DEPTH)) u_op2 (
    .clk(clk), .rst(rst), .s_tdata(rrc_out), .s_tvalid(rrc_valid), .s_tuser(1'b0),
    .pkt_size(regs[3]), .begin_xfer(wr_pulse[4]),
    .m_axis(op_axis[1]), .m_tready(op_tready[1]), .busy(op_busy[1])
  );

  inspector #(.DEPTH(OP3_DEPTH), .USE_SOF(1'b1)) u_op3 (
    .clk(clk), .rst(rst), .s_tdata(fft_out), .s_tvalid(fft_valid), .s_tuser(fft_sof),
    .pkt_size(regs[5]), .begin_xfer(wr_pulse[6]),
    .m_axis(op_axis[2]), .m_tready(op_tready[2]), .busy(op_busy[2])
  );
endmodule
