// rx_tsync_core: symbol timing and fine carrier synchronisation on the 16 ksps
// stream (SPS = 32 samples per symbol), producing one soft QPSK symbol and its
// two Gray-decoded bits per symbol period.
//
// Carrier: every input sample is rotated by an NCO. At each symbol strobe a
// decision-directed QPSK phase detector e_p = sgn(I)*Q - sgn(Q)*I drives a
// proportional-integral loop: the proportional path steps the NCO phase by
// -e_p*2^KP_SHIFT once, the integral path adds -e_p*2^KI_SHIFT to the
// per-sample NCO increment (frequency).
// Timing: a counter runs through the SPS samples of a symbol; the sample at
// count 0 is the symbol, the one at SPS/2 the mid-point. A Gardner detector
// e_t = Re{(y_k - y_(k-1)) * conj(mid)} is accumulated; when the accumulator
// passes +TED_TH the counter skips one sample (sampling was late), below
// -TED_TH it holds for one sample (early), and the accumulator is cleared: a
// first-order, one-sample-step timing loop.
// Loop reset: every sync_reset input samples (register 0x14, reset 16000 =
// one second at 16 ksps, 0 disables) both loop filters are cleared.
// The symbols are observation point OP7.
// AXI-Lite registers: 0x00 OP7 packet size (reset 16), 0x04 OP7 begin,
// 0x08 status (bit 0 inspector busy), 0x0C NCO increment (read only),
// 0x10 timing adjustments made (read only), 0x14 sync_reset.
// The oversampled synchroniser, its 32x rate and the periodic loop reset at
// 0x14 follow the document; detectors, loop structure and gains are this
// design's choices.
// Lint note: write strobes of value-only registers are unused; only the begin
// register acts on a write.
module rx_tsync_core
  import sdr_pkg::*;
#(
  parameter int SPS      = 32,
  parameter int KP_SHIFT = 12,
  parameter int KI_SHIFT = 4,
  parameter int TED_SH   = 12,
  parameter int TED_TH   = 4096,
  parameter int OP_DEPTH = 256
) (
  input  logic       clk,
  input  logic       rst,
  input  axil_req_t  s_axil_req,
  output axil_rsp_t  s_axil_rsp,
  input  logic       in_valid,
  input  iq_t        in_data,
  output logic       sym_valid,
  output iq_t        sym,
  output logic [1:0] sym_bits,
  output axis32_t    op_axis,
  input  logic       op_tready
);
  localparam int CW = $clog2(SPS);
  localparam logic [31:0] RESET_VAL [6] = '{32'd16, 32'd0, 32'd0, 32'd0, 32'd0, 32'd16000};

  logic [31:0]       regs [6];
  logic [31:0]       rd_data [6];
  logic [5:0]        wr_pulse;
  logic              op_busy;
  logic              m_valid;
  iq_t               m_data;
  logic [CW-1:0]     cnt;
  iq_t               mid, prev;
  logic signed [31:0] freq;         // NCO increment per sample
  logic signed [31:0] pstep;
  logic              pstep_v;
  longint            ted_acc, e_t, e_p;
  logic [31:0]       adj_count;
  logic [31:0]       rst_cnt;
  logic              loop_clr;
  logic              strobe;
  logic              hold;          // stretch the current symbol by one sample

  axil_regs #(.NREGS(6), .RESET_VAL(RESET_VAL)) u_regs (
    .clk(clk), .rst(rst), .req(s_axil_req), .rsp(s_axil_rsp),
    .regs(regs), .wr_pulse(wr_pulse), .rd_data(rd_data)
  );
  assign rd_data = '{regs[0], 32'd0, {31'd0, op_busy}, freq, adj_count, regs[5]};

  nco_mixer u_nco (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data),
    .phase_inc(freq), .phase_step(pstep), .step_valid(pstep_v),
    .out_valid(m_valid), .out_data(m_data)
  );

  assign strobe = m_valid && cnt == '0;

  // detectors, evaluated on the symbol sample m_data at the strobe
  always_comb begin
    e_t = (longint'(m_data.i) - longint'(prev.i)) * longint'(mid.i)
        + (longint'(m_data.q) - longint'(prev.q)) * longint'(mid.q);
    e_p = (m_data.i < 0 ? -longint'(m_data.q) : longint'(m_data.q))
        - (m_data.q < 0 ? -longint'(m_data.i) : longint'(m_data.i));
  end

  // periodic loop-filter reset
  always_ff @(posedge clk) begin
    if (rst) begin
      rst_cnt  <= '0;
      loop_clr <= 1'b0;
    end else begin
      loop_clr <= 1'b0;
      if (in_valid && regs[5] != 32'd0) begin
        if (rst_cnt >= regs[5] - 1) begin
          rst_cnt  <= '0;
          loop_clr <= 1'b1;
        end else begin
          rst_cnt <= rst_cnt + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      hold      <= 1'b0;
      mid       <= '0;
      prev      <= '0;
      freq      <= '0;
      pstep     <= '0;
      pstep_v   <= 1'b0;
      ted_acc   <= 0;
      adj_count <= '0;
      sym_valid <= 1'b0;
      sym       <= '0;
      sym_bits  <= '0;
    end else begin
      sym_valid <= 1'b0;
      pstep_v   <= 1'b0;
      if (m_valid) begin
        if (hold) hold <= 1'b0;
        else      cnt  <= cnt + 1'b1;
        if (int'(cnt) == SPS / 2) mid <= m_data;
      end
      if (strobe) begin
        prev      <= m_data;
        sym_valid <= 1'b1;
        sym       <= m_data;
        sym_bits  <= {m_data.i < 0, m_data.q < 0};
        // carrier loop
        pstep   <= 32'(-(e_p <<< KP_SHIFT));
        pstep_v <= 1'b1;
        freq    <= freq - 32'(e_p <<< KI_SHIFT);
        // timing loop
        if (ted_acc + (e_t >>> TED_SH) > longint'(TED_TH)) begin
          cnt       <= CW'(2);       // skip a sample: next strobe one sample sooner
          ted_acc   <= 0;
          adj_count <= adj_count + 1'b1;
        end else if (ted_acc + (e_t >>> TED_SH) < -longint'(TED_TH)) begin
          cnt       <= CW'(1);       // hold one sample: next strobe one sample later
          hold      <= 1'b1;
          ted_acc   <= 0;
          adj_count <= adj_count + 1'b1;
        end else begin
          ted_acc <= ted_acc + (e_t >>> TED_SH);
        end
      end
      if (loop_clr) begin
        freq    <= '0;
        ted_acc <= 0;
      end
    end
  end

  inspector #(.DEPTH(OP_DEPTH)) u_op7 (
    .clk(clk), .rst(rst), .s_tdata(sym), .s_tvalid(sym_valid), .s_tuser(1'b0),
    .pkt_size(regs[0]), .begin_xfer(wr_pulse[1]),
    .m_axis(op_axis), .m_tready(op_tready), .busy(op_busy)
  );
endmodule
