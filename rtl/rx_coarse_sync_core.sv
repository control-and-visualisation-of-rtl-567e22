// rx_coarse_sync_core: FFT-based coarse carrier-frequency correction at
// 4 ksps. Raising a QPSK signal to the 4th power removes the modulation and
// leaves a spectral line at four times the carrier offset. The core forms
// x^4 (two complex squarings, each rescaled to 16 bits), takes blocks of
// 2^LOG2N samples through the frame FFT, and averages the magnitude
// spectrum |re|+|im| bin by bin over frames (exponential average with weight
// 2^-AVG_SHIFT for the newest frame, 0 = no averaging), so that a noise bin in
// a single short frame cannot move the correction. It tracks the bin k
// (signed, -N/2 .. N/2-1) with the largest averaged magnitude. At the end of
// each frame the offset
// estimate k/(4N) cycles per sample becomes the NCO increment
// -k * 2^(32-LOG2N-2), and every input sample is multiplied by the NCO. The
// estimate is taken on the uncorrected input, so each frame gives an absolute
// estimate; resolution is fs/(4N) (about 1 Hz at N = 1024), range +-fs/8.
// The corrected stream is observation point OP5.
// AXI-Lite registers: 0x00 OP5 packet size, 0x04 OP5 begin, 0x08 correction
// enable (bit 0, reset 1), 0x0C current NCO increment (read only), 0x10 status
// (bit 0 inspector busy). The FFT method is the document's; the 4th-power
// estimator, frame length, spectrum averaging and register layout are this
// design's choices.
// Lint note: write strobes of value-only registers are unused, and the FFT's
// busy output is not needed because frames are fed at the 4 ksps rate,
// far below the transform time.
module rx_coarse_sync_core
  import sdr_pkg::*;
#(
  parameter int LOG2N     = 10,
  parameter int AVG_SHIFT = 3,
  parameter int OP_DEPTH  = 2048
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
  localparam int N = 1 << LOG2N;
  localparam logic [31:0] RESET_VAL [5] = '{32'd1024, 32'd0, 32'd1, 32'd0, 32'd0};

  logic [31:0]      regs [5];
  logic [31:0]      rd_data [5];
  logic [4:0]       wr_pulse;
  logic             op_busy;
  iq_t              sq, p4;
  logic             p4_valid;
  logic             f_valid, f_sof, f_busy;
  iq_t              f_data;
  logic [LOG2N-1:0] bin, best_bin;
  logic [16:0]      mag;
  logic [23:0]      avg [1 << LOG2N];  // averaged spectrum, 7 fraction bits
  logic [23:0]      avg_new, best_avg;
  logic [LOG2N-1:0] cur_bin;
  logic             first_frame;
  logic [31:0]      phase_inc;
  logic             frame_done;
  logic signed [31:0] k_signed;
  longint           s1i, s1q, s2i, s2q;

  axil_regs #(.NREGS(5), .RESET_VAL(RESET_VAL)) u_regs (
    .clk(clk), .rst(rst), .req(s_axil_req), .rsp(s_axil_rsp),
    .regs(regs), .wr_pulse(wr_pulse), .rd_data(rd_data)
  );
  assign rd_data = '{regs[0], 32'd0, regs[2], phase_inc, {31'd0, op_busy}};

  // x^2 then (x^2)^2, each rescaled by 2^-15
  always_comb begin
    s1i = (longint'(in_data.i) * in_data.i - longint'(in_data.q) * in_data.q) >>> 15;
    s1q = (2 * longint'(in_data.i) * in_data.q) >>> 15;
    sq  = '{q: sat16(s1q), i: sat16(s1i)};
    s2i = (longint'(sq.i) * sq.i - longint'(sq.q) * sq.q) >>> 15;
    s2q = (2 * longint'(sq.i) * sq.q) >>> 15;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      p4_valid <= 1'b0;
      p4       <= '0;
    end else begin
      p4_valid <= in_valid;
      if (in_valid) p4 <= '{q: sat16(s2q), i: sat16(s2i)};
    end
  end

  fft_frame #(.LOG2N(LOG2N)) u_fft (
    .clk(clk), .rst(rst), .in_valid(p4_valid), .in_data(p4),
    .out_valid(f_valid), .out_sof(f_sof), .out_data(f_data), .busy(f_busy)
  );

  // peak search over each output frame
  assign mag = 17'(f_data.i < 0 ? -int'(f_data.i) : int'(f_data.i))
             + 17'(f_data.q < 0 ? -int'(f_data.q) : int'(f_data.q));
  // exponential average of the spectrum: avg += (mag - avg) / 2^AVG_SHIFT
  assign cur_bin = f_sof ? '0 : bin;
  // (the first frame after reset is written as is)
  assign avg_new = first_frame ? {mag, 7'd0}
                 : 24'($signed({1'b0, avg[cur_bin]})
                 + (($signed({1'b0, mag, 7'd0}) - $signed({1'b0, avg[cur_bin]})) >>> AVG_SHIFT));
  assign k_signed = best_bin[LOG2N-1] ? 32'(best_bin) - 32'(N) : 32'(best_bin);

  always_ff @(posedge clk) begin
    if (rst) begin
      bin       <= '0;
      best_bin  <= '0;
      best_avg  <= '0;
      phase_inc <= '0;
      frame_done <= 1'b0;
      first_frame <= 1'b1;
    end else begin
      if (frame_done) first_frame <= 1'b0;
      frame_done <= f_valid && !f_sof && bin == '1;
      if (f_valid) begin
        bin <= f_sof ? LOG2N'(1) : bin + 1'b1;
        if (f_sof || avg_new > best_avg) begin
          best_avg <= avg_new;
          best_bin <= cur_bin;
        end
      end
      // frame complete: the last bin has been compared
      if (frame_done)
        phase_inc <= regs[2][0] ? -(k_signed <<< (32 - LOG2N - 2)) : 32'd0;
    end
  end

  // spectrum memory, not reset (the first frame overwrites it)
  always_ff @(posedge clk) if (f_valid) avg[cur_bin] <= avg_new;

  nco_mixer u_nco (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data),
    .phase_inc(phase_inc), .phase_step(32'd0), .step_valid(1'b0),
    .out_valid(out_valid), .out_data(out_data)
  );

  inspector #(.DEPTH(OP_DEPTH)) u_op5 (
    .clk(clk), .rst(rst), .s_tdata(out_data), .s_tvalid(out_valid), .s_tuser(1'b0),
    .pkt_size(regs[0]), .begin_xfer(wr_pulse[1]),
    .m_axis(op_axis), .m_tready(op_tready), .busy(op_busy)
  );
endmodule
