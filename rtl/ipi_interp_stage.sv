// ipi_interp_stage: final transmit rate change, 25.6 Msps to 128 Msps, built
// as a FIFO and FIR pair. Complex samples from the 25.6 MHz domain are written
// into a dual-clock FIFO; on the 128 MHz side the stage waits until PREFILL
// samples are queued, then takes one sample every L clocks and feeds it to a
// polyphase interpolating low-pass FIR (windowed sinc, cut-off at the input
// Nyquist frequency), which emits L outputs on consecutive clocks. With the
// two clocks locked in a 1:L ratio the output is one sample per 128 MHz clock,
// the 32-bit {Q,I} stream the RF-DAC expects. FIR length and FIFO depth are
// this design's choices.
module ipi_interp_stage
  import sdr_pkg::*;
#(
  parameter int L       = 5,
  parameter int NTAPS   = 41,
  parameter int DEPTH   = 16,
  parameter int PREFILL = 4
) (
  input  logic        clk_lo,
  input  logic        rst_lo,
  input  logic        in_valid,
  input  iq_t         in_data,
  input  logic        clk_hi,
  input  logic        rst_hi,
  output logic [31:0] m_tdata,
  output logic        m_tvalid,
  output logic        overflow
);
  localparam int LW = (L > 1) ? $clog2(L) : 1;

  logic                   full, empty, rd;
  logic [31:0]            rd_data;
  logic [$clog2(DEPTH):0] level;
  logic                   running;
  logic [LW-1:0]          slot;
  logic                   f_valid;
  iq_t                    f_data;

  fifo_async #(.W(32), .DEPTH(DEPTH)) u_cdc (
    .wr_clk  (clk_lo),
    .wr_rst  (rst_lo),
    .wr_en   (in_valid),
    .wr_data (in_data),
    .wr_full (full),
    .rd_clk  (clk_hi),
    .rd_rst  (rst_hi),
    .rd_en   (rd),
    .rd_data (rd_data),
    .rd_empty(empty),
    .rd_level(level)
  );

  always_ff @(posedge clk_lo) begin
    if (rst_lo) overflow <= 1'b0;
    else if (in_valid && full) overflow <= 1'b1;
  end

  assign rd = running && slot == '0 && !empty;

  always_ff @(posedge clk_hi) begin
    if (rst_hi) begin
      running <= 1'b0;
      slot    <= '0;
    end else begin
      if (!running && int'(level) >= PREFILL) running <= 1'b1;
      if (running) slot <= (int'(slot) == L - 1) ? '0 : slot + 1'b1;
    end
  end

  fir_interp #(.KIND(FK_LPF), .L(L), .NTAPS(NTAPS), .SPACING(1)) u_fir (
    .clk      (clk_hi),
    .rst      (rst_hi),
    .in_valid (rd),
    .in_data  (iq_t'(rd_data)),
    .out_valid(f_valid),
    .out_data (f_data)
  );

  assign m_tdata  = f_data;
  assign m_tvalid = f_valid;
endmodule
