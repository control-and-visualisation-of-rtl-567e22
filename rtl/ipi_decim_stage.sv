// ipi_decim_stage: first receive rate change, 128 Msps to 25.6 Msps, built as
// a FIR and FIFO pair. The two 16-bit RF-ADC streams (I and Q, 128 MHz) are
// filtered by a decimating low-pass FIR (windowed sinc, cut-off at the output
// Nyquist frequency) that keeps every M-th output; the kept samples cross into
// the 25.6 MHz domain through a dual-clock FIFO and leave as one-cycle valid
// strobes, one per 25.6 MHz clock on average. FIR length and FIFO depth are
// this design's choices.
// Lint note: the asynchronous FIFO's read-side fill level is left unconnected;
// this stage reads whenever the FIFO is not empty and needs no level.
module ipi_decim_stage
  import sdr_pkg::*;
#(
  parameter int M     = 5,
  parameter int NTAPS = 41,
  parameter int DEPTH = 16
) (
  input  logic        clk_hi,
  input  logic        rst_hi,
  input  logic [15:0] adc_i,
  input  logic [15:0] adc_q,
  input  logic        adc_valid,
  input  logic        clk_lo,
  input  logic        rst_lo,
  output logic        out_valid,
  output iq_t         out_data,
  output logic        overflow
);
  logic        f_valid, full, empty;
  iq_t         f_data;
  logic [31:0] rd_data;

  fir_decim #(.KIND(FK_LPF), .M(M), .NTAPS(NTAPS)) u_fir (
    .clk      (clk_hi),
    .rst      (rst_hi),
    .in_valid (adc_valid),
    .in_data  ('{q: adc_q, i: adc_i}),
    .out_valid(f_valid),
    .out_data (f_data)
  );

  fifo_async #(.W(32), .DEPTH(DEPTH)) u_cdc (
    .wr_clk  (clk_hi),
    .wr_rst  (rst_hi),
    .wr_en   (f_valid),
    .wr_data (f_data),
    .wr_full (full),
    .rd_clk  (clk_lo),
    .rd_rst  (rst_lo),
    .rd_en   (!empty),
    .rd_data (rd_data),
    .rd_empty(empty),
    .rd_level()
  );

  always_ff @(posedge clk_hi) begin
    if (rst_hi) overflow <= 1'b0;
    else if (f_valid && full) overflow <= 1'b1;
  end

  always_ff @(posedge clk_lo) begin
    if (rst_lo) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= !empty;
      if (!empty) out_data <= iq_t'(rd_data);
    end
  end
endmodule
