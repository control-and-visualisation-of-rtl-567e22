// fifo_async: dual-clock FIFO for crossing between the 25.6 MHz and 128 MHz
// sample clocks of the transmit and receive rate-conversion stages. Classic
// Gray-coded pointer design: each side keeps a binary and a Gray pointer with
// one extra wrap bit, the other side's Gray pointer is brought across through
// two flip-flops, and full/empty are computed from the synchronised copy, so
// both flags are conservative. DEPTH must be a power of two. wr_full is
// asserted when DEPTH words are in flight; rd_empty is deasserted two to three
// read clocks after a write. rd_data shows the oldest word (first-word fall
// through); rd_en removes it. rd_level is a conservative fill level on the
// read side.
module fifo_async #(
  parameter int W     = 32,
  parameter int DEPTH = 16
) (
  input  logic                    wr_clk,
  input  logic                    wr_rst,
  input  logic                    wr_en,
  input  logic [W-1:0]            wr_data,
  output logic                    wr_full,
  input  logic                    rd_clk,
  input  logic                    rd_rst,
  input  logic                    rd_en,
  output logic [W-1:0]            rd_data,
  output logic                    rd_empty,
  output logic [$clog2(DEPTH):0]  rd_level
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0]  wbin_n, rbin_n, wgray_rbin;

  function automatic logic [AW:0] g2b(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int k = AW - 1; k >= 0; k--) b[k] = b[k+1] ^ g[k];
    return b;
  endfunction

  // write side
  assign wbin_n  = wbin + (AW+1)'(wr_en && !wr_full);
  assign wr_full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_n;
      wgray    <= (wbin_n >> 1) ^ wbin_n;
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // read side
  assign rd_empty   = (rgray == wgray_r2);
  assign rd_data    = mem[rbin[AW-1:0]];
  assign rbin_n     = rbin + (AW+1)'(rd_en && !rd_empty);
  assign wgray_rbin = g2b(wgray_r2);
  assign rd_level   = wgray_rbin - rbin;

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_n;
      rgray    <= (rbin_n >> 1) ^ rbin_n;
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
endmodule
