// lfsr_prbs: Fibonacci linear-feedback shift register producing the random
// payload bits of the transmitter. Each adv strobe steps the register
// BITS_PER_STEP times and presents the bits shifted out (oldest in the MSB), so
// with one strobe per QPSK symbol and BITS_PER_STEP = 2 the source runs at twice
// the symbol rate (1 kb/s at 500 symbols/s). The default polynomial is
// x^15 + x^14 + 1 (maximal length, period 32767); polynomial, width and seed
// are this design's choice. The register never reaches the all-zero state from
// a non-zero seed.
module lfsr_prbs #(
  parameter int               WIDTH         = 15,
  parameter logic [WIDTH-1:0] TAPS          = 15'h6000,  // x^15 + x^14 + 1
  parameter logic [WIDTH-1:0] SEED          = 15'h0001,
  parameter int               BITS_PER_STEP = 2
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     adv,
  output logic [BITS_PER_STEP-1:0] bits
);
  logic [WIDTH-1:0]         state, nxt;
  logic [BITS_PER_STEP-1:0] out_n;

  always_comb begin
    nxt = state;
    for (int k = BITS_PER_STEP - 1; k >= 0; k--) begin
      out_n[k] = nxt[WIDTH-1];
      nxt      = {nxt[WIDTH-2:0], ^(nxt & TAPS)};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= SEED;
      bits  <= '0;
    end else if (adv) begin
      state <= nxt;
      bits  <= out_n;
    end
  end
endmodule
