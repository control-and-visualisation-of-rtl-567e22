// qpsk_gray_map: maps a pair of bits onto a Gray-coded QPSK constellation
// point. bits[1] selects the sign of I and bits[0] the sign of Q (0 -> +AMP,
// 1 -> -AMP), so neighbouring quadrants differ in one bit:
// 00 -> (+,+), 10 -> (-,+), 11 -> (-,-), 01 -> (+,-). The amplitude and the
// bit-to-axis assignment are this design's choice. Registered, one cycle from
// in_valid to out_valid.
module qpsk_gray_map
  import sdr_pkg::*;
#(
  parameter int AMP = 8192
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic [1:0] bits,
  output logic       out_valid,
  output iq_t        sym
);
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      sym       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sym.i <= bits[1] ? sample_t'(-AMP) : sample_t'(AMP);
        sym.q <= bits[0] ? sample_t'(-AMP) : sample_t'(AMP);
      end
    end
  end
endmodule
