// cic_interp: N-stage cascaded integrator-comb interpolator by R (differential
// delay 1). The comb section runs at the input rate: each input strobe updates
// the N comb stages. The integrator section runs at the output rate: the input
// strobe starts a burst of R output strobes SPACING cycles apart (SPACING = 1
// gives one output per clock, the transmitter's 25.6 Msps case); the first
// strobe of a burst feeds the comb output into the integrators and the other
// R-1 feed zeros (zero stuffing). Integrators are pipelined, one register per
// stage, which adds N cycles of output latency. The filter gain R^(N-1) is
// removed by an arithmetic shift of ceil((N-1)*log2 R) bits, so the passband
// gain is R^(N-1)/2^SHIFT (between 0.5 and 1), then the result is saturated to
// 16 bits. Internal width 16 + N*ceil(log2 R) bits, wrapping arithmetic as a
// CIC requires. An input must not arrive before the previous burst has begun
// its last strobe.
// Lint note: the top bits of the shifted integrator words (sh_i, sh_q) are
// unused by design; the result is saturated to 16 bits from the lower part.
module cic_interp
  import sdr_pkg::*;
#(
  parameter int N       = 5,
  parameter int R       = 3200,
  parameter int SPACING = 1
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  iq_t  in_data,
  output logic out_valid,
  output iq_t  out_data
);
  localparam int W     = SW + N * $clog2(R);
  localparam int SHIFT = $rtoi($ceil(real'(N - 1) * $ln(real'(R)) / $ln(2.0) - 1.0e-9));
  localparam int RW    = $clog2(R + 1);
  localparam int SPW   = (SPACING > 1) ? $clog2(SPACING) : 1;

  typedef logic signed [W-1:0] acc_t;

  acc_t           comb_i [N], comb_q [N];   // comb outputs
  acc_t           dly_i  [N], dly_q  [N];   // comb delays
  acc_t           int_i  [N], int_q  [N];   // integrators
  acc_t           v_i, v_q;
  logic [RW-1:0]  phase;
  logic [SPW-1:0] cnt;
  logic           busy, fire, fire_d;
  acc_t           sh_i, sh_q;

  assign fire = busy && cnt == '0;
  assign v_i  = (phase == '0) ? comb_i[N-1] : '0;
  assign v_q  = (phase == '0) ? comb_q[N-1] : '0;
  assign sh_i = int_i[N-1] >>> SHIFT;
  assign sh_q = int_q[N-1] >>> SHIFT;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N; k++) begin
        comb_i[k] <= '0; comb_q[k] <= '0;
        dly_i[k]  <= '0; dly_q[k]  <= '0;
        int_i[k]  <= '0; int_q[k]  <= '0;
      end
      phase     <= '0;
      cnt       <= '0;
      busy      <= 1'b0;
      fire_d    <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      fire_d    <= fire;
      out_valid <= fire_d;
      if (fire_d) begin
        out_data.i <= sat16(longint'(sh_i));
        out_data.q <= sat16(longint'(sh_q));
      end
      if (fire) begin
        int_i[0] <= int_i[0] + v_i;
        int_q[0] <= int_q[0] + v_q;
        for (int k = 1; k < N; k++) begin
          int_i[k] <= int_i[k] + int_i[k-1];
          int_q[k] <= int_q[k] + int_q[k-1];
        end
        cnt <= SPW'(SPACING - 1);
        if (int'(phase) == R - 1) busy <= 1'b0;
        else phase <= phase + 1'b1;
      end else if (busy) begin
        cnt <= cnt - 1'b1;
      end
      if (in_valid) begin
        // comb chain, evaluated stage by stage within the strobe
        automatic acc_t ci = acc_t'(in_data.i);
        automatic acc_t cq = acc_t'(in_data.q);
        for (int k = 0; k < N; k++) begin
          automatic acc_t ni = ci - dly_i[k];
          automatic acc_t nq = cq - dly_q[k];
          dly_i[k] <= ci;
          dly_q[k] <= cq;
          comb_i[k] <= ni;
          comb_q[k] <= nq;
          ci = ni;
          cq = nq;
        end
        busy  <= 1'b1;
        phase <= '0;
        cnt   <= '0;
      end
    end
  end
endmodule
