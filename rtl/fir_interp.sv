// fir_interp: polyphase interpolating FIR, by an integer factor L.
// Each input sample is shifted into a delay line of ceil(NTAPS/L) complex
// samples and triggers a burst of L output samples, one per polyphase branch:
// branch p computes sum_k h[k*L+p] * x[n-k] on I and Q separately. Branch 0 is
// computed in the cycle the input arrives; branch p follows p*SPACING cycles
// later, so that with SPACING = (input period)/L the output stream is evenly
// spaced at L times the input rate, as in a clock-enabled sample-based design.
// The taps come from sdr_pkg::fir_coef (KIND selects root raised cosine,
// windowed-sinc low-pass/half-band, or CIC compensation) with a DC gain of L,
// so each branch has unity gain. Products are summed at full precision, then
// shifted by the 16 coefficient fraction bits and saturated to 16 bits.
// Interface: in_valid/in_data (one-cycle strobe), out_valid/out_data registered;
// latency from an input to its branch-0 output is one cycle. A new input must
// not arrive before the previous burst is complete (input period >= L*SPACING).
module fir_interp
  import sdr_pkg::*;
#(
  parameter fir_kind_e KIND    = FK_LPF,
  parameter int        L       = 2,
  parameter int        NTAPS   = 23,
  parameter int        SPS     = L,     // samples per symbol, FK_RRC only
  parameter int        CIC_N   = 5,     // CIC order compensated, FK_CFIR only
  parameter int        SPACING = 1
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  iq_t  in_data,
  output logic out_valid,
  output iq_t  out_data
);
  localparam int TPP = (NTAPS + L - 1) / L;   // taps per phase
  localparam int PW  = (L > 1) ? $clog2(L) : 1;
  localparam int SPW = (SPACING > 1) ? $clog2(SPACING) : 1;

  typedef int coef_arr_t [TPP*L];
  function automatic coef_arr_t make_coefs();
    coef_arr_t c;
    for (int n = 0; n < TPP * L; n++)
      c[n] = (n < NTAPS) ? fir_coef(KIND, n, NTAPS, (KIND == FK_RRC) ? SPS : L, CIC_N, real'(L)) : 0;
    return c;
  endfunction
  localparam coef_arr_t H = make_coefs();

  iq_t            dl   [TPP];
  iq_t            dl_n [TPP];
  logic [PW-1:0]  phase, ph_sel;
  logic [SPW-1:0] cnt;
  logic           busy, fire;
  longint         acc_i, acc_q;

  always_comb begin
    dl_n = dl;
    if (in_valid) begin
      for (int k = TPP - 1; k > 0; k--) dl_n[k] = dl[k-1];
      dl_n[0] = in_data;
    end
    ph_sel = in_valid ? '0 : phase;
    fire   = in_valid || (busy && cnt == '0);
    acc_i  = 0;
    acc_q  = 0;
    for (int k = 0; k < TPP; k++) begin
      acc_i += longint'(H[k*L + int'(ph_sel)]) * longint'(dl_n[k].i);
      acc_q += longint'(H[k*L + int'(ph_sel)]) * longint'(dl_n[k].q);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TPP; k++) dl[k] <= '0;
      phase     <= '0;
      cnt       <= '0;
      busy      <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= fire;
      if (fire) begin
        out_data.i <= sat16(acc_i >>> CFRAC);
        out_data.q <= sat16(acc_q >>> CFRAC);
      end
      if (in_valid) begin
        dl    <= dl_n;
        phase <= PW'(1 % L);
        cnt   <= SPW'(SPACING - 1);
        busy  <= (L > 1);
      end else if (busy) begin
        if (cnt == '0) begin
          cnt <= SPW'(SPACING - 1);
          if (int'(phase) == L - 1) busy <= 1'b0;
          else phase <= phase + 1'b1;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
  end
endmodule
