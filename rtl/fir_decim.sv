// fir_decim: decimating FIR, by an integer factor M (M = 1 gives a single-rate
// filter). Every input sample is shifted into a NTAPS-long complex delay line;
// every M-th input the full convolution sum_k h[k] * x[n-k] is evaluated on I
// and Q (only the kept outputs are computed, as a polyphase decimator does) and
// presented one cycle later with a one-cycle out_valid strobe. Taps come from
// sdr_pkg::fir_coef with unity DC gain; results are shifted by the 16
// coefficient fraction bits and saturated to 16 bits. The decimation phase
// starts at reset: the first output follows the M-th input.
module fir_decim
  import sdr_pkg::*;
#(
  parameter fir_kind_e KIND  = FK_CFIR,
  parameter int        M     = 2,
  parameter int        NTAPS = 31,
  parameter int        SPS   = 8,   // samples per symbol, FK_RRC only
  parameter int        CIC_N = 3    // CIC order compensated, FK_CFIR only
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  iq_t  in_data,
  output logic out_valid,
  output iq_t  out_data
);
  localparam int MW = (M > 1) ? $clog2(M) : 1;

  typedef int coef_arr_t [NTAPS];
  function automatic coef_arr_t make_coefs();
    coef_arr_t c;
    for (int n = 0; n < NTAPS; n++)
      c[n] = fir_coef(KIND, n, NTAPS, (KIND == FK_RRC) ? SPS : M, CIC_N, 1.0);
    return c;
  endfunction
  localparam coef_arr_t H = make_coefs();

  iq_t           dl   [NTAPS];
  iq_t           dl_n [NTAPS];
  logic [MW-1:0] cnt;
  longint        acc_i, acc_q;

  always_comb begin
    for (int k = NTAPS - 1; k > 0; k--) dl_n[k] = dl[k-1];
    dl_n[0] = in_data;
    acc_i = 0;
    acc_q = 0;
    for (int k = 0; k < NTAPS; k++) begin
      acc_i += longint'(H[k]) * longint'(dl_n[k].i);
      acc_q += longint'(H[k]) * longint'(dl_n[k].q);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) dl[k] <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        dl <= dl_n;
        if (int'(cnt) == M - 1) begin
          cnt        <= '0;
          out_valid  <= 1'b1;
          out_data.i <= sat16(acc_i >>> CFRAC);
          out_data.q <= sat16(acc_q >>> CFRAC);
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
