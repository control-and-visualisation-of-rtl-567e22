// fft_frame: frame-based radix-2 FFT of 2^LOG2N complex points for spectrum
// observation. It collects N consecutive input samples (stored at bit-reversed
// addresses), computes the transform in place with one decimation-in-time
// butterfly per clock (LOG2N stages of N/2 butterflies, each stage scaled by
// 1/2 so the result is the DFT divided by N and cannot overflow), then streams
// the N bins in natural order 0..N-1, one per clock, with out_sof marking bin 0.
// Inputs arriving while a frame is being transformed or read out are dropped,
// so each output frame is a snapshot of N consecutive samples. Twiddle factors
// exp(-j*2*pi*k/N) are computed at elaboration, 16-bit, amplitude 32767.
// Cycle budget per frame: N (load) + (N/2)*LOG2N (transform) + N (output).
module fft_frame
  import sdr_pkg::*;
#(
  parameter int LOG2N = 10
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  iq_t  in_data,
  output logic out_valid,
  output logic out_sof,
  output iq_t  out_data,
  output logic busy
);
  localparam int N = 1 << LOG2N;

  typedef sample_t tw_t [N/2];
  function automatic tw_t mk_cos();
    tw_t t;
    for (int k = 0; k < N / 2; k++) t[k] = cos_entry(k, LOG2N);
    return t;
  endfunction
  function automatic tw_t mk_sin();
    tw_t t;
    for (int k = 0; k < N / 2; k++) t[k] = sin_entry(k, LOG2N);
    return t;
  endfunction
  localparam tw_t TW_C = mk_cos();
  localparam tw_t TW_S = mk_sin();

  typedef enum logic [1:0] {F_LOAD, F_CALC, F_OUT} fstate_e;

  fstate_e         st;
  sample_t         mre [N];
  sample_t         mim [N];
  logic [LOG2N-1:0] cnt;        // load / output index, butterfly index j
  logic [$clog2(LOG2N+1)-1:0] stage;
  logic [LOG2N-1:0] rev, i0, i1, half_mask;
  logic [LOG2N-2:0] twi;
  longint          tr, ti;
  sample_t         wc, ws;

  // bit reversal of the load index
  always_comb for (int b = 0; b < LOG2N; b++) rev[b] = cnt[LOG2N-1-b];

  // butterfly addressing for stage s, butterfly j (j < N/2):
  // k = j mod 2^s, group = j >> s, i0 = group*2^(s+1) + k, i1 = i0 + 2^s
  always_comb begin
    automatic logic [LOG2N-1:0] j = {1'b0, cnt[LOG2N-2:0]};
    half_mask = LOG2N'((1 << stage) - 1);
    i0  = LOG2N'((((j & ~half_mask) << 1)) | (j & half_mask));
    i1  = i0 | LOG2N'(1 << stage);
    twi = (LOG2N-1)'((j & half_mask) << (LOG2N - 1 - int'(stage)));
    wc  = TW_C[twi];
    ws  = TW_S[twi];
    // t = b * exp(-j*theta) = (br*c + bi*s) + j(bi*c - br*s)
    tr  = (longint'(mre[i1]) * longint'(wc) + longint'(mim[i1]) * longint'(ws)) >>> 15;
    ti  = (longint'(mim[i1]) * longint'(wc) - longint'(mre[i1]) * longint'(ws)) >>> 15;
  end

  assign busy = (st != F_LOAD);

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= F_LOAD;
      cnt       <= '0;
      stage     <= '0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      case (st)
        F_LOAD: if (in_valid) begin
          mre[rev] <= in_data.i;
          mim[rev] <= in_data.q;
          cnt      <= cnt + 1'b1;
          if (cnt == '1) begin
            st    <= F_CALC;
            stage <= '0;
          end
        end
        F_CALC: begin
          mre[i0] <= sample_t'((longint'(mre[i0]) + tr) >>> 1);
          mim[i0] <= sample_t'((longint'(mim[i0]) + ti) >>> 1);
          mre[i1] <= sample_t'((longint'(mre[i0]) - tr) >>> 1);
          mim[i1] <= sample_t'((longint'(mim[i0]) - ti) >>> 1);
          if (cnt[LOG2N-2:0] == '1) begin
            cnt <= '0;
            if (int'(stage) == LOG2N - 1) st <= F_OUT;
            else stage <= stage + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: begin   // F_OUT
          out_valid  <= 1'b1;
          out_sof    <= (cnt == '0);
          out_data.i <= mre[cnt];
          out_data.q <= mim[cnt];
          cnt        <= cnt + 1'b1;
          if (cnt == '1) st <= F_LOAD;
        end
      endcase
    end
  end
endmodule
