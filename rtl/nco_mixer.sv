// nco_mixer: numerically controlled oscillator and complex mixer used for
// frequency correction in the receiver. A 32-bit phase accumulator advances by
// phase_inc on every input sample and additionally by phase_step whenever
// step_valid is high (used by a phase-tracking loop). The top LUT_BITS of the
// phase address a cosine/sine table computed at elaboration (amplitude
// 32767). Each input sample is multiplied by exp(+j*phase):
// out = (i*c - q*s, i*s + q*c) >> 15, saturated to 16 bits. Registered output,
// one cycle after in_valid.
module nco_mixer
  import sdr_pkg::*;
#(
  parameter int LUT_BITS = 10
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  iq_t         in_data,
  input  logic [31:0] phase_inc,
  input  logic [31:0] phase_step,
  input  logic        step_valid,
  output logic        out_valid,
  output iq_t         out_data
);
  localparam int N = 1 << LUT_BITS;
  typedef sample_t lut_t [N];
  function automatic lut_t mk_cos();
    lut_t t;
    for (int k = 0; k < N; k++) t[k] = cos_entry(k, LUT_BITS);
    return t;
  endfunction
  function automatic lut_t mk_sin();
    lut_t t;
    for (int k = 0; k < N; k++) t[k] = sin_entry(k, LUT_BITS);
    return t;
  endfunction
  localparam lut_t COS = mk_cos();
  localparam lut_t SIN = mk_sin();

  logic [31:0]   phase;
  logic [LUT_BITS-1:0] idx;
  sample_t       c, s;
  longint        yi, yq;

  assign idx = phase[31 -: LUT_BITS];
  assign c   = COS[idx];
  assign s   = SIN[idx];
  assign yi  = longint'(in_data.i) * longint'(c) - longint'(in_data.q) * longint'(s);
  assign yq  = longint'(in_data.i) * longint'(s) + longint'(in_data.q) * longint'(c);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data.i <= sat16(yi >>> 15);
        out_data.q <= sat16(yq >>> 15);
      end
      phase <= phase + (in_valid ? phase_inc : 32'd0) + (step_valid ? phase_step : 32'd0);
    end
  end
endmodule
