// tb_fir_decim: drives three decimating/single-rate FIRs with random complex
// samples: a x5 windowed-sinc low-pass (41 taps), a x2 CIC compensator for a
// 3rd-order CIC (31 taps) and a single-rate root raised cosine at 8 samples
// per symbol (65 taps). Reference taps are computed here from the formulas
// (Hamming-windowed sinc; frequency-sampled 1/sinc^3 pass band to 0.2, linear
// taper to 0.3; root raised cosine, roll-off 0.5), normalised to unity DC
// gain. Each kept output must equal the convolution exactly, and exactly one
// output must follow every M-th input, one cycle later.
module tb_fir_decim;
  import sdr_pkg::*;
  localparam real M_PI = 3.14159265358979;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid;
  iq_t  in_data;
  logic v [3];
  iq_t  d [3];

  fir_decim #(.KIND(FK_LPF), .M(5), .NTAPS(41)) dut_lpf (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data), .out_valid(v[0]), .out_data(d[0]));
  fir_decim #(.KIND(FK_CFIR), .M(2), .NTAPS(31), .CIC_N(3)) dut_cfir (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data), .out_valid(v[1]), .out_data(d[1]));
  fir_decim #(.KIND(FK_RRC), .M(1), .NTAPS(65), .SPS(8)) dut_rrc (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data), .out_valid(v[2]), .out_data(d[2]));

  int  hq [3][65];
  int  ntaps [3] = '{41, 31, 65};
  int  mfac  [3] = '{5, 2, 1};
  iq_t hist [$];
  int  nin, nout [3];

  function automatic real snc(real x);
    if (x == 0.0) return 1.0;
    return $sin(M_PI * x) / (M_PI * x);
  endfunction
  function automatic real ham(int n, int nt);
    return 0.54 - 0.46 * $cos(2 * M_PI * n / (nt - 1));
  endfunction
  function automatic real proto(int f, int n);
    real t, h, fr, hf;
    t = n - (ntaps[f] - 1) / 2.0;
    if (f == 0) return snc(t / 5.0) * ham(n, 41);
    if (f == 1) begin
      h = 0;
      for (int k = 0; k < 64; k++) begin
        fr = k / 128.0;
        hf = (fr <= 0.2) ? 1.0 / (snc(fr) ** 3) : (fr < 0.3) ? (0.3 - fr) / 0.1 / (snc(0.2) ** 3) : 0.0;
        h += (k == 0 ? 1.0 : 2.0) * hf * $cos(2 * M_PI * fr * t);
      end
      return h * ham(n, 31);
    end
    t = t / 8.0;
    if (t == 0.0) return 0.5 + 2.0 / M_PI;  // 1 - b + 4b/pi with b = 0.5
    if ((t * t - 1.0 / 4.0) ** 2 < 1e-12)
      return 0.5 / $sqrt(2.0) * ((1 + 2 / M_PI) * $sin(M_PI / 2) + (1 - 2 / M_PI) * $cos(M_PI / 2));
    return ($sin(M_PI * t * 0.5) + 2.0 * t * $cos(M_PI * t * 1.5)) / (M_PI * t * (1 - (2.0 * t) ** 2));
  endfunction

  initial begin
    for (int f = 0; f < 3; f++) begin
      real s, p;
      s = 0;
      for (int n = 0; n < ntaps[f]; n++) s += proto(f, n);
      for (int n = 0; n < ntaps[f]; n++) begin
        p = proto(f, n) / s * 65536.0;
        hq[f][n] = $rtoi(p + (p >= 0 ? 0.5 : -0.5));
      end
    end
  end

  function automatic iq_t expect_out(int f);
    longint ai = 0, aq = 0;
    iq_t x;
    for (int k = 0; k < ntaps[f]; k++) begin
      x = (k < hist.size()) ? hist[hist.size() - 1 - k] : '0;
      ai += longint'(hq[f][k]) * x.i;
      aq += longint'(hq[f][k]) * x.q;
    end
    ai = ai >>> 16; aq = aq >>> 16;
    x.i = sample_t'(ai > 32767 ? 32767 : ai < -32768 ? -32768 : ai);
    x.q = sample_t'(aq > 32767 ? 32767 : aq < -32768 ? -32768 : aq);
    return x;
  endfunction

  iq_t exp_q [3][$];
  always @(posedge clk) if (!rst) begin
    for (int f = 0; f < 3; f++) if (v[f]) begin
      iq_t e;
      checks++;
      if (exp_q[f].size() != 1) begin
        failures++; $display("FAIL filter %0d output not one cycle after its M-th input", f);
      end
      e = (exp_q[f].size() > 0) ? exp_q[f].pop_front() : '0;
      checks++;
      if (d[f] !== e) begin failures++; $display("FAIL filter %0d out %0d got %h exp %h", f, nout[f], d[f], e); end
      nout[f]++;
    end
    if (in_valid) begin
      hist.push_back(in_data);
      nin++;
      for (int f = 0; f < 3; f++) if (nin % mfac[f] == 0) exp_q[f].push_back(expect_out(f));
    end
  end

  initial begin
    in_valid = 0; in_data = '0; nin = 0; nout = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_data  = '{q: sample_t'($urandom_range(0, 50000) - 25000), i: sample_t'($urandom_range(0, 50000) - 25000)};
      @(posedge clk);
      #1 in_valid = 0;
      if (n % 3 == 0) @(posedge clk);   // irregular input spacing
    end
    repeat (5) @(posedge clk);
    for (int f = 0; f < 3; f++) begin
      checks++;
      if (nout[f] != 400 / mfac[f]) begin failures++; $display("FAIL filter %0d produced %0d outputs", f, nout[f]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
