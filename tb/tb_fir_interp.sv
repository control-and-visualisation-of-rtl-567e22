// tb_fir_interp: drives a half-band x2 interpolator (23 taps, outputs 4 cycles
// apart, one input every 8 cycles) and a root-raised-cosine x4 interpolator
// (33 taps, 4 samples per symbol) with random complex samples. The reference
// taps are computed here from the textbook formulas (Hamming-windowed sinc,
// root raised cosine with roll-off 0.5), normalised to a DC gain of L and
// quantised to 16 fraction bits; each output must equal the polyphase sum
// exactly. Output timing is checked too: L outputs per input, SPACING apart,
// the first one cycle after the input.
module tb_fir_interp;
  import sdr_pkg::*;
  localparam real M_PI = 3.14159265358979;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid;
  iq_t  in_data;
  logic hb_v, rrc_v;
  iq_t  hb_d, rrc_d;

  fir_interp #(.KIND(FK_LPF), .L(2), .NTAPS(23), .SPACING(4)) dut_hb (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data), .out_valid(hb_v), .out_data(hb_d));
  fir_interp #(.KIND(FK_RRC), .L(4), .NTAPS(33), .SPS(4), .SPACING(2)) dut_rrc (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data), .out_valid(rrc_v), .out_data(rrc_d));

  real hb_r [23], rrc_r [33];
  int  hb_q [24], rrc_q [36];
  iq_t hist [$];
  int  in_time;
  int  hb_n, rrc_n;

  function automatic real rrc_proto(real t, real b);
    if (t == 0.0) return 1.0 - b + 4.0 * b / M_PI;
    if ((t * t - 1.0 / (16.0 * b * b)) ** 2 < 1e-12)
      return b / $sqrt(2.0) * ((1 + 2 / M_PI) * $sin(M_PI / (4 * b)) + (1 - 2 / M_PI) * $cos(M_PI / (4 * b)));
    return ($sin(M_PI * t * (1 - b)) + 4 * b * t * $cos(M_PI * t * (1 + b)))
           / (M_PI * t * (1 - (4 * b * t) ** 2));
  endfunction

  function automatic int qnt(real v);
    return $rtoi(v * 65536.0 + (v >= 0 ? 0.5 : -0.5));
  endfunction

  function automatic int clip(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  // expected output of phase p for a filter with quantised taps hq, factor l
  function automatic iq_t expect_out(input bit is_rrc, input int p);
    longint ai = 0, aq = 0;
    int l = is_rrc ? 4 : 2;
    int tpp = is_rrc ? 9 : 12;
    for (int k = 0; k < tpp; k++) begin
      iq_t x;
      int  h = is_rrc ? rrc_q[k*l+p] : hb_q[k*l+p];
      x = (k < hist.size()) ? hist[hist.size() - 1 - k] : '0;
      ai += longint'(h) * x.i;
      aq += longint'(h) * x.q;
    end
    return '{q: sample_t'(clip(aq >>> 16)), i: sample_t'(clip(ai >>> 16))};
  endfunction

  initial begin
    real s;
    s = 0;
    for (int n = 0; n < 23; n++) begin
      real t;
      t = n - 11.0;
      hb_r[n] = (t == 0 ? 1.0 : $sin(M_PI * t / 2) / (M_PI * t / 2)) * (0.54 - 0.46 * $cos(2 * M_PI * n / 22));
      s += hb_r[n];
    end
    for (int n = 0; n < 24; n++) hb_q[n] = (n < 23) ? qnt(hb_r[n] / s * 2.0) : 0;
    s = 0;
    for (int n = 0; n < 33; n++) begin rrc_r[n] = rrc_proto((n - 16.0) / 4.0, 0.5); s += rrc_r[n]; end
    for (int n = 0; n < 36; n++) rrc_q[n] = (n < 33) ? qnt(rrc_r[n] / s * 4.0) : 0;
  end

  // output checkers
  always @(posedge clk) if (!rst) begin
    if (hb_v) begin
      iq_t e;
      e = expect_out(1'b0, hb_n);
      checks++;
      if (hb_d !== e) begin failures++; $display("FAIL hb phase %0d got %h exp %h", hb_n, hb_d, e); end
      checks++;
      if ($time / 10 - in_time != 1 + 4 * hb_n) begin failures++; $display("FAIL hb timing phase %0d", hb_n); end
      hb_n++;
    end
    if (rrc_v) begin
      iq_t e;
      e = expect_out(1'b1, rrc_n);
      checks++;
      if (rrc_d !== e) begin failures++; $display("FAIL rrc phase %0d got %h exp %h", rrc_n, rrc_d, e); end
      rrc_n++;
    end
  end

  initial begin
    in_valid = 0; in_data = '0; hb_n = 0; rrc_n = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_data  = '{q: sample_t'($urandom_range(0, 40000) - 20000), i: sample_t'($urandom_range(0, 40000) - 20000)};
      if (n == 5) in_data = '{q: 16'sd0, i: 16'sd30000};   // impulse-like sample
      @(posedge clk);
      hist.push_back(in_data);
      in_time = int'($time / 10);
      #1;
      in_valid = 0;
      // check the previous burst was complete
      checks++;
      if (n > 0 && hb_n != 2) begin failures++; $display("FAIL hb burst length %0d", hb_n); end
      checks++;
      if (n > 0 && rrc_n != 4) begin failures++; $display("FAIL rrc burst length %0d", rrc_n); end
      hb_n = 0; rrc_n = 0;
      repeat (7) @(posedge clk);
    end
    repeat (10) @(posedge clk);
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
