// tb_cic_interp: two CIC interpolators (N=3, R=4, one output per clock, and
// N=5, R=8, outputs two clocks apart) fed with random samples at exactly
// their input rate. The reference is the CIC's equivalent FIR: the input
// zero-stuffed by R and convolved with N cascaded length-R boxcars, then
// shifted right by ceil((N-1)*log2 R) and saturated. After aligning the
// pipeline latency (best lag, searched here), every output sample must match
// exactly; the output strobes must come R per input, SPACING clocks apart.
module tb_cic_interp;
  import sdr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NIN = 60;
  logic v_in [2];
  iq_t  x    [2];
  logic vo   [2];
  iq_t  yo   [2];
  int   nn [2] = '{3, 5};
  int   rr [2] = '{4, 8};
  int   sp [2] = '{1, 2};
  int   sh [2] = '{4, 12};

  cic_interp #(.N(3), .R(4), .SPACING(1)) dut0 (
    .clk(clk), .rst(rst), .in_valid(v_in[0]), .in_data(x[0]), .out_valid(vo[0]), .out_data(yo[0]));
  cic_interp #(.N(5), .R(8), .SPACING(2)) dut1 (
    .clk(clk), .rst(rst), .in_valid(v_in[1]), .in_data(x[1]), .out_valid(vo[1]), .out_data(yo[1]));

  int  xin [2][$];
  int  yout [2][$];
  int  tlast [2], gap_err [2];

  always @(posedge clk) if (!rst) for (int f = 0; f < 2; f++) if (vo[f]) begin
    yout[f].push_back(int'(yo[f].i));
    if (tlast[f] >= 0 && yout[f].size() > 1 && ($time / 10 - tlast[f]) != sp[f]
        && ($time / 10 - tlast[f]) < 3 * rr[f] * sp[f])
      begin gap_err[f]++; if (gap_err[f] < 4) $display("gap %0d at %0t", $time / 10 - tlast[f], $time); end
    tlast[f] = int'($time / 10);
  end

  for (genvar f = 0; f < 2; f++) begin : g_drive
    initial begin
      v_in[f] = 0; x[f] = '0;
      wait (!rst);
      repeat (2) @(posedge clk);
      for (int n = 0; n < NIN; n++) begin
        @(negedge clk);
        v_in[f] = 1;
        x[f].i  = sample_t'($urandom_range(0, 16000) - 8000);
        x[f].q  = -x[f].i;
        xin[f].push_back(int'(x[f].i));
        @(negedge clk);
        v_in[f] = 0;
        repeat (rr[f] * sp[f] - 2) @(negedge clk);
      end
    end
  end

  initial begin
    tlast = '{-1, -1}; gap_err = '{0, 0};
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (NIN * 8 * 2 + 200) @(posedge clk);
    for (int f = 0; f < 2; f++) begin
      automatic longint ref_y [$];
      automatic int g [$]; int best_lag, best_hits, hits;
      // boxcar^N impulse response
      g.push_back(1);
      for (int s = 0; s < nn[f]; s++) begin
        automatic int t [$];
        for (int k = 0; k < g.size() + rr[f] - 1; k++) begin
          automatic int a = 0;
          for (int j = 0; j < rr[f]; j++) if (k - j >= 0 && k - j < g.size()) a += g[k-j];
          t.push_back(a);
        end
        g = t;
      end
      for (int m = 0; m < NIN * rr[f]; m++) begin
        automatic longint a = 0;
        for (int k = 0; k < g.size(); k++)
          if (m - k >= 0 && (m - k) % rr[f] == 0) a += longint'(g[k]) * xin[f][(m-k)/rr[f]];
        a = a >>> sh[f];
        ref_y.push_back(a > 32767 ? 32767 : a < -32768 ? -32768 : a);
      end
      best_hits = -1; best_lag = 0;
      for (int lag = 0; lag < 10; lag++) begin
        hits = 0;
        for (int m = 0; m + lag < yout[f].size() && m < ref_y.size(); m++)
          if (longint'(yout[f][m+lag]) == ref_y[m]) hits++;
        if (hits > best_hits) begin best_hits = hits; best_lag = lag; end
      end
      for (int m = 0; m < ref_y.size() - rr[f]; m++) begin
        checks++;
        if (m + best_lag >= yout[f].size() || longint'(yout[f][m+best_lag]) != ref_y[m]) begin
          failures++;
          if (failures < 10) $display("FAIL cic %0d sample %0d", f, m);
        end
      end
      checks++;
      if (yout[f].size() != NIN * rr[f]) begin
        failures++; $display("FAIL cic %0d produced %0d outputs, expected %0d", f, yout[f].size(), NIN * rr[f]);
      end
      checks++;
      if (gap_err[f] != 0) begin failures++; $display("FAIL cic %0d output spacing errors %0d", f, gap_err[f]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
