// tb_fft_frame: runs the frame FFT at 16 and 64 points. Each instance gets
// frames of random complex samples and of a pure tone; every output bin is
// compared with a direct DFT divided by N computed here in real arithmetic
// (tolerance of a few LSB for the per-stage rounding). Also checks that out_sof
// marks bin 0 only, that bins come out on consecutive cycles, that a frame
// finishes within N/2*LOG2N + N + 4 cycles after its last input, and that
// inputs offered while busy are dropped.
module tb_fft_frame;
  import sdr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // one test harness per size
  `define FFT_HARNESS(NAME, LG) \
  logic NAME``_iv, NAME``_ov, NAME``_sof, NAME``_busy; \
  iq_t  NAME``_id, NAME``_od; \
  fft_frame #(.LOG2N(LG)) NAME (.clk(clk), .rst(rst), .in_valid(NAME``_iv), .in_data(NAME``_id), \
    .out_valid(NAME``_ov), .out_sof(NAME``_sof), .out_data(NAME``_od), .busy(NAME``_busy));

  `FFT_HARNESS(f4, 4)
  `FFT_HARNESS(f6, 6)

  real xr [64], xi [64];

  // feed one frame into the selected instance, then collect and check it
  task automatic do_frame(input int lg, input bit tone);
    int n = 1 << lg;
    int got = 0, t_last_in = 0, t = 0;
    real er, ei;
    int k0 = $urandom_range(0, n - 1);
    for (int m = 0; m < n; m++) begin
      if (tone) begin
        xr[m] = 12000.0 * $cos(2.0 * PI * k0 * m / n);
        xi[m] = 12000.0 * $sin(2.0 * PI * k0 * m / n);
      end else begin
        xr[m] = real'($urandom_range(0, 30000)) - 15000.0;
        xi[m] = real'($urandom_range(0, 30000)) - 15000.0;
      end
    end
    for (int m = 0; m < n; m++) begin
      @(negedge clk);
      if (lg == 4) begin f4_iv = 1; f4_id.i = sample_t'($rtoi(xr[m])); f4_id.q = sample_t'($rtoi(xi[m])); end
      else         begin f6_iv = 1; f6_id.i = sample_t'($rtoi(xr[m])); f6_id.q = sample_t'($rtoi(xi[m])); end
      // an idle gap now and then
      if (m % 5 == 4) begin @(negedge clk); f4_iv = 0; f6_iv = 0; end
    end
    // keep offering junk while busy: it must be ignored
    @(negedge clk);
    f4_id = '{q: 16'sd7777, i: 16'sd7777};
    f6_id = '{q: 16'sd7777, i: 16'sd7777};
    while (got < n) begin
      @(posedge clk);
      t++;
      if (lg == 4 ? f4_ov : f6_ov) begin
        automatic iq_t od = (lg == 4) ? f4_od : f6_od;
        automatic logic sof = (lg == 4) ? f4_sof : f6_sof;
        er = 0.0; ei = 0.0;
        for (int m = 0; m < n; m++) begin
          er += ($rtoi(xr[m]) * $cos(2.0 * PI * got * m / n) + $rtoi(xi[m]) * $sin(2.0 * PI * got * m / n));
          ei += ($rtoi(xi[m]) * $cos(2.0 * PI * got * m / n) - $rtoi(xr[m]) * $sin(2.0 * PI * got * m / n));
        end
        er = er / n; ei = ei / n;
        checks++;
        if ((real'(od.i) - er) ** 2 > 36.0 || (real'(od.q) - ei) ** 2 > 36.0) begin
          failures++;
          if (failures < 8) $display("FAIL N=%0d bin %0d got (%0d,%0d) want (%f,%f)", n, got, od.i, od.q, er, ei);
        end
        checks++;
        if (sof != (got == 0)) begin failures++; $display("FAIL sof at bin %0d", got); end
        got++;
      end else if (got > 0) begin
        checks++;
        failures++;
        $display("FAIL gap in output frame at bin %0d", got);
      end
    end
    checks++;
    if (t > n / 2 * lg + n + 4) begin failures++; $display("FAIL frame took %0d cycles", t); end
    f4_iv = 0; f6_iv = 0;
    @(negedge clk);
  endtask

  initial begin
    f4_iv = 0; f6_iv = 0; f4_id = '0; f6_id = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int r = 0; r < 6; r++) begin
      do_frame(4, r[0]);
      do_frame(6, r[0]);
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
