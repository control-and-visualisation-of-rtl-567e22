// tb_cic_decim: two CIC decimators (N=3, R=4 and N=3, R=5) fed with one random
// sample per clock. The reference is the equivalent FIR (N cascaded length-R
// boxcars) evaluated at every R-th sample, shifted right by ceil(N*log2 R)
// and saturated. After aligning the decimation phase and latency (searched
// here), every output must match exactly, and one output must come per R
// inputs. The I rail carries a constant, which must come out scaled by
// R^3 / 2^SHIFT.
module tb_cic_decim;
  import sdr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NIN = 600;
  logic in_valid;
  iq_t  x;
  logic vo [2];
  iq_t  yo [2];
  int   rr [2] = '{4, 5};
  int   sh [2] = '{6, 7};

  cic_decim #(.N(3), .R(4)) dut0 (.clk(clk), .rst(rst), .in_valid(in_valid), .in_data(x), .out_valid(vo[0]), .out_data(yo[0]));
  cic_decim #(.N(3), .R(5)) dut1 (.clk(clk), .rst(rst), .in_valid(in_valid), .in_data(x), .out_valid(vo[1]), .out_data(yo[1]));

  int xin [$];
  int yout [2][$];
  int iout [2][$];

  always @(posedge clk) if (!rst) begin
    for (int f = 0; f < 2; f++) if (vo[f]) begin yout[f].push_back(int'(yo[f].q)); iout[f].push_back(int'(yo[f].i)); end
  end

  initial begin
    in_valid = 0; x = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < NIN; n++) begin
      @(negedge clk);
      in_valid = 1;
      x.q = sample_t'($urandom_range(0, 40000) - 20000);
      x.i = 16'sd100;
      xin.push_back(int'(x.q));
    end
    @(negedge clk) in_valid = 0;
    repeat (20) @(posedge clk);
    for (int f = 0; f < 2; f++) begin
      automatic longint ref_y [$];
      automatic int g [$]; int best_o, best_hits, hits;
      g.push_back(1);
      for (int s = 0; s < 3; s++) begin
        automatic int t [$];
        for (int k = 0; k < g.size() + rr[f] - 1; k++) begin
          automatic int a = 0;
          for (int j = 0; j < rr[f]; j++) if (k - j >= 0 && k - j < g.size()) a += g[k-j];
          t.push_back(a);
        end
        g = t;
      end
      for (int n = 0; n < NIN; n++) begin
        automatic longint a = 0;
        for (int k = 0; k < g.size(); k++) if (n - k >= 0) a += longint'(g[k]) * xin[n-k];
        a = a >>> sh[f];
        ref_y.push_back(a > 32767 ? 32767 : a < -32768 ? -32768 : a);
      end
      best_hits = -1; best_o = 0;
      for (int o = -4 * rr[f]; o < 4 * rr[f]; o++) begin
        hits = 0;
        for (int j = 0; j < yout[f].size(); j++)
          if (j * rr[f] + o >= 0 && j * rr[f] + o < NIN && longint'(yout[f][j]) == ref_y[j * rr[f] + o]) hits++;
        if (hits > best_hits) begin best_hits = hits; best_o = o; end
      end
      for (int j = 4; j < yout[f].size(); j++) begin
        checks++;
        if (j * rr[f] + best_o >= NIN || longint'(yout[f][j]) != ref_y[j * rr[f] + best_o]) begin
          failures++;
          if (failures < 10) $display("FAIL cic %0d output %0d got %0d", f, j, yout[f][j]);
        end
      end
      // the I rail carries a constant 100: R^3 * 100 >> SHIFT once settled
      for (int j = 4; j < iout[f].size(); j++) begin
        checks++;
        if (iout[f][j] != (rr[f] ** 3 * 100) >>> sh[f]) begin
          failures++;
          if (failures < 10) $display("FAIL cic %0d I output %0d got %0d", f, j, iout[f][j]);
        end
      end
      checks++;
      if (yout[f].size() != NIN / rr[f]) begin
        failures++; $display("FAIL cic %0d produced %0d outputs", f, yout[f].size());
      end
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
