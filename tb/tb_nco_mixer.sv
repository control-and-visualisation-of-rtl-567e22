// tb_nco_mixer: drives random samples (random gaps), a random frequency
// word and occasional phase steps, and checks every output against a model
// here: the phase accumulator advances by the frequency word per sample and
// by the step when step_valid is high; the output is the input times
// exp(+j*2*pi*p/2^32) with p truncated to the 10 table bits, saturated to
// 16 bits, within 2 LSB.
// Also checks the one-cycle latency of out_valid.
module tb_nco_mixer;
  import sdr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        in_valid, step_valid, out_valid;
  iq_t         in_data, out_data;
  logic [31:0] phase_inc, phase_step;

  nco_mixer dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data),
    .phase_inc(phase_inc), .phase_step(phase_step), .step_valid(step_valid),
    .out_valid(out_valid), .out_data(out_data));

  logic [31:0] p = 0;
  real         ei, eq;
  bit          exp_valid = 0;

  initial begin
    in_valid = 0; step_valid = 0; in_data = '0; phase_inc = 0; phase_step = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < 3000; k++) begin
      if (k % 1000 == 0) phase_inc = $urandom;
      in_valid   = ($urandom_range(0, 3) != 0);
      step_valid = ($urandom_range(0, 9) == 0);
      phase_step = $urandom;
      in_data.i  = sample_t'($urandom_range(0, 60000) - 30000);
      in_data.q  = sample_t'($urandom_range(0, 60000) - 30000);
      if (in_valid) begin
        automatic real a = 2.0 * PI * real'(p[31:22]) / 1024.0;
        ei = real'(in_data.i) * $cos(a) - real'(in_data.q) * $sin(a);
        eq = real'(in_data.i) * $sin(a) + real'(in_data.q) * $cos(a);
        // the output saturates to 16 bits
        if (ei > 32767.0) ei = 32767.0;
        if (ei < -32768.0) ei = -32768.0;
        if (eq > 32767.0) eq = 32767.0;
        if (eq < -32768.0) eq = -32768.0;
      end
      exp_valid = in_valid;
      p = p + (in_valid ? phase_inc : 0) + (step_valid ? phase_step : 0);
      @(negedge clk);
      checks++;
      if (out_valid != exp_valid) begin failures++; $display("FAIL out_valid at %0d", k); end
      if (exp_valid) begin
        checks++;
        if ((real'(out_data.i) - ei) ** 2 > 4.0 + 1e-6 * (ei ** 2) || (real'(out_data.q) - eq) ** 2 > 4.0 + 1e-6 * (eq ** 2)) begin
          failures++;
          if (failures < 6) $display("FAIL sample %0d: (%0d,%0d) want (%f,%f)", k, int'(out_data.i), int'(out_data.q), ei, eq);
        end
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
