// cic_decim: N-stage cascaded integrator-comb decimator by R (differential
// delay 1). The integrators run on every input strobe (pipelined, one register
// per stage); every R-th input the comb chain is evaluated on the last
// integrator value and the result is presented one cycle later with a
// one-cycle out_valid strobe. The gain R^N is removed by an arithmetic shift
// of ceil(N*log2 R) bits (passband gain R^N/2^SHIFT, between 0.5 and 1),
// followed by saturation to 16 bits. Internal width 16 + N*ceil(log2 R) bits
// with wrapping arithmetic, as a CIC requires.
module cic_decim
  import sdr_pkg::*;
#(
  parameter int N = 3,
  parameter int R = 40
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  iq_t  in_data,
  output logic out_valid,
  output iq_t  out_data
);
  localparam int W     = SW + N * $clog2(R);
  localparam int SHIFT = $rtoi($ceil(real'(N) * $ln(real'(R)) / $ln(2.0) - 1.0e-9));
  localparam int RW    = (R > 1) ? $clog2(R) : 1;

  typedef logic signed [W-1:0] acc_t;

  acc_t          int_i [N], int_q [N];
  acc_t          dly_i [N], dly_q [N];
  acc_t          ci, cq;
  logic [RW-1:0] cnt;

  // comb chain on the newest integrator output
  always_comb begin
    ci = int_i[N-1];
    cq = int_q[N-1];
    for (int k = 0; k < N; k++) begin
      ci = ci - dly_i[k];
      cq = cq - dly_q[k];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N; k++) begin
        int_i[k] <= '0; int_q[k] <= '0;
        dly_i[k] <= '0; dly_q[k] <= '0;
      end
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        int_i[0] <= int_i[0] + acc_t'(in_data.i);
        int_q[0] <= int_q[0] + acc_t'(in_data.q);
        for (int k = 1; k < N; k++) begin
          int_i[k] <= int_i[k] + int_i[k-1];
          int_q[k] <= int_q[k] + int_q[k-1];
        end
        if (int'(cnt) == R - 1) begin
          automatic acc_t ai = int_i[N-1];
          automatic acc_t aq = int_q[N-1];
          cnt <= '0;
          for (int k = 0; k < N; k++) begin
            dly_i[k] <= ai;
            dly_q[k] <= aq;
            ai = ai - dly_i[k];
            aq = aq - dly_q[k];
          end
          out_valid  <= 1'b1;
          out_data.i <= sat16(longint'(ci) >>> SHIFT);
          out_data.q <= sat16(longint'(cq) >>> SHIFT);
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
