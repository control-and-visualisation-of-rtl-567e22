// tb_qpsk_tx_core: the transmitter core at reduced size (CIC factor 4, so 64
// clocks per symbol; 16-point FFT; 64-deep inspectors), driven through its
// AXI-Lite port. A reference symbol sequence is generated here from the
// PRBS definition (seed 1, x^15 + x^14 + 1, Gray mapping of bit pairs).
// Checks:
//  * the transmit stream is valid on every clock once started (25.6 Msps at
//    full size);
//  * gain register: 0 silences the output, half gain halves its RMS;
//  * OP1 packet (40 symbols) equals 40 consecutive reference symbols;
//  * OP2 packet (32 samples) equals the reference symbols pulse-shaped by the
//    RRC filter at some offset;
//  * OP3 packet (16 bins, frame mode) equals the DFT/16 of 16 consecutive
//    pulse-shaped reference samples, starting at bin 0;
//  * packets end with tlast on the last beat, random back pressure on all
//    three outputs, and the status register shows all inspectors idle after.
module tb_qpsk_tx_core;
  import sdr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int CIC_R = 4;
  localparam int NSYM  = 600;

  axil_req_t  req;
  axil_rsp_t  rsp;
  iq_t        tx_data;
  logic       tx_valid;
  axis32_t    op_axis [3];
  logic [2:0] op_tready;

  qpsk_tx_core #(.CIC_R(CIC_R), .FFT_LOG2N(4), .OP1_DEPTH(64), .OP2_DEPTH(64), .OP3_DEPTH(64)) dut (
    .clk(clk), .rst(rst), .s_axil_req(req), .s_axil_rsp(rsp),
    .tx_data(tx_data), .tx_valid(tx_valid), .op_axis(op_axis), .op_tready(op_tready));

  axil_bfm bfm (.clk(clk), .req(req), .rsp(rsp));

  // ---------------- reference model ----------------
  int  sym_i [NSYM], sym_q [NSYM];
  real rrc_i [4*NSYM], rrc_q [4*NSYM];
  initial begin
    bit o [2*NSYM];
    int h [36];
    for (int n = 0; n < 14; n++) o[n] = 0;
    o[14] = 1;
    for (int n = 15; n < 2 * NSYM; n++) o[n] = o[n-15] ^ o[n-14];
    for (int s = 0; s < NSYM; s++) begin
      sym_i[s] = o[2*s]   ? -8192 : 8192;
      sym_q[s] = o[2*s+1] ? -8192 : 8192;
    end
    for (int n = 0; n < 36; n++) h[n] = (n < 33) ? fir_coef(FK_RRC, n, 33, 4, 5, 4.0) : 0;
    for (int j = 0; j < 4 * NSYM; j++) begin
      automatic longint ai = 0, aq = 0;
      for (int k = 0; k < 9; k++) if (j / 4 - k >= 0) begin
        ai += longint'(h[4*k + j%4]) * sym_i[j/4 - k];
        aq += longint'(h[4*k + j%4]) * sym_q[j/4 - k];
      end
      rrc_i[j] = real'(ai >>> 16);
      rrc_q[j] = real'(aq >>> 16);
    end
  end

  // ---------------- packet collectors ----------------
  logic [31:0] pk [3][$];
  int          npk [3] = '{0, 0, 0};
  int          last_at [3];
  always @(posedge clk) if (!rst) for (int p = 0; p < 3; p++) begin
    if (op_axis[p].tvalid && op_tready[p]) begin
      pk[p].push_back(op_axis[p].tdata);
      if (op_axis[p].tlast) begin npk[p]++; last_at[p] = pk[p].size(); end
    end
  end
  always @(negedge clk) op_tready <= 3'($urandom_range(0, 7)) | 3'($urandom_range(0, 7));

  // ---------------- stream checks ----------------
  bit     measuring = 0, expect_zero = 0;
  real    pwr = 0.0;
  int     nmeas = 0, gaps = 0, nonzero = 0;
  longint cyc = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (cyc > 100 && !tx_valid) gaps++;
    if (measuring) begin
      pwr += real'(tx_data.i) ** 2 + real'(tx_data.q) ** 2;
      nmeas++;
      if (expect_zero && (tx_data.i != 0 || tx_data.q != 0)) nonzero++;
    end
  end

  task automatic measure(input int n, output real rms);
    pwr = 0.0; nmeas = 0;
    measuring = 1;
    repeat (n) @(posedge clk);
    measuring = 0;
    rms = $sqrt(pwr / nmeas);
  endtask

  task automatic get_packet(input int p, input int want);
    int guard = 0;
    while (npk[p] < want && guard < 200000) begin @(posedge clk); guard++; end
    checks++;
    if (npk[p] != want) begin failures++; $display("FAIL OP%0d packet never arrived", p + 1); end
    #1;
  endtask

  initial begin
    real rms1, rms_half;
    logic [31:0] st;
    int hits;
    repeat (5) @(posedge clk);
    @(negedge clk) rst = 0;

    // gain: unity, then half, then zero
    repeat (3000) @(posedge clk);
    measure(6400, rms1);
    bfm.write(12'h000, 32'd16384);
    repeat (400) @(posedge clk);
    measure(6400, rms_half);
    checks++;
    if (rms1 < 1000.0 || rms_half / rms1 < 0.4 || rms_half / rms1 > 0.6) begin
      failures++; $display("FAIL gain: rms %f at unity, %f at half", rms1, rms_half);
    end
    bfm.write(12'h000, 32'd0);
    repeat (10) @(posedge clk);
    expect_zero = 1;
    measure(2000, rms_half);
    expect_zero = 0;
    checks++;
    if (nonzero != 0) begin failures++; $display("FAIL %0d nonzero outputs at gain 0", nonzero); end
    bfm.write(12'h000, 32'd32768);

    // OP1: 40 symbols
    bfm.write(12'h004, 32'd40);
    bfm.write(12'h008, 32'd1);
    get_packet(0, 1);
    checks++;
    if (pk[0].size() != 40 || last_at[0] != 40) begin failures++; $display("FAIL OP1 length %0d", pk[0].size()); end
    hits = 0;
    for (int s0 = 0; s0 + 40 <= NSYM; s0++) begin
      automatic bit ok = 1;
      for (int k = 0; k < pk[0].size(); k++) begin
        automatic iq_t v = iq_t'(pk[0][k]);
        if (int'(v.i) != sym_i[s0+k] || int'(v.q) != sym_q[s0+k]) ok = 0;
      end
      if (ok) hits++;
    end
    checks++;
    if (hits != 1) begin failures++; $display("FAIL OP1 packet matches the reference at %0d offsets", hits); end

    // OP2: 32 pulse-shaped samples
    bfm.write(12'h00C, 32'd32);
    bfm.write(12'h010, 32'd1);
    get_packet(1, 1);
    checks++;
    if (pk[1].size() != 32 || last_at[1] != 32) begin failures++; $display("FAIL OP2 length %0d", pk[1].size()); end
    hits = 0;
    for (int j0 = 0; j0 + 32 <= 4 * NSYM; j0++) begin
      automatic bit ok = 1;
      for (int k = 0; k < pk[1].size(); k++) begin
        automatic iq_t v = iq_t'(pk[1][k]);
        if ((real'(v.i) - rrc_i[j0+k]) ** 2 > 1.0 || (real'(v.q) - rrc_q[j0+k]) ** 2 > 1.0) ok = 0;
      end
      if (ok) hits++;
    end
    checks++;
    if (hits != 1) begin failures++; $display("FAIL OP2 packet matches the reference at %0d offsets", hits); end

    // OP3: one 16-bin frame
    bfm.write(12'h014, 32'd16);
    bfm.write(12'h018, 32'd1);
    get_packet(2, 1);
    checks++;
    if (pk[2].size() != 16 || last_at[2] != 16) begin failures++; $display("FAIL OP3 length %0d", pk[2].size()); end
    hits = 0;
    for (int j0 = 0; j0 + 16 <= 4 * NSYM; j0++) begin
      automatic bit ok = 1;
      for (int b = 0; b < 16 && ok; b++) begin
        automatic iq_t v = iq_t'(pk[2][b]);
        automatic real er = 0.0, ei = 0.0;
        for (int m = 0; m < 16; m++) begin
          er += rrc_i[j0+m] * $cos(2.0 * PI * b * m / 16) + rrc_q[j0+m] * $sin(2.0 * PI * b * m / 16);
          ei += rrc_q[j0+m] * $cos(2.0 * PI * b * m / 16) - rrc_i[j0+m] * $sin(2.0 * PI * b * m / 16);
        end
        if ((real'(v.i) - er / 16) ** 2 > 36.0 || (real'(v.q) - ei / 16) ** 2 > 36.0) ok = 0;
      end
      if (ok) hits++;
    end
    checks++;
    if (hits != 1) begin failures++; $display("FAIL OP3 frame matches the reference at %0d offsets", hits); end

    // a second request of each kind gives exactly one more packet
    for (int p = 0; p < 3; p++) pk[p].delete();
    bfm.write(12'h008, 32'd1);
    bfm.write(12'h010, 32'd1);
    bfm.write(12'h018, 32'd1);
    get_packet(0, 2);
    get_packet(1, 2);
    get_packet(2, 2);
    repeat (20) @(posedge clk);
    bfm.read(12'h01C, st);
    checks++;
    if (st[2:0] != 3'b000) begin failures++; $display("FAIL status %h after packets", st); end
    for (int p = 0; p < 3; p++) begin
      checks++;
      if (npk[p] != 2) begin failures++; $display("FAIL OP%0d sent %0d packets", p + 1, npk[p]); end
    end
    checks++;
    if (gaps != 0) begin failures++; $display("FAIL transmit stream had %0d idle cycles", gaps); end
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
