// tb_inspector: exercises the data inspection module in both modes with a
// 16-deep FIFO. The observed stream carries a running sample number so every
// packet can be checked for content and order.
//  * time mode: the FIFO overfills with no request pending (oldest samples are
//    ejected), a begin strobe returns the oldest 8 of the latest 16 samples, a
//    second strobe returns the next 8; a request on an empty FIFO waits until
//    enough samples have arrived; random m_tready stalls with the input
//    running must still give consecutive samples; one strobe gives exactly one
//    packet, tlast is on the last beat only.
//  * frame mode: frames of 12 samples marked by s_tuser; a packet of 8 must
//    start at a frame start and hold 8 consecutive samples of one frame.
module tb_inspector;
  import sdr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------- time mode instance ----------------
  logic [31:0] s_tdata, pkt_size;
  logic        s_tvalid, begin_xfer, m_tready, busy;
  axis32_t     m_axis;
  inspector #(.DEPTH(16), .USE_SOF(1'b0)) dut (
    .clk(clk), .rst(rst), .s_tdata(s_tdata), .s_tvalid(s_tvalid), .s_tuser(1'b0),
    .pkt_size(pkt_size), .begin_xfer(begin_xfer), .m_axis(m_axis), .m_tready(m_tready), .busy(busy));

  // ---------------- frame mode instance ----------------
  logic [31:0] f_tdata;
  logic        f_tvalid, f_tuser, f_begin, f_tready, f_busy;
  axis32_t     f_axis;
  inspector #(.DEPTH(16), .USE_SOF(1'b1)) dut_f (
    .clk(clk), .rst(rst), .s_tdata(f_tdata), .s_tvalid(f_tvalid), .s_tuser(f_tuser),
    .pkt_size(32'd8), .begin_xfer(f_begin), .m_axis(f_axis), .m_tready(f_tready), .busy(f_busy));

  // collectors
  logic [31:0] pkt [$], fpkt [$];
  int          npkts = 0, fnpkts = 0, last_seen = 0, flast_seen = 0;
  always @(posedge clk) if (!rst) begin
    if (m_axis.tvalid && m_tready) begin
      pkt.push_back(m_axis.tdata);
      if (m_axis.tlast) begin npkts++; last_seen = pkt.size(); end
    end
    if (f_axis.tvalid && f_tready) begin
      fpkt.push_back(f_axis.tdata);
      if (f_axis.tlast) begin fnpkts++; flast_seen = fpkt.size(); end
    end
  end

  int seq = 1;
  bit run_stream = 0;
  int stream_gap = 3;
  // background source for the time-mode instance
  always @(negedge clk) if (run_stream) begin
    s_tvalid <= 1'b0;
    if ($urandom_range(0, stream_gap) == 0) begin
      s_tvalid <= 1'b1;
      s_tdata  <= seq;
      seq++;
    end
  end

  task automatic push(input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      s_tvalid = 1; s_tdata = seq; seq++;
      @(negedge clk);
      s_tvalid = 0;
    end
  endtask

  task automatic strobe();
    @(negedge clk) begin_xfer = 1;
    @(negedge clk) begin_xfer = 0;
  endtask

  task automatic wait_packet(input int want_pkts);
    int guard = 0;
    while (npkts < want_pkts && guard < 5000) begin @(posedge clk); guard++; end
    checks++;
    if (npkts != want_pkts) begin failures++; $display("FAIL packet %0d never completed", want_pkts); end
    #1;
  endtask

  task automatic check_packet(input int first, input int len);
    checks++;
    if (pkt.size() != len || last_seen != len) begin
      failures++; $display("FAIL packet length %0d (tlast at %0d), want %0d", pkt.size(), last_seen, len);
    end
    for (int k = 0; k < pkt.size(); k++) begin
      checks++;
      if (first >= 0 ? (pkt[k] != first + k) : (k > 0 && pkt[k] != pkt[k-1] + 1)) begin
        failures++; $display("FAIL beat %0d = %0d (first want %0d)", k, pkt[k], first);
      end
    end
    pkt.delete();
  endtask

  // frame-mode source: frames of 12, data = frame*100 + index
  int fr = 0, fi = 0;
  bit run_frames = 0;
  always @(negedge clk) begin
    f_tvalid <= 1'b0;
    f_tuser  <= 1'b0;
    if (run_frames && $urandom_range(0, 1) == 0) begin
      f_tvalid <= 1'b1;
      f_tuser  <= (fi == 0);
      f_tdata  <= fr * 100 + fi;
      if (fi == 11) begin fi = 0; fr++; end else fi++;
    end
  end

  initial begin
    s_tvalid = 0; s_tdata = 0; begin_xfer = 0; m_tready = 1; pkt_size = 8;
    f_begin = 0; f_tready = 1;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 0;

    // 1: overfill with no request: 40 samples, FIFO keeps 25..40
    push(40);
    repeat (5) @(negedge clk);
    checks++;
    if (m_axis.tvalid || busy) begin failures++; $display("FAIL output without request"); end
    strobe();
    wait_packet(1);
    check_packet(25, 8);
    strobe();
    wait_packet(2);
    check_packet(33, 8);

    // 2: request on an empty FIFO must wait for the data
    strobe();
    push(7);
    repeat (10) @(negedge clk);
    checks++;
    if (m_axis.tvalid) begin failures++; $display("FAIL packet started before %0d samples", 8); end
    push(1);
    wait_packet(3);
    check_packet(41, 8);

    // 3: back pressure with the source running, several packet sizes
    run_stream = 1;
    for (int r = 0; r < 12; r++) begin
      pkt_size = 32'($urandom_range(1, 15));
      fork
        begin
          strobe();
          wait_packet(4 + r);
        end
        begin
          while (npkts < 4 + r) begin
            @(negedge clk) m_tready = ($urandom_range(0, 2) != 0);
          end
          m_tready = 1;
        end
      join
      check_packet(-1, int'(pkt_size));
      repeat ($urandom_range(0, 30)) @(negedge clk);
    end
    run_stream = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (npkts != 15 || busy) begin failures++; $display("FAIL extra packets: %0d", npkts); end

    // 4: frame mode
    run_frames = 1;
    for (int r = 0; r < 6; r++) begin
      repeat ($urandom_range(0, 25)) @(negedge clk);
      @(negedge clk) f_begin = 1;
      @(negedge clk) f_begin = 0;
      while (fnpkts < r + 1) begin
        @(negedge clk) f_tready = ($urandom_range(0, 3) != 0);
      end
      f_tready = 1;
      #1;
      checks++;
      if (fpkt.size() != 8 || flast_seen != 8) begin failures++; $display("FAIL frame packet length %0d", fpkt.size()); end
      for (int k = 0; k < fpkt.size(); k++) begin
        checks++;
        if (fpkt[k] != (fpkt[0] / 100) * 100 + k) begin
          failures++; $display("FAIL frame packet beat %0d = %0d", k, fpkt[k]);
        end
      end
      fpkt.delete();
    end
    run_frames = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
