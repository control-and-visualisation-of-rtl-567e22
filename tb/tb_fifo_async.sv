// tb_fifo_async: an 8-deep dual-clock FIFO with a 7 ns write clock and an
// 11 ns read clock. Random bursts of writes (never while full) and reads
// (never while empty) carry a sequence number; checks that every word
// arrives once and in order, that full stops the writer and empty the
// reader at the right times (the FIFO never accepts more than 8 words), and
// that rd_level never exceeds the depth.
module tb_fifo_async;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  always #3.5 wclk = ~wclk;
  always #5.5 rclk = ~rclk;
  int checks = 0, failures = 0;

  logic        wr_en, rd_en, wr_full, rd_empty;
  logic [15:0] wr_data, rd_data;
  logic [3:0]  rd_level;
  fifo_async #(.W(16), .DEPTH(8)) dut (
    .wr_clk(wclk), .wr_rst(wrst), .wr_en(wr_en), .wr_data(wr_data), .wr_full(wr_full),
    .rd_clk(rclk), .rd_rst(rrst), .rd_en(rd_en), .rd_data(rd_data), .rd_empty(rd_empty),
    .rd_level(rd_level));

  int sent = 0, got = 0, inflight_max = 0;
  always @(negedge wclk) begin
    wr_en <= 1'b0;
    if (!wrst && !wr_full && sent < 3000 && $urandom_range(0, 2) != 0) begin
      wr_en   <= 1'b1;
      wr_data <= 16'(sent);
      sent++;
    end
  end
  always @(negedge rclk) begin
    rd_en <= !rrst && !rd_empty && $urandom_range(0, 2) != 0;
  end
  always @(posedge rclk) if (!rrst) begin
    if (rd_en && !rd_empty) begin
      checks++;
      if (rd_data != 16'(got)) begin
        failures++;
        if (failures < 6) $display("FAIL word %0d read as %0d", got, rd_data);
      end
      got++;
    end
    checks++;
    if (int'(rd_level) > 8) begin failures++; $display("FAIL level %0d", rd_level); end
  end
  always @(posedge wclk) if (sent - got > inflight_max) inflight_max = sent - got;

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    #50;
    wrst = 0; rrst = 0;
    wait (got == 3000);
    checks++;
    if (inflight_max > 9) begin failures++; $display("FAIL %0d words in flight", inflight_max); end
    checks++;
    if (inflight_max < 7) begin failures++; $display("FAIL never filled: %0d words in flight", inflight_max); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
