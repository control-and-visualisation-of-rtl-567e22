// tb_fifo_sync: random writes and reads on an 8-deep FIFO against a queue
// model: data order, first-word fall-through output, full/empty/dcount,
// writes to a full FIFO dropped unless a read happens in the same cycle,
// reads from an empty FIFO ignored.
module tb_fifo_sync;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we, re, full, empty;
  logic [15:0] din, dout;
  logic [3:0]  dcount;
  fifo_sync #(.W(16), .DEPTH(8)) dut (.clk(clk), .rst(rst), .we(we), .din(din), .re(re),
    .dout(dout), .full(full), .empty(empty), .dcount(dcount));

  logic [15:0] q [$];
  initial begin
    we = 0; re = 0; din = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < 5000; k++) begin
      // phases of mostly-write and mostly-read traffic
      automatic int bias = (k / 200) % 2;
      we  = ($urandom_range(0, 3) < (bias ? 3 : 1));
      re  = ($urandom_range(0, 3) < (bias ? 1 : 3));
      din = 16'($urandom);
      checks++;
      if (int'(dcount) != q.size() || full != (q.size() == 8) || empty != (q.size() == 0)) begin
        failures++; $display("FAIL flags at %0d: dcount %0d model %0d", k, dcount, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (dout != q[0]) begin failures++; $display("FAIL head %h want %h", dout, q[0]); end
      end
      @(posedge clk);
      begin
        automatic bit rd = re && q.size() > 0;
        automatic bit wr = we && (q.size() < 8 || rd);
        if (rd) void'(q.pop_front());
        if (wr) q.push_back(din);
      end
      @(negedge clk);
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
