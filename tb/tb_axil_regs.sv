// tb_axil_regs: checks the AXI-Lite register bank: reset values, write then
// read back of every register, byte strobes via a partial write, the
// one-cycle write pulse, status read-back through rd_data and reads beyond
// the last register.
module tb_axil_regs;
  import sdr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [31:0] RV [4] = '{32'h11, 32'h22, 32'h33, 32'h44};
  axil_req_t req;
  axil_rsp_t rsp;
  logic [31:0] regs [4];
  logic [31:0] rd_data [4];
  logic [3:0]  wr_pulse;
  int          pulse_cnt [4];

  axil_regs #(.NREGS(4), .RESET_VAL(RV)) dut (
    .clk(clk), .rst(rst), .req(req), .rsp(rsp), .regs(regs), .wr_pulse(wr_pulse), .rd_data(rd_data)
  );
  axil_bfm bfm (.clk(clk), .req(req), .rsp(rsp));

  always_comb begin
    rd_data = regs;
    rd_data[3] = 32'hCAFE0000 | regs[0][15:0];   // status-style read-back
  end
  always @(posedge clk) if (!rst) for (int k = 0; k < 4; k++) if (wr_pulse[k]) pulse_cnt[k]++;

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    for (int k = 0; k < 4; k++) pulse_cnt[k] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int k = 0; k < 3; k++) begin bfm.read(12'(4*k), d); chk(d, RV[k], "reset value"); end
    bfm.write(12'h000, 32'hDEADBEEF);
    bfm.write(12'h004, 32'h01234567);
    bfm.write(12'h008, 32'h89ABCDEF);
    bfm.read(12'h000, d); chk(d, 32'hDEADBEEF, "reg0");
    bfm.read(12'h004, d); chk(d, 32'h01234567, "reg1");
    bfm.read(12'h008, d); chk(d, 32'h89ABCDEF, "reg2");
    bfm.read(12'h00C, d); chk(d, 32'hCAFEBEEF, "status readback");
    bfm.read(12'h040, d); chk(d, 32'h0, "out of range");
    chk(32'(pulse_cnt[0]), 1, "pulse count reg0");
    chk(32'(pulse_cnt[1]), 1, "pulse count reg1");
    chk(32'(pulse_cnt[3]), 0, "pulse count reg3");
    // partial write: only byte 1
    @(negedge clk);
    bfm.req.awaddr = 12'h004; bfm.req.awvalid = 1; bfm.req.wdata = 32'hFFFFFFFF;
    bfm.req.wstrb = 4'b0010; bfm.req.wvalid = 1; bfm.req.bready = 1;
    do @(posedge clk); while (!(rsp.awready && rsp.wready));
    @(negedge clk) begin bfm.req.awvalid = 0; bfm.req.wvalid = 0; end
    while (!rsp.bvalid) @(posedge clk);
    @(negedge clk) bfm.req.bready = 0;
    repeat (2) @(posedge clk);
    bfm.read(12'h004, d); chk(d, 32'h0123FF67, "byte strobe");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
