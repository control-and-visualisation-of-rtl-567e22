// tb_axil_decoder: three register banks behind the decoder, 256-byte windows.
// Writes a distinct value into a register of each bank and reads all of them
// back, checking that every access reached the right bank only.
module tb_axil_decoder;
  import sdr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  axil_req_t req, sreq [3];
  axil_rsp_t rsp, srsp [3];
  logic [31:0] regs [3][2];

  axil_decoder #(.NS(3), .SUB_AW(8)) dut (
    .clk(clk), .rst(rst), .s_req(req), .s_rsp(rsp), .m_req(sreq), .m_rsp(srsp)
  );
  for (genvar s = 0; s < 3; s++) begin : g_bank
    logic [1:0] wp;
    axil_regs #(.NREGS(2)) u_bank (
      .clk(clk), .rst(rst), .req(sreq[s]), .rsp(srsp[s]), .regs(regs[s]), .wr_pulse(wp),
      .rd_data(regs[s])
    );
  end
  axil_bfm bfm (.clk(clk), .req(req), .rsp(rsp));

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int s = 0; s < 3; s++) bfm.write(12'(s * 256 + 4), 32'(32'hA0 + s));
    for (int s = 0; s < 3; s++) begin
      bfm.read(12'(s * 256 + 4), d); chk(d, 32'(32'hA0 + s), "bank reg1");
      bfm.read(12'(s * 256), d);     chk(d, 32'h0, "bank reg0 untouched");
      chk(regs[s][1], 32'(32'hA0 + s), "bank register value");
    end
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
