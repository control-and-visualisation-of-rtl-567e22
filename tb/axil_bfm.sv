// axil_bfm: AXI4-Lite master bus-functional model for testbenches. The tasks
// write(addr, data) and read(addr, data) each run one complete transaction
// (address and data presented together, response awaited) and return after
// the response handshake. Signals change on the falling clock edge so that
// they are stable at the rising edge where the slave samples them.
module axil_bfm
  import sdr_pkg::*;
(
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);
  initial req = '0;

  task automatic write(input logic [AXIL_AW-1:0] addr, input logic [31:0] data);
    @(negedge clk);
    req.awaddr  = addr;
    req.awvalid = 1'b1;
    req.wdata   = data;
    req.wstrb   = 4'hf;
    req.wvalid  = 1'b1;
    req.bready  = 1'b1;
    fork
      begin
        do @(posedge clk); while (!rsp.awready);
        @(negedge clk) req.awvalid = 1'b0;
      end
      begin
        do @(posedge clk); while (!rsp.wready);
        @(negedge clk) req.wvalid = 1'b0;
      end
    join
    while (!rsp.bvalid) @(posedge clk);
    @(posedge clk);
    @(negedge clk) req.bready = 1'b0;
  endtask

  task automatic read(input logic [AXIL_AW-1:0] addr, output logic [31:0] data);
    @(negedge clk);
    req.araddr  = addr;
    req.arvalid = 1'b1;
    req.rready  = 1'b1;
    do @(posedge clk); while (!rsp.arready);
    @(negedge clk) req.arvalid = 1'b0;
    while (!rsp.rvalid) @(posedge clk);
    data = rsp.rdata;
    @(posedge clk);
    @(negedge clk) req.rready = 1'b0;
  endtask
endmodule
