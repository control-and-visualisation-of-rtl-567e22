// axil_decoder: one AXI4-Lite master to NS slaves, each given a 2^SUB_AW-byte
// window; slave s answers at s*2^SUB_AW. Write and read channels are routed
// independently, one transaction at a time on each: an address that arrives
// selects its slave (held until the response has been accepted), and address,
// data and response signals pass straight through to and from that slave. The
// slave sees the offset within its window. Addresses beyond the last slave go
// to slave NS-1.
module axil_decoder
  import sdr_pkg::*;
#(
  parameter int NS     = 4,
  parameter int SUB_AW = 8
) (
  input  logic      clk,
  input  logic      rst,
  input  axil_req_t s_req,
  output axil_rsp_t s_rsp,
  output axil_req_t m_req [NS],
  input  axil_rsp_t m_rsp [NS]
);
  localparam int SEL_W = (NS > 1) ? $clog2(NS) : 1;

  logic             wbusy, rbusy;
  logic [SEL_W-1:0] wsel, rsel;

  function automatic logic [SEL_W-1:0] slave_of(logic [AXIL_AW-1:0] a);
    int s;
    s = int'(a) >> SUB_AW;
    return (s >= NS) ? SEL_W'(NS - 1) : SEL_W'(s);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wbusy <= 1'b0;
      rbusy <= 1'b0;
      wsel  <= '0;
      rsel  <= '0;
    end else begin
      if (!wbusy && s_req.awvalid) begin
        wbusy <= 1'b1;
        wsel  <= slave_of(s_req.awaddr);
      end else if (wbusy && m_rsp[wsel].bvalid && s_req.bready) begin
        wbusy <= 1'b0;
      end
      if (!rbusy && s_req.arvalid) begin
        rbusy <= 1'b1;
        rsel  <= slave_of(s_req.araddr);
      end else if (rbusy && m_rsp[rsel].rvalid && s_req.rready) begin
        rbusy <= 1'b0;
      end
    end
  end

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      m_req[s] = '0;
      m_req[s].awaddr = s_req.awaddr & AXIL_AW'((1 << SUB_AW) - 1);
      m_req[s].wdata  = s_req.wdata;
      m_req[s].wstrb  = s_req.wstrb;
      m_req[s].araddr = s_req.araddr & AXIL_AW'((1 << SUB_AW) - 1);
      if (wbusy && wsel == SEL_W'(s)) begin
        m_req[s].awvalid = s_req.awvalid;
        m_req[s].wvalid  = s_req.wvalid;
        m_req[s].bready  = s_req.bready;
      end
      if (rbusy && rsel == SEL_W'(s)) begin
        m_req[s].arvalid = s_req.arvalid;
        m_req[s].rready  = s_req.rready;
      end
    end
    s_rsp = '0;
    if (wbusy) begin
      s_rsp.awready = m_rsp[wsel].awready;
      s_rsp.wready  = m_rsp[wsel].wready;
      s_rsp.bvalid  = m_rsp[wsel].bvalid;
      s_rsp.bresp   = m_rsp[wsel].bresp;
    end
    if (rbusy) begin
      s_rsp.arready = m_rsp[rsel].arready;
      s_rsp.rvalid  = m_rsp[rsel].rvalid;
      s_rsp.rdata   = m_rsp[rsel].rdata;
      s_rsp.rresp   = m_rsp[rsel].rresp;
    end
  end
endmodule
