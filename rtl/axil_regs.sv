// axil_regs: AXI4-Lite slave with NREGS 32-bit registers at byte offsets
// 0, 4, 8, ... It accepts one write (address and data may arrive in either
// order) or one read at a time and answers OKAY. A write updates the register
// (byte strobes honoured) and pulses wr_pulse[k] for one cycle, which serves
// as the begin-transfer strobe of an inspection module. Reads return rd_data[k],
// which the surrounding core ties either to the register itself or to a status
// value. Registers reset to RESET_VAL[k]. Addresses beyond the last register
// read as zero and ignore writes.
// Lint note: the two low write/read address bits are unused because every
// register is a 32-bit word at a 4-byte-aligned offset.
module axil_regs
  import sdr_pkg::*;
#(
  parameter int          NREGS = 8,
  parameter logic [31:0] RESET_VAL [NREGS] = '{default: 32'd0}
) (
  input  logic        clk,
  input  logic        rst,
  input  axil_req_t   req,
  output axil_rsp_t   rsp,
  output logic [31:0] regs     [NREGS],
  output logic [NREGS-1:0] wr_pulse,
  input  logic [31:0] rd_data  [NREGS]
);
  localparam int IW = (NREGS > 1) ? $clog2(NREGS) : 1;

  logic                aw_got, w_got;
  logic [AXIL_AW-1:0]  aw_addr;
  logic [31:0]         w_data;
  logic [3:0]          w_strb;
  logic [AXIL_AW-3:0]  widx, ridx;   // word index; byte-lane bits [1:0] are ignored
  logic                bvalid_q, rvalid_q;
  logic [31:0]         rdata_q;

  assign widx = aw_addr[AXIL_AW-1:2];
  assign ridx = req.araddr[AXIL_AW-1:2];

  assign rsp.awready = !aw_got && !bvalid_q;
  assign rsp.wready  = !w_got && !bvalid_q;
  assign rsp.arready = !rvalid_q;
  assign rsp.bvalid  = bvalid_q;
  assign rsp.rvalid  = rvalid_q;
  assign rsp.rdata   = rdata_q;
  assign rsp.bresp   = 2'b00;
  assign rsp.rresp   = 2'b00;

  always_ff @(posedge clk) begin
    if (rst) begin
      aw_got     <= 1'b0;
      w_got      <= 1'b0;
      aw_addr    <= '0;
      w_data     <= '0;
      w_strb     <= '0;
      bvalid_q <= 1'b0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
      wr_pulse   <= '0;
      for (int k = 0; k < NREGS; k++) regs[k] <= RESET_VAL[k];
    end else begin
      wr_pulse <= '0;
      if (req.awvalid && !aw_got && !bvalid_q) begin aw_got <= 1'b1; aw_addr <= req.awaddr; end
      if (req.wvalid && !w_got && !bvalid_q) begin w_got <= 1'b1; w_data <= req.wdata; w_strb <= req.wstrb; end
      if (aw_got && w_got) begin
        aw_got     <= 1'b0;
        w_got      <= 1'b0;
        bvalid_q <= 1'b1;
        if (int'(widx) < NREGS) begin
          for (int b = 0; b < 4; b++)
            if (w_strb[b]) regs[IW'(widx)][8*b +: 8] <= w_data[8*b +: 8];
          wr_pulse[IW'(widx)] <= 1'b1;
        end
      end
      if (bvalid_q && req.bready) bvalid_q <= 1'b0;
      if (req.arvalid && !rvalid_q) begin
        rvalid_q <= 1'b1;
        rdata_q  <= (int'(ridx) < NREGS) ? rd_data[IW'(ridx)] : 32'd0;
      end else if (rvalid_q && req.rready) begin
        rvalid_q <= 1'b0;
      end
    end
  end

  a_b_hold: assert property (@(posedge clk) disable iff (rst)
    bvalid_q && !req.bready |=> bvalid_q);
  a_r_hold: assert property (@(posedge clk) disable iff (rst)
    rvalid_q && !req.rready |=> rvalid_q && $stable(rdata_q));
endmodule
