// inspector: data inspection module placed at an observation point. It turns
// a slow, clock-enabled sample stream into on-demand AXI-Stream packets of a
// software-chosen length for a DMA engine that writes them to processor
// memory.
//
// Structure (after the inspector block diagram): a synchronous FIFO takes every
// valid input sample; its read enable is the OR of "FIFO full" and an accepted
// output beat, so a full FIFO drops its oldest sample whenever a new one
// arrives and always holds the most recent history. Here the full term is
// qualified by an arriving sample, so a full FIFO with no new input keeps all
// DEPTH samples instead of draining one. A beat counter counts
// accepted beats starting at 1; a comparator (count >= packet size) gives
// m_tlast and its handshake restarts the counter. A control FSM waits for the
// begin-transfer strobe, then for the FIFO to hold a whole packet, then raises
// m_tvalid until the last beat is accepted, and returns to idle: one strobe,
// one packet.
//
// Frame mode (USE_SOF = 1, used behind the FFT): s_tuser marks the first bin of
// a frame. After the strobe the FSM waits for a frame start and counts the
// samples pushed since; samples older than the frame start are read out and
// discarded while it waits, and the packet is sent once the FIFO holds exactly
// the frame's samples and there are at least pkt_size of them, so the packet
// always begins at bin 0. The FIFO must then be deeper
// than the packet.
//
// Interface: s_* is the observed stream (one-cycle valid strobes, no back
// pressure); pkt_size and begin_xfer come from the AXI-Lite register bank;
// m_* is the AXI-Stream master to the DMA, m_tdata = FIFO head. pkt_size must
// be between 1 and DEPTH-1. The m_tready input, the pkt_size comparison inside
// the FSM, the qualification of the eject by s_tvalid and the frame-start
// bookkeeping are this design's additions to the published diagram.
module inspector
  import sdr_pkg::*;
#(
  parameter int DEPTH   = 2048,
  parameter bit USE_SOF = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  // observed stream
  input  logic [31:0] s_tdata,
  input  logic        s_tvalid,
  input  logic        s_tuser,
  // control from AXI-Lite
  input  logic [31:0] pkt_size,
  input  logic        begin_xfer,
  // to DMA
  output axis32_t     m_axis,
  input  logic        m_tready,
  output logic        busy
);
  localparam int CNTW = $clog2(DEPTH + 1);

  typedef enum logic [1:0] {
    S_IDLE  = 2'd0,
    S_WAIT  = 2'd1,   // wait for a packet's worth of samples
    S_FRAME = 2'd2,   // frame mode: wait for frame start / alignment
    S_SEND  = 2'd3
  } state_e;

  state_e          state;
  logic [CNTW-1:0] dcount;
  logic            full, empty, re, beat, flush;
  logic [31:0]     beat_cnt;      // counter, starts at 1
  logic            tlast;
  logic            sof_seen;
  logic [CNTW-1:0] since_sof;     // samples pushed since the frame start

  assign beat  = m_axis.tvalid && m_tready;
  assign re    = (full && s_tvalid) || beat || flush;
  // frame mode: discard samples older than the frame start
  assign flush = (state == S_FRAME) && sof_seen && (dcount > since_sof);
  assign tlast = (beat_cnt >= pkt_size);

  fifo_sync #(.W(32), .DEPTH(DEPTH)) u_fifo (
    .clk    (clk),
    .rst    (rst),
    .we     (s_tvalid),
    .din    (s_tdata),
    .re     (re),
    .dout   (m_axis.tdata),
    .full   (full),
    .empty  (empty),
    .dcount (dcount)
  );

  assign m_axis.tvalid = (state == S_SEND);
  assign m_axis.tlast  = (state == S_SEND) && tlast;
  assign busy          = (state != S_IDLE);

  // beat counter and comparator
  always_ff @(posedge clk) begin
    if (rst || (beat && tlast)) beat_cnt <= 32'd1;
    else if (beat)              beat_cnt <= beat_cnt + 32'd1;
  end

  // control FSM
  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      sof_seen  <= 1'b0;
      since_sof <= '0;
    end else begin
      case (state)
        S_IDLE: if (begin_xfer) begin
          state     <= USE_SOF ? S_FRAME : S_WAIT;
          sof_seen  <= 1'b0;
          since_sof <= '0;
        end
        S_WAIT: if (32'(dcount) >= pkt_size) state <= S_SEND;
        S_FRAME: begin
          if (s_tvalid && s_tuser) begin
            sof_seen  <= 1'b1;
            since_sof <= CNTW'(1);
          end else if (s_tvalid && sof_seen && since_sof != '1) begin
            since_sof <= since_sof + 1'b1;
          end
          if (sof_seen && dcount == since_sof && 32'(since_sof) >= pkt_size)
            state <= S_SEND;
        end
        S_SEND: if (beat && tlast) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A packet never starts from an empty FIFO
  a_no_underflow: assert property (@(posedge clk) disable iff (rst)
    m_axis.tvalid |-> !empty);
  // AXI-Stream: data and last stay put while a beat is stalled
  a_hold: assert property (@(posedge clk) disable iff (rst)
    (m_axis.tvalid && !m_tready && !(full && s_tvalid)) |=> m_axis.tvalid && $stable(m_axis.tdata));
endmodule
