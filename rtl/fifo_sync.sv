// fifo_sync: single-clock first-word-fall-through FIFO of DEPTH words.
// dout always shows the oldest word while the FIFO is not empty; a read (re)
// removes it. A write and a read in the same cycle are both honoured, also when
// the FIFO is full, so a full FIFO that is read and written at once keeps its
// level: this is what lets the inspection module eject its oldest sample as a
// new one arrives. A write to a full FIFO without a read is dropped, a read of
// an empty FIFO is ignored. dcount is the number of stored words, registered.
module fifo_sync #(
  parameter int W     = 32,
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     we,
  input  logic [W-1:0]             din,
  input  logic                     re,
  output logic [W-1:0]             dout,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] dcount
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          do_wr, do_rd;

  assign full  = (int'(dcount) == DEPTH);
  assign empty = (dcount == '0);
  assign do_rd = re && !empty;
  assign do_wr = we && (!full || do_rd);
  assign dout  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      dcount <= '0;
    end else begin
      if (do_wr) wr_ptr <= (int'(wr_ptr) == DEPTH - 1) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (int'(rd_ptr) == DEPTH - 1) ? '0 : rd_ptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   dcount <= dcount + 1'b1;
        2'b01:   dcount <= dcount - 1'b1;
        default: ;
      endcase
    end
  end
endmodule
