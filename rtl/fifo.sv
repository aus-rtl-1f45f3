// fifo: single-clock first-in first-out buffer, 2048 x 8 bits by default.
//
// It holds the envelope-detected A-mode vector until the USB data controller has sent
// it to the host. Words are stored in a memory array addressed by write and read
// pointers that carry one extra bit to tell full from empty. A write (wr_en) is ignored
// when full; a read (rd_en) is ignored when empty. dout is registered: the word popped
// by a read is on dout after the clock edge that accepted the read (standard, not
// first-word-fall-through, read timing). rst is synchronous and active high and
// empties the buffer.
//
// Depth and width follow the source design, which used a vendor-generated FIFO; the
// read timing and the behaviour on overflow and underflow are this design's choices.
module fifo #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned DW    = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [DW-1:0] din,
  input  logic          wr_en,
  input  logic          rd_en,
  output logic [DW-1:0] dout,
  output logic          empty,
  output logic          full
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [AW:0]   wptr, rptr;
  logic          do_wr, do_rd;

  assign empty = (wptr == rptr);
  assign full  = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
      dout <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) begin
        rptr <= rptr + 1'b1;
        dout <= mem[rptr[AW-1:0]];
      end
    end
  end

  // a full FIFO never holds more than DEPTH words
  assert property (@(posedge clk) disable iff (rst) (wptr - rptr) <= (AW+1)'(DEPTH));
endmodule
