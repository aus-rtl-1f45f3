// dc100: data controller between the FIFO and the DLP-2232M USB module (FT2232C in its
// 245-style FIFO mode).
//
// A state machine runs a "read, then read-or-write" cycle. After reset it waits for
// the module to report a received byte (dlp_rxf_l low) and reads it: dlp_rd_l is
// driven low for three clocks (60 ns at 50 MHz, above the 50 ns minimum strobe), and
// rd_en pulses for one clock so that an external flop can capture the byte from the
// bus. From then on, in IDLE, it prefers writing: whenever the module can accept a byte
// (dlp_txe_l low) and the FIFO is not empty, it pops one FIFO word (fifo_rd_en, one
// clock), raises dlp_wr for three clocks and enables the bus driver (wr_en) during the
// last of them, when the popped word is on the FIFO output. Otherwise, a new received
// byte starts another read. Writes therefore stop when the FIFO runs empty or when the
// host sends a new byte while the module cannot take more.
//
// dlp_rxf_l and dlp_txe_l are asynchronous to clk and pass through two flops (reset to
// the inactive level). dlp_rd_l, dlp_wr, fifo_rd_en and wr_en are registered to remove
// glitches, so each appears one clock after the state that requests it; rd_en comes
// straight from the state register. rst_l is synchronous and active low and must
// already be synchronized to clk.
//
// The states, the pulse widths, the synchronizers and the output registers follow the
// source design. Where its prose says a write needs FIFO_EMPTY high, this design
// follows its state machine, which writes when the FIFO is not empty; likewise a write
// wins over a waiting host byte in IDLE, as in that state machine. One change is this
// design's own: the source requests RD# in IDLE whenever a host byte waits, even in the
// clock where a write starts; here RD# is requested only when no write starts, so RD#
// and WR never overlap.
module dc100 (
  input  logic clk,
  input  logic rst_l,
  input  logic dlp_txe_l,
  input  logic dlp_rxf_l,
  input  logic fifo_empty,
  output logic dlp_rd_l,
  output logic dlp_wr,
  output logic fifo_rd_en,
  output logic wr_en,
  output logic rd_en
);
  typedef enum logic [2:0] {
    INIT, READ_0, READ_1, READ_2, IDLE, WRITE_0, WRITE_1, WRITE_2
  } dc_state_t;

  dc_state_t state, nxt_state;
  logic rxf_meta, srxf_l, txe_meta, stxe_l;
  logic rd_l_d, wr_d, fifo_rd_en_d, wr_en_d;
  logic can_write, can_read;

  // input synchronizers and output registers
  always_ff @(posedge clk) begin
    if (!rst_l) begin
      rxf_meta   <= 1'b1;
      srxf_l     <= 1'b1;
      txe_meta   <= 1'b1;
      stxe_l     <= 1'b1;
      dlp_rd_l   <= 1'b1;
      dlp_wr     <= 1'b0;
      fifo_rd_en <= 1'b0;
      wr_en      <= 1'b0;
    end else begin
      rxf_meta   <= dlp_rxf_l;
      srxf_l     <= rxf_meta;
      txe_meta   <= dlp_txe_l;
      stxe_l     <= txe_meta;
      dlp_rd_l   <= rd_l_d;
      dlp_wr     <= wr_d;
      fifo_rd_en <= fifo_rd_en_d;
      wr_en      <= wr_en_d;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_l) state <= INIT;
    else        state <= nxt_state;
  end

  assign can_write = !stxe_l && !fifo_empty;
  assign can_read  = !srxf_l;

  always_comb begin
    nxt_state = state;
    unique case (state)
      INIT:    if (can_read) nxt_state = READ_0;
      READ_0:  nxt_state = READ_1;
      READ_1:  nxt_state = READ_2;
      READ_2:  nxt_state = IDLE;
      IDLE:    if (can_write)     nxt_state = WRITE_0;
               else if (can_read) nxt_state = READ_0;
      WRITE_0: nxt_state = WRITE_1;
      WRITE_1: nxt_state = WRITE_2;
      WRITE_2: nxt_state = IDLE;
      default: nxt_state = INIT;
    endcase
  end

  // requested output levels, registered above
  always_comb begin
    rd_l_d = !(((state == INIT || (state == IDLE && !can_write)) && can_read) ||
               state == READ_0 || state == READ_1);
    wr_d         = (state == IDLE && can_write) || state == WRITE_0 || state == WRITE_1;
    fifo_rd_en_d = (state == WRITE_0);
    wr_en_d      = (state == WRITE_1);
  end

  assign rd_en = (state == READ_1);

  // the read strobe and the write strobe are never active together
  assert property (@(posedge clk) disable iff (!rst_l) !(dlp_wr && !dlp_rd_l));
endmodule
