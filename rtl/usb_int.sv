// usb_int: USB interface unit. It buffers envelope-detected bytes in a FIFO and lets
// the DC100 data controller send them to the DLP-2232M USB module, and it keeps the
// host's start/stop command.
//
// Bytes arrive on din while the system controller holds wr_en high (one byte per
// clock). The data controller pops them and strobes them into the module. A byte sent
// by the host is captured from the module's bus when the controller pulses rd_en; its
// least significant bit becomes usb_go_h, so 0x01 starts streaming and 0x00 stops it
// (the system controller only fills the FIFO while usb_go_h is high).
//
// The module's bidirectional data bus is split into dlp_din (from the module),
// dlp_dout and dlp_oe (to the pad driver): dlp_oe is the data controller's wr_en, so
// the FIFO output is driven onto the bus only during the last clock of a write strobe.
// rst_l is asynchronous and active low and is synchronized here; the FIFO sees it as
// an active-high reset. The FIFO's full flag is not used, as in the source design.
//
// The structure follows the source design; replacing the tri-state bus with separate
// in/out/enable signals is this design's choice.
module usb_int (
  input  logic       clk,
  input  logic       rst_l,
  input  logic [7:0] din,
  input  logic       wr_en,
  input  logic [7:0] dlp_din,
  output logic [7:0] dlp_dout,
  output logic       dlp_oe,
  input  logic       dlp_txe_l,
  input  logic       dlp_rxf_l,
  output logic       dlp_rd_l,
  output logic       dlp_wr,
  output logic       usb_go_h
);
  logic srst_l;
  logic dc_rd_en, dc_wr_en, dc_fifo_rd_en;
  logic fifo_empty, fifo_full;

  rst_sync u_rst_sync (.clk(clk), .rst_l(rst_l), .srst_l(srst_l));

  dc100 u_dc (
    .clk        (clk),
    .rst_l      (srst_l),
    .dlp_txe_l  (dlp_txe_l),
    .dlp_rxf_l  (dlp_rxf_l),
    .fifo_empty (fifo_empty),
    .dlp_rd_l   (dlp_rd_l),
    .dlp_wr     (dlp_wr),
    .fifo_rd_en (dc_fifo_rd_en),
    .wr_en      (dc_wr_en),
    .rd_en      (dc_rd_en)
  );

  fifo #(.DEPTH(2048), .DW(8)) u_fifo (
    .clk   (clk),
    .rst   (!srst_l),
    .din   (din),
    .wr_en (wr_en),
    .rd_en (dc_fifo_rd_en),
    .dout  (dlp_dout),
    .empty (fifo_empty),
    .full  (fifo_full)
  );

  // command flop: keeps bit 0 of the last byte read from the module
  always_ff @(posedge clk) begin
    if (!srst_l)       usb_go_h <= 1'b0;
    else if (dc_rd_en) usb_go_h <= dlp_din[0];
  end

  assign dlp_oe = dc_wr_en;

  // nothing is ever written into a full FIFO: one vector per frame fits exactly
  assert property (@(posedge clk) disable iff (!srst_l) !(wr_en && fifo_full));
endmodule
