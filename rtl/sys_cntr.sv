// sys_cntr: system controller unit of the 50 MHz domain: the SC100 state machine, its
// byte counter, and a two-flop synchronizer for the external reset (asserted at once,
// released on the clock).
//
// The byte counter is cleared while the state machine holds cntr_rst_l low and counts
// one byte per clock during the write phase; its value goes back to the state machine
// (end of vector at 2047) and out as bcount, the write address of the dual-port memory.
// vga_go_h comes from a board switch and is also passed through two flops here, which
// is this design's addition; the rest of the structure follows the source design.
//
// Interface: rst_l is asynchronous and active low. vc_vs is the vertical sync from the
// 65 MHz video domain. fifo_wea and dpm_wea are the write enables of the FIFO and the
// dual-port memory; ph and pl are the backend strobes.
module sys_cntr
  import uaus_pkg::*;
(
  input  logic              clk,
  input  logic              rst_l,
  input  logic              vga_go_h,
  input  logic              usb_go_h,
  input  logic              vc_vs,
  output logic [VEC_AW-1:0] bcount,
  output logic              fifo_wea,
  output logic              dpm_wea,
  output logic              ph,
  output logic              pl
);
  logic srst_l, svga_go_h, cntr_rst_l;

  rst_sync u_rst_sync (.clk(clk), .rst_l(rst_l), .srst_l(srst_l));
  sync2 u_go_sync  (.clk(clk), .d(vga_go_h), .q(svga_go_h));

  sc100 u_sc (
    .clk        (clk),
    .rst_l      (srst_l),
    .vga_go_h   (svga_go_h),
    .usb_go_h   (usb_go_h),
    .vc_vs      (vc_vs),
    .count      (bcount),
    .cntr_rst_l (cntr_rst_l),
    .fifo_wr_en (fifo_wea),
    .dpm_wea    (dpm_wea),
    .be_ph      (ph),
    .be_pl      (pl)
  );

  cntr #(.W(VEC_AW)) u_cntr (.clk(clk), .rst_l(cntr_rst_l), .n(bcount));
endmodule
