// uaus: A-mode ultrasonic imaging subsystem, top level.
//
// Once per video frame, during vertical retrace, the system controller pulses the
// (simulated) ultrasound backend and captures the 2048-byte echo vector it returns.
// The envelope detector rectifies and low-pass filters the vector on the fly; the
// result is written, one byte per 50 MHz clock, into a FIFO for the USB interface
// (if the host has sent the start byte 0x01) and into a dual-port memory for the
// local VGA display (if the VGA switch vga_go_h is on). The USB interface streams the
// FIFO to the host through an external DLP-2232M (FT2232C) module; the VGA drawing
// unit, in the 65 MHz domain, plots every second byte of the memory on a 1024x768
// screen with two button-driven cursors and their distance.
//
// Clocks: clka 50 MHz (backend, envelope detector, system controller, USB); clkb 65 MHz
// (VGA). Only the dual-port memory and the vs input of the system controller cross
// between them. rst_l is an asynchronous active-low reset; every unit has its own two-
// flop reset synchronizer, which asserts at once and releases on its clock. vga_go_h
// (switch) and btn (push buttons) are asynchronous inputs.
//
// The DLP module's bidirectional data bus appears as dlp_din (from the module),
// dlp_dout and dlp_oe (to a tri-state pad driver outside this module). Everything else
// matches the source design's top level.
module uaus
  import uaus_pkg::*;
#(
  parameter int unsigned CURSOR_DIV_BITS = 26
) (
  input  logic       clka,
  input  logic       clkb,
  input  logic       rst_l,
  input  logic       vga_go_h,
  input  logic [7:0] dlp_din,
  output logic [7:0] dlp_dout,
  output logic       dlp_oe,
  input  logic       dlp_txe_l,
  input  logic       dlp_rxf_l,
  input  logic [3:0] btn,
  output logic       dlp_rd_l,
  output logic       dlp_wr,
  output logic       hs,
  output logic       vs,
  output logic       r,
  output logic       g,
  output logic       b
);
  logic [VEC_AW-1:0] bcount;
  logic              fifo_wea, dpm_wea, be_ph, be_pl;
  logic [7:0]        be_data, ed_dout;
  logic              usb_go_h;

  sys_cntr u_system_controller (
    .clk      (clka),
    .rst_l    (rst_l),
    .vga_go_h (vga_go_h),
    .usb_go_h (usb_go_h),
    .vc_vs    (vs),
    .bcount   (bcount),
    .fifo_wea (fifo_wea),
    .dpm_wea  (dpm_wea),
    .ph       (be_ph),
    .pl       (be_pl)
  );

  backend u_backend (
    .clk     (clka),
    .rst_l   (rst_l),
    .ph      (be_ph),
    .pl      (be_pl),
    .ad_data (be_data)
  );

  ed100 u_envelope_detect (
    .clk   (clka),
    .rst_l (rst_l),
    .din   (be_data),
    .dout  (ed_dout)
  );

  usb_int u_usb_interface (
    .clk       (clka),
    .rst_l     (rst_l),
    .din       (ed_dout),
    .wr_en     (fifo_wea),
    .dlp_din   (dlp_din),
    .dlp_dout  (dlp_dout),
    .dlp_oe    (dlp_oe),
    .dlp_txe_l (dlp_txe_l),
    .dlp_rxf_l (dlp_rxf_l),
    .dlp_rd_l  (dlp_rd_l),
    .dlp_wr    (dlp_wr),
    .usb_go_h  (usb_go_h)
  );

  vga_draw #(.CURSOR_DIV_BITS(CURSOR_DIV_BITS)) u_vga_drawing (
    .clka    (clka),
    .clkb    (clkb),
    .rst_l   (rst_l),
    .din     (ed_dout),
    .wr_en   (dpm_wea),
    .wr_addr (bcount),
    .btn     (btn),
    .hs      (hs),
    .vs      (vs),
    .r       (r),
    .g       (g),
    .b       (b)
  );
endmodule
