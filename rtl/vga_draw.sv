// vga_draw: VGA drawing unit. The dual-port memory takes each new A-mode vector from
// the 50 MHz acquisition side (clka) and the VC100 controller reads it on the 65 MHz
// video side (clkb) to draw the display.
//
// Port A of the memory is written with din at wr_addr (the byte counter) while wr_en
// is high. Port B is addressed by the controller's col output and is enabled with
// HS NOR VS, that is whenever neither sync pulse is active. The vertical sync is
// brought out both to the monitor and to the system controller, which acquires a new
// vector during retrace. rst_l is asynchronous and active low and is synchronized to
// clkb here.
//
// The structure, the memory size and the NOR read enable follow the source design.
module vga_draw
  import uaus_pkg::*;
#(
  parameter int unsigned CURSOR_DIV_BITS = 26
) (
  input  logic              clka,
  input  logic              clkb,
  input  logic              rst_l,
  input  logic [7:0]        din,
  input  logic              wr_en,
  input  logic [VEC_AW-1:0] wr_addr,
  input  logic [3:0]        btn,
  output logic              hs,
  output logic              vs,
  output logic              r,
  output logic              g,
  output logic              b
);
  logic              srst_l;
  logic [VEC_AW-1:0] vc_col;
  logic [7:0]        dpm_doutb;
  logic              dpm_enb;

  rst_sync u_rst_sync (.clk(clkb), .rst_l(rst_l), .srst_l(srst_l));

  vc100 #(.CURSOR_DIV_BITS(CURSOR_DIV_BITS)) u_vc (
    .clk   (clkb),
    .rst_l (srst_l),
    .din   (dpm_doutb),
    .btn   (btn),
    .col   (vc_col),
    .hs    (hs),
    .vs    (vs),
    .r     (r),
    .g     (g),
    .b     (b)
  );

  dpm #(.DEPTH(VEC_LEN), .DW(8)) u_dpm (
    .clka  (clka),
    .wea   (wr_en),
    .addra (wr_addr),
    .dina  (din),
    .clkb  (clkb),
    .enb   (dpm_enb),
    .addrb (vc_col),
    .doutb (dpm_doutb)
  );

  assign dpm_enb = !(hs || vs);
endmodule
