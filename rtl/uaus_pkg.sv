// uaus_pkg: constants and small helpers shared by the A-mode imaging subsystem.
//
// The A-mode vector is 2048 bytes long and is addressed by an 11-bit byte counter.
// The host starts and stops USB streaming with a one-byte command whose least
// significant bit is the "go" flag (0x01 start, 0x00 stop).
// The VGA constants describe a 1024x768, 60 Hz raster clocked at 65 MHz. The pixel and
// line counters are offset so that 0 is the first visible pixel/line; the sync windows
// below are expressed in those offset coordinates (HS high for pixels 1047..1182, VS
// high for lines 770..775, 1344 clocks per line, 806 lines per frame).
// The digit glyphs are 8x8 bitmaps, bit 63 = top-left pixel, row-major, one byte per
// row. The patterns of 0, 1, 4, 6, 7, 8 and 9 are the source design's; 2, 3 and 5 are
// drawn for this design in the same style.
package uaus_pkg;

  // ---- A-mode vector ----
  localparam int unsigned VEC_LEN  = 2048;           // bytes per acquired vector
  localparam int unsigned VEC_AW   = $clog2(VEC_LEN); // 11-bit byte address

  typedef logic [7:0] byte_t;

  // ---- host command bytes ----
  localparam byte_t CMD_START = 8'h01;
  localparam byte_t CMD_STOP  = 8'h00;

  // ---- VGA 1024x768 @ 60 Hz, offset counters ----
  localparam int unsigned H_ACTIVE   = 1024;
  localparam int unsigned H_TOTAL    = 1344;
  localparam int unsigned HS_START   = 1047;  // first pixel count with HS high
  localparam int unsigned HS_END     = 1183;  // first pixel count with HS low again (136 clocks)
  localparam int unsigned V_ACTIVE   = 768;
  localparam int unsigned V_TOTAL    = 806;
  localparam int unsigned VS_START   = 770;   // first line with VS high
  localparam int unsigned VS_END     = 776;   // first line with VS low again (6 lines)

  localparam int unsigned PIX_W  = 11;
  localparam int unsigned LINE_W = 10;

  // ---- on-screen decorations ----
  localparam int unsigned CURSOR_TOP    = 100; // cursors drawn on lines 101..649
  localparam int unsigned CURSOR_BOTTOM = 650;
  localparam int unsigned CURSOR_MIN    = 3;   // left cursor stays above this
  localparam int unsigned CURSOR_MAX    = 1021;// right cursor stays below this
  localparam int unsigned LEFT_CURSOR_INIT  = 4;
  localparam int unsigned RIGHT_CURSOR_INIT = 1020;
  localparam int unsigned CHAR_LINE0 = 50;     // digits occupy lines 50..57
  localparam int unsigned CHAR_X0    = 513;    // first digit starts at pixel 513
  localparam int unsigned CHAR_PITCH = 10;     // 8 pixels glyph + 2 pixels gap
  localparam int unsigned PLOT_BASE  = 640;    // line of a zero-amplitude sample

  // 8x8 digit glyph, bit 63 is the top-left pixel
  function automatic logic [63:0] digit_glyph(input logic [3:0] d);
    case (d)
      4'd0: return 64'h1824_4242_4242_2418;
      4'd1: return 64'h1828_4808_0808_0808;
      4'd2: return 64'h3844_0408_1020_407C;
      4'd3: return 64'h3844_0418_0404_4438;
      4'd4: return 64'h0818_2848_7E08_0808;
      4'd5: return 64'h3C20_2038_0404_4438;
      4'd6: return 64'h1824_4058_6444_4438;
      4'd7: return 64'h3C24_0408_0810_1030;
      4'd8: return 64'h1824_2418_1824_2418;
      4'd9: return 64'h1824_243C_0404_2418;
      default: return 64'h0;
    endcase
  endfunction

endpackage
