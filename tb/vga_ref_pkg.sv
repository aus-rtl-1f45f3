// vga_ref_pkg: reference picture for the VGA testbenches. A pixel (x, l) is lit when
// it lies on a cursor (column left or right, lines 101..649), on a digit of the
// distance (8x8 glyphs at lines 50..57, columns 513/523/533/543), or on the trace:
// with y1 = 640 - s_cur and y0 = 640 - s_prev (y0 = y1 in column 0), the pixel is
// lit for y1 < l <= y0, y0 < l <= y1, or l == y1 when they are equal.
package vga_ref_pkg;
  // expected digit bitmaps, one row per byte, top row first, leftmost pixel in bit 7
  localparam bit [7:0] GLYPH [10][8] = '{
    '{8'b00011000, 8'b00100100, 8'b01000010, 8'b01000010, 8'b01000010, 8'b01000010, 8'b00100100, 8'b00011000},  // 0
    '{8'b00011000, 8'b00101000, 8'b01001000, 8'b00001000, 8'b00001000, 8'b00001000, 8'b00001000, 8'b00001000},  // 1
    '{8'b00111000, 8'b01000100, 8'b00000100, 8'b00001000, 8'b00010000, 8'b00100000, 8'b01000000, 8'b01111100},  // 2
    '{8'b00111000, 8'b01000100, 8'b00000100, 8'b00011000, 8'b00000100, 8'b00000100, 8'b01000100, 8'b00111000},  // 3
    '{8'b00001000, 8'b00011000, 8'b00101000, 8'b01001000, 8'b01111110, 8'b00001000, 8'b00001000, 8'b00001000},  // 4
    '{8'b00111100, 8'b00100000, 8'b00100000, 8'b00111000, 8'b00000100, 8'b00000100, 8'b01000100, 8'b00111000},  // 5
    '{8'b00011000, 8'b00100100, 8'b01000000, 8'b01011000, 8'b01100100, 8'b01000100, 8'b01000100, 8'b00111000},  // 6
    '{8'b00111100, 8'b00100100, 8'b00000100, 8'b00001000, 8'b00001000, 8'b00010000, 8'b00010000, 8'b00110000},  // 7
    '{8'b00011000, 8'b00100100, 8'b00100100, 8'b00011000, 8'b00011000, 8'b00100100, 8'b00100100, 8'b00011000},  // 8
    '{8'b00011000, 8'b00100100, 8'b00100100, 8'b00111100, 8'b00000100, 8'b00000100, 8'b00100100, 8'b00011000}  // 9
  };

  function automatic bit expected_pixel(input int x, input int l, input int s_prev,
                                        input int s_cur, input int left, input int right,
                                        input int distance);
    int y0, y1;
    if (l > 100 && l < 650 && (x == left || x == right)) return 1;
    if (l >= 50 && l <= 57) begin
      int digits [4];
      digits[0] = (distance / 1000) % 10;
      digits[1] = (distance / 100) % 10;
      digits[2] = (distance / 10) % 10;
      digits[3] = distance % 10;
      for (int k = 0; k < 4; k++) begin
        int x0 = 513 + 10 * k;
        if (x >= x0 && x < x0 + 8)
          return GLYPH[digits[k]][l - 50][7 - (x - x0)];
      end
    end
    y1 = 640 - s_cur;
    y0 = (x == 0) ? y1 : 640 - s_prev;
    if (y0 > y1) return (l > y1 && l <= y0);
    if (y0 < y1) return (l > y0 && l <= y1);
    return (l == y1);
  endfunction
endpackage
