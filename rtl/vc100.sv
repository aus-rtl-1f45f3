// vc100: VGA controller for a 1024x768, 60 Hz monitor, clocked at 65 MHz. It draws the
// A-mode vector as a connected trace, two vertical measurement cursors, and the
// distance between the cursors as four decimal digits.
//
// Raster timing. An 11-bit pixel counter runs 0..1343 and a 10-bit line counter
// 0..805; both are offset so that 0 is the first visible pixel and line. HS is high
// for pixel counts 1047..1182 (136 clocks) and VS for lines 770..775 (6 lines), so the
// line rate is 48.36 kHz and the frame rate 60 Hz. The line counter advances when HS
// rises, so VS edges line up with HS rising edges. Both syncs are active high; a high
// VS marks vertical retrace, which the system controller uses to acquire a vector.
//
// Trace plotting. Column x of the screen shows memory byte 2x (1024 of the 2048
// samples). A sample value v is plotted at line 640 - v. For each column the
// controller compares the previous sample's line y0 with the current one y1 and lights
// the pixel when the current line lies in (y1, y0] or (y0, y1], or equals y1 when the
// two are equal, which draws vertical strokes joining consecutive samples. The read
// address col is issued two pixels ahead (col = 2*((pixel+2) mod 1344), mod 2048) to cover the
// address register and the memory's registered read, so the byte for column x reaches
// din while the pixel counter is at x.
//
// Cursors and digits. Two 11-bit cursor positions start at columns 4 and 1020 and are
// drawn on lines 101..649. A 26-bit prescaler gives a step tick every 2**26 clocks
// (about 1 s); on each tick one button moves one cursor by one column: btn[3] left
// cursor left, btn[2] left cursor right, btn[1] right cursor left, btn[0] right cursor
// right (priority in that order). The left cursor stays above 3 and never passes the
// right one; the right cursor stays below 1021. A 4-digit BCD up/down counter follows
// the distance right - left (it starts at 1016) and is drawn with 8x8 glyphs on lines
// 50..57 at pixels 513, 523, 533 and 543. Cursors win over digits, digits over trace.
//
// Interface: din is the memory read data, col the memory read address (always even, so
// col[0] is constant 0; it stays a full 11-bit address for the 2048-byte memory). r, g
// and b are all equal (white on black); hs, vs, r, g, b are registered and appear one
// clock after the counter state they belong to. rst_l is synchronous, active low,
// synchronized to clk; it starts the counters at the start of a sync pulse (pixel 1047,
// line 770). btn is asynchronous and synchronized here.
//
// From the source design: the timing values and counter offsets, the plotting rule,
// the value-to-line mapping, cursor limits and button assignment, the 26-bit
// prescaler, the digit positions and the priority of the three layers. This design's
// own: the two-pixel look-ahead of col, a clock enable in place of a divided cursor
// clock, the button synchronizers, and the glyphs of 2, 3 and 5. See the README for how the
// counter boundaries relate to the printed porch lengths.
module vc100
  import uaus_pkg::*;
#(
  parameter int unsigned CURSOR_DIV_BITS = 26
) (
  input  logic                clk,
  input  logic                rst_l,
  input  logic [7:0]          din,
  input  logic [3:0]          btn,
  output logic [VEC_AW-1:0]   col,
  output logic                hs,
  output logic                vs,
  output logic                r,
  output logic                g,
  output logic                b
);
  localparam int unsigned LOOKAHEAD = 2;

  logic [PIX_W-1:0]  pixel;
  logic [LINE_W-1:0] line;
  logic [LINE_W-1:0] y_prev_r;       // line of the previous column's sample
  logic [LINE_W-1:0] y_in, y0, y1;
  logic              pixel_on, plot_on, char_on, cursor_on;
  logic [PIX_W-1:0]  left_cur, right_cur;
  logic [15:0]       dist_bcd;       // four BCD digits, most significant first
  logic [CURSOR_DIV_BITS-1:0] presc;
  logic              tick;
  logic [3:0]        sbtn;

  // ---------------- raster counters and syncs ----------------
  always_ff @(posedge clk) begin
    if (!rst_l) begin
      pixel <= PIX_W'(HS_START);
      line  <= LINE_W'(VS_START);
    end else begin
      pixel <= (pixel == PIX_W'(H_TOTAL - 1)) ? '0 : pixel + 1'b1;
      if (pixel == PIX_W'(HS_START - 1))
        line <= (line == LINE_W'(V_TOTAL - 1)) ? '0 : line + 1'b1;
    end
  end

  // ---------------- trace plotting ----------------
  // pixel count LOOKAHEAD clocks from now, wrapping at the end of the line
  logic [PIX_W-1:0] ahead;
  assign ahead = (pixel >= PIX_W'(H_TOTAL - LOOKAHEAD)) ? pixel - PIX_W'(H_TOTAL - LOOKAHEAD)
                                                        : pixel + PIX_W'(LOOKAHEAD);
  assign y_in = LINE_W'(PLOT_BASE) - LINE_W'(din);
  assign y0   = (pixel == '0) ? y_in : y_prev_r;
  assign y1   = y_in;

  always_comb begin
    if (y0 > y1)      plot_on = (line > y1) && (line <= y0);
    else if (y0 < y1) plot_on = (line > y0) && (line <= y1);
    else              plot_on = (line == y1);
  end

  // ---------------- cursors ----------------
  assign cursor_on = (line > LINE_W'(CURSOR_TOP)) && (line < LINE_W'(CURSOR_BOTTOM)) &&
                     (pixel == left_cur || pixel == right_cur);

  // ---------------- distance digits ----------------
  always_comb begin
    logic [PIX_W-1:0]  dx;
    logic [2:0]        gx, gy;
    logic [5:0]        bitpos;
    logic [3:0]        digit;
    char_on = 1'b0;
    gx      = '0;
    digit   = '0;
    bitpos  = '0;
    gy      = 3'(line - LINE_W'(CHAR_LINE0));
    for (int k = 0; k < 4; k++) begin
      dx = pixel - PIX_W'(CHAR_X0 + k * CHAR_PITCH);
      if (line >= LINE_W'(CHAR_LINE0) && line < LINE_W'(CHAR_LINE0 + 8) && dx < PIX_W'(8)) begin
        gx      = dx[2:0];
        digit   = dist_bcd[15 - 4*k -: 4];
        bitpos  = 6'd63 - {gy, gx};
        char_on = digit_glyph(digit)[bitpos];
      end
    end
  end

  always_comb begin
    if (pixel >= PIX_W'(H_ACTIVE) || line >= LINE_W'(V_ACTIVE)) pixel_on = 1'b0;
    else if (cursor_on)                                        pixel_on = 1'b1;
    else if (char_on)                                          pixel_on = 1'b1;
    else                                                       pixel_on = plot_on;
  end

  // registered outputs and plotting state
  always_ff @(posedge clk) begin
    if (!rst_l) begin
      hs       <= 1'b0;
      vs       <= 1'b0;
      r        <= 1'b0;
      g        <= 1'b0;
      b        <= 1'b0;
      col      <= '0;
      y_prev_r <= '0;
    end else begin
      hs       <= (pixel >= PIX_W'(HS_START)) && (pixel < PIX_W'(HS_END));
      vs       <= (line  >= LINE_W'(VS_START)) && (line  < LINE_W'(VS_END));
      r        <= pixel_on;
      g        <= pixel_on;
      b        <= pixel_on;
      col      <= VEC_AW'(ahead << 1);
      y_prev_r <= y_in;
    end
  end

  // ---------------- cursor control ----------------
  function automatic logic [15:0] bcd_inc(input logic [15:0] v);
    logic [15:0] o;
    logic        c;
    o = v;
    c = 1'b1;
    for (int i = 0; i < 4; i++) begin
      if (c) begin
        if (o[4*i +: 4] == 4'd9) o[4*i +: 4] = 4'd0;
        else begin o[4*i +: 4] = o[4*i +: 4] + 4'd1; c = 1'b0; end
      end
    end
    return o;
  endfunction

  function automatic logic [15:0] bcd_dec(input logic [15:0] v);
    logic [15:0] o;
    logic        c;
    o = v;
    c = 1'b1;
    for (int i = 0; i < 4; i++) begin
      if (c) begin
        if (o[4*i +: 4] == 4'd0) o[4*i +: 4] = 4'd9;
        else begin o[4*i +: 4] = o[4*i +: 4] - 4'd1; c = 1'b0; end
      end
    end
    return o;
  endfunction

  sync2 u_b0 (.clk(clk), .d(btn[0]), .q(sbtn[0]));
  sync2 u_b1 (.clk(clk), .d(btn[1]), .q(sbtn[1]));
  sync2 u_b2 (.clk(clk), .d(btn[2]), .q(sbtn[2]));
  sync2 u_b3 (.clk(clk), .d(btn[3]), .q(sbtn[3]));

  assign tick = &presc;

  always_ff @(posedge clk) begin
    if (!rst_l) begin
      presc     <= '0;
      left_cur  <= PIX_W'(LEFT_CURSOR_INIT);
      right_cur <= PIX_W'(RIGHT_CURSOR_INIT);
      dist_bcd  <= 16'h1016;
    end else begin
      presc <= presc + 1'b1;
      if (tick) begin
        if (sbtn[3]) begin
          if (left_cur > PIX_W'(CURSOR_MIN)) begin
            left_cur <= left_cur - 1'b1;
            dist_bcd <= bcd_inc(dist_bcd);
          end
        end else if (sbtn[2]) begin
          if (left_cur < right_cur) begin
            left_cur <= left_cur + 1'b1;
            dist_bcd <= bcd_dec(dist_bcd);
          end
        end else if (sbtn[1]) begin
          if (right_cur > left_cur) begin
            right_cur <= right_cur - 1'b1;
            dist_bcd  <= bcd_dec(dist_bcd);
          end
        end else if (sbtn[0]) begin
          if (right_cur < PIX_W'(CURSOR_MAX)) begin
            right_cur <= right_cur + 1'b1;
            dist_bcd  <= bcd_inc(dist_bcd);
          end
        end
      end
    end
  end

  // the cursors never cross
  assert property (@(posedge clk) disable iff (!rst_l) left_cur <= right_cur);
endmodule
