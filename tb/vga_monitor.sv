// vga_monitor: testbench-only VGA receiver. It recovers the pixel position from the
// sync signals alone (the first clock with HS high is pixel count 1047; a line whose HS
// rise coincides with VS rising is line 770) and stores every visible pixel in fb.
// It also checks the sync waveforms: HS period 1344 clocks and width 136, VS width 6
// lines and period 806 lines, VS changing only together with an HS rise, r = g = b,
// and no light outside the visible area. frames counts VS rising edges; at each one fb
// holds the complete picture that was just sent.
module vga_monitor (
  input  logic clk,
  input  logic active,
  input  logic hs,
  input  logic vs,
  input  logic r,
  input  logic g,
  input  logic b
);
  bit   fb [768][1024];
  int   frames = 0;
  int   errors = 0;
  int   checks = 0;
  int   px = -1, ln = -1;
  int   hs_len = 0, hs_period = 0, vs_lines = 0, lines_in_frame = 0;
  logic hs_q = 0, vs_q = 0;
  bit   locked = 0;

  task automatic err(input string s);
    errors++;
    if (errors < 20) $display("vga_monitor: %s", s);
  endtask

  always @(posedge clk) if (active) begin
    int npx, nln;
    npx = (px < 0) ? -1 : (px + 1) % 1344;
    nln = ln;
    if (hs && !hs_q) begin
      if (locked && hs_period != 1344) err($sformatf("HS period %0d", hs_period));
      if (locked) checks++;
      hs_period = 0;
      npx = 1047;
      if (vs && !vs_q) begin
        if (locked && lines_in_frame != 806) err($sformatf("frame of %0d lines", lines_in_frame));
        if (locked) checks++;
        nln = 770;
        lines_in_frame = 0;
        if (locked || ln >= 0) frames++;
        locked = 1;
      end else nln = (ln < 0) ? -1 : (ln + 1) % 806;
      lines_in_frame++;
      if (vs) vs_lines++;
      if (!vs && vs_q) begin
        if (vs_lines != 6) err($sformatf("VS %0d lines", vs_lines));
        checks++;
        vs_lines = 0;
      end
    end else if (vs != vs_q) err("VS changed without an HS rise");
    hs_period++;
    if (hs) hs_len++;
    if (!hs && hs_q) begin
      if (hs_len != 136) err($sformatf("HS width %0d", hs_len));
      hs_len = 0;
    end
    if (!(r == g && g == b)) err("r, g, b differ");
    px = npx;
    ln = nln;
    if (px >= 0 && ln >= 0) begin
      if (px < 1024 && ln < 768) fb[ln][px] = r;
      else if (r) err($sformatf("light outside the visible area at %0d,%0d", px, ln));
    end
    hs_q <= hs;
    vs_q <= vs;
  end
endmodule
