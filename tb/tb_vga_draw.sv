// tb_vga_draw: self-checking testbench of the VGA drawing unit (controller plus
// dual-port memory). A vector is written through the 50 MHz port, and the next full
// 65 MHz frame must show it pixel for pixel (every second byte as the trace, default
// cursors and distance). A second vector written during blanking must appear in the
// following frame, and bytes presented with wr_en low must not.
module tb_vga_draw;
  import vga_ref_pkg::*;
  logic clka = 0, clkb = 0, rst_l = 1, wr_en = 0;
  logic [7:0] din = 0;
  logic [10:0] wr_addr = 0;
  logic [3:0] btn = 0;
  logic hs, vs, r, g, b;
  int checks = 0, failures = 0;
  byte unsigned mem [2048];
  logic active = 0;

  vga_draw #(.CURSOR_DIV_BITS(4)) dut (.clka(clka), .clkb(clkb), .rst_l(rst_l), .din(din),
    .wr_en(wr_en), .wr_addr(wr_addr), .btn(btn), .hs(hs), .vs(vs), .r(r), .g(g), .b(b));

  vga_monitor mon (.clk(clkb), .active(active), .hs(hs), .vs(vs), .r(r), .g(g), .b(b));

  always #10   clka = ~clka;
  always #7.69 clkb = ~clkb;

  // a real falling reset edge at 1 ns, so the reset synchronizers clear at once
  initial #1 rst_l = 0;

  initial begin
    #80ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_frame();
    int bad = 0;
    for (int l = 0; l < 768; l++) begin
      int bad_line = 0;
      for (int x = 0; x < 1024; x++) begin
        bit e = expected_pixel(x, l, (x > 0) ? int'(mem[2*x-2]) : 0, int'(mem[2*x]), 4, 1020, 1016);
        if (mon.fb[l][x] != e) begin
          bad_line++;
          if (bad < 10) $display("pixel %0d,%0d is %0d, expected %0d", x, l, mon.fb[l][x], e);
          bad++;
        end
      end
      checks++;
      if (bad_line != 0) failures++;
    end
  endtask

  task automatic write_vector(input int kind, input bit enable);
    for (int i = 0; i < 2048; i++) begin
      int v = (kind == 0) ? $urandom_range(0, 133) : fir_ref_pkg::echo_env(i);
      @(negedge clka);
      wr_en = enable;
      wr_addr = 11'(i);
      din = 8'(v);
      if (enable) mem[i] = 8'(v);
    end
    @(negedge clka) wr_en = 0;
  endtask

  initial begin
    repeat (5) @(posedge clka);
    @(negedge clka) rst_l = 1;
    active = 1;
    write_vector(0, 1);
    wait (mon.frames >= 1);
    wait (mon.frames >= 2);
    compare_frame();
    write_vector(1, 1);          // during the blanking after the frame
    write_vector(0, 0);          // not enabled: must be ignored
    wait (mon.frames >= 3);
    compare_frame();
    checks++;
    if (mon.errors != 0) begin failures++; $display("%0d sync/raster errors", mon.errors); end
    checks += mon.checks;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
