// tb_vc100: self-checking testbench of the VGA controller, with the dual-port memory
// modelled in the testbench (registered read, enabled by HS NOR VS). The cursor
// prescaler is shortened to 2**4 clocks. Three complete frames are captured by the
// sync-driven monitor and compared pixel by pixel with the reference picture:
//   frame 1: random-walk samples, cursors at 4 and 1020, distance 1016;
//   frame 2: echo-like samples, after btn3 and btn0 pushed the cursors against
//            their limits (3 and 1021, distance 1018);
//   frame 3: full-swing alternating samples, after btn2 and btn1 moved both cursors
//            inwards; the displayed distance must equal the cursor gap.
module tb_vc100;
  import vga_ref_pkg::*;
  logic clk = 0, rst_l = 0;
  logic [7:0] din;
  logic [3:0] btn = 0;
  logic [10:0] col;
  logic hs, vs, r, g, b;
  int checks = 0, failures = 0;
  byte unsigned mem [2048];
  logic active = 0;

  vc100 #(.CURSOR_DIV_BITS(4)) dut (.clk(clk), .rst_l(rst_l), .din(din), .btn(btn),
    .col(col), .hs(hs), .vs(vs), .r(r), .g(g), .b(b));

  vga_monitor mon (.clk(clk), .active(active), .hs(hs), .vs(vs), .r(r), .g(g), .b(b));

  always #7.69 clk = ~clk;

  always @(posedge clk) if (!(hs || vs)) din <= mem[col];

  initial begin
    #80ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_frame(input int left, input int right, input int distance);
    int bad = 0;
    for (int l = 0; l < 768; l++) begin
      int bad_line = 0;
      for (int x = 0; x < 1024; x++) begin
        bit e = expected_pixel(x, l, (x > 0) ? int'(mem[2*x-2]) : 0, int'(mem[2*x]), left, right, distance);
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

  task automatic wait_frame(input int n);
    wait (mon.frames >= n);
    @(posedge clk);
  endtask

  task automatic push(input int button, input int cycles);
    btn[button] = 1;
    repeat (cycles) @(posedge clk);
    btn[button] = 0;
    repeat (8) @(posedge clk);
  endtask

  initial begin
    int v = 60;
    for (int i = 0; i < 2048; i++) begin
      v += $urandom_range(0, 8) - 4;
      if (v < 0) v = 0;
      if (v > 133) v = 133;
      mem[i] = 8'(v);
    end
    repeat (5) @(posedge clk);
    @(negedge clk) rst_l = 1;
    active = 1;
    wait_frame(1);                  // first sync: monitor locks
    wait_frame(2);
    compare_frame(4, 1020, 1016);
    // next frame: new data and cursors pushed to their limits, during blanking
    for (int i = 0; i < 2048; i++) mem[i] = 8'(fir_ref_pkg::echo_env(i));
    push(3, 400);
    push(0, 400);
    wait_frame(3);
    compare_frame(3, 1021, 1018);
    for (int i = 0; i < 2048; i++) mem[i] = (i % 4 < 2) ? 8'd133 : 8'd0;
    push(2, 800);
    push(1, 1600);
    wait_frame(4);
    begin
      int left = -1, right = -1;
      for (int x = 0; x < 1024; x++) if (mon.fb[300][x]) begin
        if (left < 0) left = x; else right = x;
      end
      checks++;
      if (!(left >= 50 && left <= 56 && right >= 918 && right <= 924)) begin
        failures++;
        $display("cursors at %0d and %0d after the moves", left, right);
      end
      compare_frame(left, right, right - left);
    end
    checks++;
    if (mon.errors != 0) begin failures++; $display("%0d sync/raster errors", mon.errors); end
    checks += mon.checks;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
