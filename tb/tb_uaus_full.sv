// tb_uaus_full: one complete operation of the subsystem with every parameter at its
// default, including the 2**26-clock cursor prescaler (the cursors therefore stay at
// their reset positions here; tb_uaus moves them with a short prescaler).
// The host sends the start byte after the first retrace. The next retrace acquires one
// vector: the host must receive the 2048 filtered bytes predicted by the reference
// model, and the frame drawn after that retrace must show them pixel for pixel,
// together with the cursors, the grid and the distance 1016.
module tb_uaus_full;
  import vga_ref_pkg::*;
  import fir_ref_pkg::*;
  logic clka = 0, clkb = 0, rst_l = 1, vga_go_h = 1;
  logic [7:0] dlp_din, dlp_dout;
  logic dlp_oe, dlp_txe_l, dlp_rxf_l, dlp_rd_l, dlp_wr;
  logic [3:0] btn = 0;
  logic hs, vs, r, g, b;
  logic active = 0;
  int checks = 0, failures = 0;
  int expected_vec [2048];
  byte unsigned mem [2048];

  uaus dut (.clka(clka), .clkb(clkb), .rst_l(rst_l), .vga_go_h(vga_go_h),
    .dlp_din(dlp_din), .dlp_dout(dlp_dout), .dlp_oe(dlp_oe), .dlp_txe_l(dlp_txe_l),
    .dlp_rxf_l(dlp_rxf_l), .btn(btn), .dlp_rd_l(dlp_rd_l), .dlp_wr(dlp_wr),
    .hs(hs), .vs(vs), .r(r), .g(g), .b(b));

  dlp_model dlp (.clk(clka), .active(active), .rd_l(dlp_rd_l), .wr(dlp_wr),
    .din(dlp_dout), .oe(dlp_oe), .dout(dlp_din), .rxf_l(dlp_rxf_l), .txe_l(dlp_txe_l));

  vga_monitor mon (.clk(clkb), .active(active), .hs(hs), .vs(vs), .r(r), .g(g), .b(b));

  always #10   clka = ~clka;
  always #7.69 clkb = ~clkb;

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int bad;
    for (int k = 0; k < 2048; k++) begin
      longint s;
      s = 0;
      for (int i = 0; i < 23; i++) s += longint'(H[i]) * echo_env(k - 4 - i);
      expected_vec[k] = round_out(s);
    end
    #1 rst_l = 0;
    repeat (5) @(posedge clka);
    @(negedge clka) rst_l = 1;
    active = 1;
    wait (mon.frames >= 0);
    #1ms;
    dlp.host_send(8'h01);
    dlp.rx_q.delete();
    // second retrace: acquisition, streamed to the host and written to the memory
    wait (mon.frames >= 1);
    #1ms;
    chk(dlp.rx_q.size() == 2048, $sformatf("host received %0d bytes", dlp.rx_q.size()));
    if (dlp.rx_q.size() == 2048) begin
      bad = 0;
      for (int k = 0; k < 2048; k++) if (int'(dlp.rx_q[k]) != expected_vec[k]) begin
        if (bad < 5) $display("byte %0d: %0d expected %0d", k, dlp.rx_q[k], expected_vec[k]);
        bad++;
      end
      chk(bad == 0, "USB vector matches the reference");
    end
    for (int a = 0; a < 2048; a++) mem[a] = (dlp.rx_q.size() == 2048) ? dlp.rx_q[(a + 2047) % 2048] : 8'd0;
    // the frame drawn after that retrace
    wait (mon.frames >= 2);
    bad = 0;
    for (int l = 0; l < 768; l++)
      for (int x = 0; x < 1024; x++)
        if (mon.fb[l][x] != expected_pixel(x, l, (x > 0) ? int'(mem[2*x-2]) : 0, int'(mem[2*x]), 4, 1020, 1016)) begin
          if (bad < 5) $display("pixel %0d,%0d wrong", x, l);
          bad++;
        end
    chk(bad == 0, $sformatf("frame matches (%0d bad pixels)", bad));
    chk(dlp.errors == 0, "DLP interface protocol");
    chk(mon.errors == 0, "VGA sync and raster");
    checks += mon.checks;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
