// tb_uaus: end-to-end testbench of the whole subsystem.
// A DLP-2232M model stands in for the USB module and host, a sync-driven monitor for
// the VGA screen. The cursor prescaler is shortened to 2**4 clocks; everything else
// is at its default size. Sequence, one step per video frame:
//   1. the host sends the start byte 0x01 after the first retrace;
//   2. each later retrace acquires a vector: the host must receive 2048 bytes equal
//      to the reference (echo model -> rectifier -> 23-tap filter, byte k built from
//      backend samples k-4 .. k-26), and the next frame must show those bytes as the
//      trace, pixel for pixel (the memory holds byte k at address k+1 mod 2048);
//   3. a button moves the right cursor, and the next frame must show it and the new
//      distance;
//   4. the VGA switch is turned off: no memory writes, USB still streams;
//   5. the host sends the stop byte 0x00 while that vector is still being sent: the
//      controller reads it between two writes, finishes the vector, and the following
//      retrace sends nothing.
// Each mechanism is counted and a failure is counted for any that never happened.
module tb_uaus;
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
  int n_acq = 0, n_fifo_vec = 0, n_dpm_vec = 0, n_frames_ok = 0, n_cursor = 0;
  int n_vga_off = 0, n_stop = 0, n_start = 0, n_midread = 0;
  int fifo_w = 0, dpm_w = 0;
  logic ph_q = 0;

  uaus #(.CURSOR_DIV_BITS(4)) dut (.clka(clka), .clkb(clkb), .rst_l(rst_l),
    .vga_go_h(vga_go_h), .dlp_din(dlp_din), .dlp_dout(dlp_dout), .dlp_oe(dlp_oe),
    .dlp_txe_l(dlp_txe_l), .dlp_rxf_l(dlp_rxf_l), .btn(btn), .dlp_rd_l(dlp_rd_l),
    .dlp_wr(dlp_wr), .hs(hs), .vs(vs), .r(r), .g(g), .b(b));

  dlp_model #(.TXE_GAP(4)) dlp (.clk(clka), .active(active), .rd_l(dlp_rd_l), .wr(dlp_wr),
    .din(dlp_dout), .oe(dlp_oe), .dout(dlp_din), .rxf_l(dlp_rxf_l), .txe_l(dlp_txe_l));

  vga_monitor mon (.clk(clkb), .active(active), .hs(hs), .vs(vs), .r(r), .g(g), .b(b));

  always #10   clka = ~clka;
  always #7.69 clkb = ~clkb;

  // write-enable activity, counted at the 50 MHz clock
  always @(posedge clka) if (active) begin
    if (dut.fifo_wea) fifo_w++;
    if (dut.dpm_wea)  dpm_w++;
    if (dut.be_ph && !ph_q) n_acq++;
    ph_q <= dut.be_ph;
  end

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wait_frame(input int n);
    wait (mon.frames >= n);
    #300us;   // past the acquisition and most of the USB transfer
  endtask

  // check the bytes received since the last call form exactly one expected vector
  task automatic check_usb_vector(input int expect_bytes);
    int got = dlp.rx_q.size();
    chk(got == expect_bytes, $sformatf("host received %0d bytes, expected %0d", got, expect_bytes));
    if (expect_bytes == 2048 && got == 2048) begin
      int bad = 0;
      for (int k = 0; k < 2048; k++) if (int'(dlp.rx_q[k]) != expected_vec[k]) begin
        if (bad < 5) $display("byte %0d: %0d expected %0d", k, dlp.rx_q[k], expected_vec[k]);
        bad++;
      end
      chk(bad == 0, "USB vector matches the reference");
      if (bad == 0) n_fifo_vec++;
      for (int a = 0; a < 2048; a++) mem[a] = dlp.rx_q[(a + 2047) % 2048];
    end
    dlp.rx_q.delete();
  endtask

  task automatic compare_frame(input int left, input int right, input int distance);
    int bad = 0;
    for (int l = 0; l < 768; l++)
      for (int x = 0; x < 1024; x++) begin
        bit e = expected_pixel(x, l, (x > 0) ? int'(mem[2*x-2]) : 0, int'(mem[2*x]), left, right, distance);
        if (mon.fb[l][x] != e) begin
          if (bad < 5) $display("pixel %0d,%0d is %0d, expected %0d", x, l, mon.fb[l][x], e);
          bad++;
        end
      end
    chk(bad == 0, $sformatf("frame shows the vector and decorations (%0d bad pixels)", bad));
    if (bad == 0) n_frames_ok++;
  endtask

  initial begin
    for (int k = 0; k < 2048; k++) begin
      longint s;
      s = 0;
      for (int i = 0; i < 23; i++) s += longint'(H[i]) * echo_env(k - 4 - i);
      expected_vec[k] = round_out(s);
    end
    #1 rst_l = 0;             // a real falling edge, so the reset synchronizers clear
    repeat (5) @(posedge clka);
    @(negedge clka) rst_l = 1;
    active = 1;
    wait_frame(0);
    #1ms;                         // first retrace over, display running
    dlp.host_send(8'h01);
    n_start++;
    dlp.rx_q.delete();
    fifo_w = 0; dpm_w = 0;
    // retrace 2: full acquisition to both FIFO and memory
    wait_frame(1);
    #1ms;
    check_usb_vector(2048);
    chk(fifo_w == 2048 && dpm_w == 2048, $sformatf("%0d FIFO and %0d memory writes", fifo_w, dpm_w));
    if (dpm_w == 2048) n_dpm_vec++;
    // frame after retrace 2 shows the vector; push the right cursor during blanking
    wait (mon.frames >= 2);
    compare_frame(4, 1020, 1016);
    #1ms;
    check_usb_vector(2048);
    @(negedge clkb) btn[0] = 1;
    repeat (100) @(posedge clkb);   // several ticks; the cursor stops at 1021
    btn[0] = 0;
    wait (mon.frames >= 3);
    compare_frame(4, 1021, 1017);
    if (n_frames_ok == 2) n_cursor++;
    // VGA switch off: memory no longer written, USB continues
    #1ms;
    check_usb_vector(2048);
    vga_go_h = 0;
    dpm_w = 0; fifo_w = 0;
    wait (mon.frames >= 4);
    // the stop byte arrives while this vector is still being sent: the controller must
    // read it between writes and then finish the vector already in the FIFO
    #150us;
    begin : mid_transfer
      int sent_before, reads_before;
      sent_before  = dlp.rx_q.size();
      reads_before = dlp.reads;
      dlp.host_send(8'h00);
      #1ms;
      chk(sent_before > 0 && sent_before < 2048 && dlp.reads == reads_before + 1,
          $sformatf("stop byte read in mid-transfer (%0d bytes sent before it)", sent_before));
      if (sent_before > 0 && sent_before < 2048 && dlp.reads == reads_before + 1) n_midread++;
    end
    chk(dpm_w == 0 && fifo_w == 2048, $sformatf("switch off: %0d memory, %0d FIFO writes", dpm_w, fifo_w));
    if (dpm_w == 0 && fifo_w == 2048) n_vga_off++;
    check_usb_vector(2048);
    // after the stop byte the next retrace sends nothing
    vga_go_h = 1;
    fifo_w = 0;
    wait (mon.frames >= 5);
    #1ms;
    chk(fifo_w == 0, "no FIFO writes after the stop byte");
    check_usb_vector(0);
    if (fifo_w == 0) n_stop++;
    chk(dlp.errors == 0, "DLP interface protocol");
    chk(mon.errors == 0, "VGA sync and raster");
    checks += mon.checks;
    // every mechanism must have happened
    chk(n_acq >= 5,        $sformatf("acquisitions: %0d", n_acq));
    chk(n_fifo_vec >= 3,   $sformatf("vectors streamed to the host: %0d", n_fifo_vec));
    chk(n_dpm_vec >= 1,    $sformatf("vectors written to the memory: %0d", n_dpm_vec));
    chk(n_frames_ok >= 2,  $sformatf("frames matching: %0d", n_frames_ok));
    chk(n_cursor >= 1,     $sformatf("cursor moves: %0d", n_cursor));
    chk(n_vga_off >= 1,    $sformatf("VGA switch off: %0d", n_vga_off));
    chk(n_midread >= 1,    $sformatf("host byte read in mid-transfer: %0d", n_midread));
    chk(n_start >= 1 && n_stop >= 1, "start and stop commands");
    chk(dlp.busy_waits > 0, $sformatf("USB module busy (back-pressure) clocks: %0d", dlp.busy_waits));
    chk(dlp.reads >= 2,     $sformatf("command bytes read: %0d", dlp.reads));
    $display("mechanisms: acquisitions=%0d usb_vectors=%0d dpm_vectors=%0d frames_ok=%0d cursor=%0d vga_off=%0d start=%0d stop=%0d mid_transfer_reads=%0d busy_clocks=%0d cmd_reads=%0d",
             n_acq, n_fifo_vec, n_dpm_vec, n_frames_ok, n_cursor, n_vga_off, n_start, n_stop, n_midread, dlp.busy_waits, dlp.reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
