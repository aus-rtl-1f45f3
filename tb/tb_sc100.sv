// tb_sc100: self-checking testbench of the system controller state machine, with a
// byte-counter model in the testbench. For each setting of (vga_go_h, usb_go_h) a
// vertical-sync pulse is applied; the checks are: PH high for exactly 2 clocks, then
// PL for exactly 2 clocks right after it, never together; the write enables high for
// exactly 2048 clocks, each only if its go flag is set, starting one clock after the
// PL pulse; the counter released for 2048 clocks; PH rising on the second clock edge
// after vs rises (two-flop synchronizer); one acquisition per sync pulse.
module tb_sc100;
  logic clk = 0, rst_l = 0, vga_go_h = 0, usb_go_h = 0, vc_vs = 0;
  logic [10:0] count = 0;
  logic cntr_rst_l, fifo_wr_en, dpm_wea, be_ph, be_pl;
  int checks = 0, failures = 0;

  sc100 dut (.clk(clk), .rst_l(rst_l), .vga_go_h(vga_go_h), .usb_go_h(usb_go_h),
    .vc_vs(vc_vs), .count(count), .cntr_rst_l(cntr_rst_l), .fifo_wr_en(fifo_wr_en),
    .dpm_wea(dpm_wea), .be_ph(be_ph), .be_pl(be_pl));

  always #10 clk = ~clk;

  always @(posedge clk) count <= cntr_rst_l ? count + 1'b1 : 11'd0;

  initial begin
    repeat (40000) @(posedge clk);
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
    repeat (5) @(posedge clk);
    @(negedge clk) rst_l = 1;
    repeat (10) @(negedge clk);
    for (int mode = 0; mode < 4; mode++) begin
      int t, ph_first, ph_n, pl_first, pl_n;
      int dpm_first, dpm_n, fifo_first, fifo_n, cnt_n, overlap;
      ph_first = -1; ph_n = 0; pl_first = -1; pl_n = 0;
      dpm_first = -1; dpm_n = 0; fifo_first = -1; fifo_n = 0; cnt_n = 0; overlap = 0;
      vga_go_h = mode[0];
      usb_go_h = mode[1];
      @(negedge clk) vc_vs = 1;
      for (t = 0; t < 2300; t++) begin
        @(posedge clk); #1;
        if (be_ph) begin if (ph_first < 0) ph_first = t; ph_n++; end
        if (be_pl) begin if (pl_first < 0) pl_first = t; pl_n++; end
        if (be_ph && be_pl) overlap++;
        if (dpm_wea) begin if (dpm_first < 0) dpm_first = t; dpm_n++; end
        if (fifo_wr_en) begin if (fifo_first < 0) fifo_first = t; fifo_n++; end
        if (cntr_rst_l) cnt_n++;
        if (t == 2200) vc_vs = 0;
      end
      chk(ph_n == 2, $sformatf("mode %0d: PH %0d clocks", mode, ph_n));
      chk(pl_n == 2, $sformatf("mode %0d: PL %0d clocks", mode, pl_n));
      chk(pl_first == ph_first + 2, "PL follows PH directly");
      chk(ph_first == 1, $sformatf("PH starts %0d clocks after vs, expected 1", ph_first));
      chk(overlap == 0, "PH and PL overlap");
      chk(cnt_n == 2048, $sformatf("counter released %0d clocks", cnt_n));
      chk(dpm_n == (mode[0] ? 2048 : 0), $sformatf("mode %0d: dpm_wea %0d clocks", mode, dpm_n));
      chk(fifo_n == (mode[1] ? 2048 : 0), $sformatf("mode %0d: fifo_wr_en %0d clocks", mode, fifo_n));
      if (mode[0]) chk(dpm_first == ph_first + 5, "write window starts 1 clock after the PL pulse");
      if (mode[0] && mode[1]) chk(dpm_first == fifo_first, "both enables together");
      // vs now low: no second acquisition until the next pulse
      repeat (100) begin
        @(posedge clk); #1;
        chk(!be_ph && !dpm_wea && !fifo_wr_en, "idle between frames");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
