// tb_sys_cntr: self-checking testbench of the system controller unit (state machine,
// real byte counter, reset and switch synchronizers). Over three frames it checks that
// every write to the dual-port memory uses a different address, so that all 2048
// addresses are written once per frame, that each frame gives one PH and one PL pulse,
// that turning the VGA switch off stops memory writes, and that the FIFO enable
// follows usb_go_h.
module tb_sys_cntr;
  logic clk = 0, rst_l = 1, vga_go_h = 1, usb_go_h = 1, vc_vs = 0;
  logic [10:0] bcount;
  logic fifo_wea, dpm_wea, ph, pl;
  int checks = 0, failures = 0;
  int seen [2048];
  int dpm_n = 0, fifo_n = 0, ph_rise = 0, pl_rise = 0;
  logic ph_q = 0, pl_q = 0;

  sys_cntr dut (.clk(clk), .rst_l(rst_l), .vga_go_h(vga_go_h), .usb_go_h(usb_go_h),
    .vc_vs(vc_vs), .bcount(bcount), .fifo_wea(fifo_wea), .dpm_wea(dpm_wea), .ph(ph), .pl(pl));

  always #10 clk = ~clk;

  always @(posedge clk) if (rst_l) begin
    if (dpm_wea) begin seen[bcount]++; dpm_n++; end
    if (fifo_wea) fifo_n++;
    if (ph && !ph_q) ph_rise++;
    if (pl && !pl_q) pl_rise++;
    ph_q <= ph;
    pl_q <= pl;
  end

  // a real falling reset edge at 1 ns, so the reset synchronizers clear at once
  initial #1 rst_l = 0;

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

  task automatic frame();
    @(negedge clk) vc_vs = 1;
    repeat (2200) @(negedge clk);
    vc_vs = 0;
    repeat (300) @(negedge clk);
  endtask

  initial begin
    foreach (seen[i]) seen[i] = 0;
    repeat (5) @(negedge clk);
    rst_l = 1;
    repeat (10) @(negedge clk);
    frame();
    chk(dpm_n == 2048 && fifo_n == 2048, $sformatf("frame 1: %0d memory, %0d FIFO writes", dpm_n, fifo_n));
    foreach (seen[i]) if (seen[i] != 1) begin chk(0, $sformatf("address %0d written %0d times", i, seen[i])); break; end
    checks++;
    usb_go_h = 0;
    frame();
    chk(dpm_n == 4096 && fifo_n == 2048, "frame 2: FIFO writes stop with usb_go_h low");
    vga_go_h = 0; usb_go_h = 1;
    repeat (5) @(negedge clk);
    frame();
    chk(dpm_n == 4096 && fifo_n == 4096, "frame 3: memory writes stop with the VGA switch off");
    chk(ph_rise == 3 && pl_rise == 3, $sformatf("%0d PH and %0d PL pulses for 3 frames", ph_rise, pl_rise));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
