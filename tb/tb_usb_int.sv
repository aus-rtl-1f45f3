// tb_usb_int: self-checking testbench of the USB interface (data controller, FIFO,
// command flop). The host model sends the start byte; usb_go_h must go high. A burst
// of 2048 bytes (one A-mode vector) is written into the FIFO at one byte per clock and
// must reach the host complete and in order while the module's busy time throttles
// the transfer. The stop byte must clear usb_go_h.
module tb_usb_int;
  logic clk = 0, rst_l = 1;
  logic [7:0] din = 0, dlp_din, dlp_dout;
  logic wr_en = 0, dlp_oe, dlp_txe_l, dlp_rxf_l, dlp_rd_l, dlp_wr, usb_go_h;
  int checks = 0, failures = 0;
  byte unsigned sent[$];
  logic active = 0;

  usb_int dut (.clk(clk), .rst_l(rst_l), .din(din), .wr_en(wr_en), .dlp_din(dlp_din),
    .dlp_dout(dlp_dout), .dlp_oe(dlp_oe), .dlp_txe_l(dlp_txe_l), .dlp_rxf_l(dlp_rxf_l),
    .dlp_rd_l(dlp_rd_l), .dlp_wr(dlp_wr), .usb_go_h(usb_go_h));

  dlp_model #(.TXE_GAP(2)) dlp (.clk(clk), .active(active), .rd_l(dlp_rd_l), .wr(dlp_wr),
    .din(dlp_dout), .oe(dlp_oe), .dout(dlp_din), .rxf_l(dlp_rxf_l), .txe_l(dlp_txe_l));

  always #10 clk = ~clk;

  // a real falling reset edge at 1 ns, so the reset synchronizers clear at once
  initial #1 rst_l = 0;

  initial begin
    repeat (100000) @(posedge clk);
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
    repeat (4) @(posedge clk);
    active = 1;
    chk(!usb_go_h, "usb_go_h low after reset");
    dlp.host_send(8'h01);
    repeat (50) @(posedge clk);
    chk(usb_go_h, "start byte sets usb_go_h");
    // one vector, one byte per clock
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk);
      wr_en = 1;
      din = 8'($urandom);
      sent.push_back(din);
    end
    @(negedge clk) wr_en = 0;
    repeat (20000) @(posedge clk);
    chk(dlp.rx_q.size() == 2048, $sformatf("host received %0d of 2048 bytes", dlp.rx_q.size()));
    for (int i = 0; i < 2048 && i < dlp.rx_q.size(); i++)
      if (dlp.rx_q[i] != sent[i]) begin
        chk(0, $sformatf("byte %0d: %0d expected %0d", i, dlp.rx_q[i], sent[i]));
        break;
      end
    checks++;
    dlp.host_send(8'h00);
    repeat (50) @(posedge clk);
    chk(!usb_go_h, "stop byte clears usb_go_h");
    chk(dlp.errors == 0, "DLP protocol");
    chk(dlp.busy_waits > 0, "module busy time exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
