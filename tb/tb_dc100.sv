// tb_dc100: self-checking testbench of the data controller.
// The DLP module is the behavioural model (which checks strobe widths, that data is
// driven at the end of each write and that RD# and WR never overlap); the FIFO is a
// small model in this file. Checks: no write before the first byte has been read from
// the host; a read gives a 3-clock RD# pulse with a 1-clock rd_en inside it; every
// FIFO word reaches the host in order, with one fifo_rd_en and one 3-clock WR pulse
// each; writing stops when the FIFO is empty; a host byte arriving in the middle of a
// transfer is read and the transfer then resumes.
module tb_dc100;
  logic clk = 0, rst_l = 0;
  logic dlp_txe_l, dlp_rxf_l, fifo_empty;
  logic dlp_rd_l, dlp_wr, fifo_rd_en, wr_en, rd_en;
  logic [7:0] host_byte, fifo_dout = 0;
  int checks = 0, failures = 0;
  byte unsigned fq[$];
  byte unsigned sent[$];
  int rd_en_cycles = 0, rd_low_cycles = 0, fifo_reads = 0, wr_en_cycles = 0;
  byte unsigned captured[$];

  dc100 dut (.clk(clk), .rst_l(rst_l), .dlp_txe_l(dlp_txe_l), .dlp_rxf_l(dlp_rxf_l),
    .fifo_empty(fifo_empty), .dlp_rd_l(dlp_rd_l), .dlp_wr(dlp_wr),
    .fifo_rd_en(fifo_rd_en), .wr_en(wr_en), .rd_en(rd_en));

  dlp_model #(.TXE_GAP(3)) dlp (.clk(clk), .active(rst_l), .rd_l(dlp_rd_l), .wr(dlp_wr), .din(fifo_dout),
    .oe(wr_en), .dout(host_byte), .rxf_l(dlp_rxf_l), .txe_l(dlp_txe_l));

  always #10 clk = ~clk;

  // FIFO model with registered output
  assign fifo_empty = (fq.size() == 0);
  always @(posedge clk) if (rst_l) begin
    if (fifo_rd_en && fq.size() != 0) begin
      fifo_dout <= fq.pop_front();
      fifo_reads <= fifo_reads + 1;
    end
    if (rd_en) begin
      rd_en_cycles <= rd_en_cycles + 1;
      captured.push_back(host_byte);
      if (dlp_rd_l) begin failures++; $display("rd_en outside the RD# pulse"); end
    end
    if (!dlp_rd_l) rd_low_cycles <= rd_low_cycles + 1;
    if (wr_en) begin
      wr_en_cycles <= wr_en_cycles + 1;
      if (!dlp_wr) begin failures++; $display("wr_en outside the WR pulse"); end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int n);
    for (int i = 0; i < n; i++) begin
      byte unsigned v = 8'($urandom);
      fq.push_back(v);
      sent.push_back(v);
    end
  endtask

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    @(negedge clk) rst_l = 1;
    load(5);
    repeat (200) @(posedge clk);
    chk(dlp.rx_q.size() == 0, "wrote before any host byte was read");
    // host sends the start byte
    dlp.host_send(8'h01);
    repeat (200) @(posedge clk);
    chk(rd_en_cycles == 1, "one rd_en pulse per host byte");
    chk(rd_low_cycles == 3, "RD# low for 3 clocks (60 ns)");
    chk(captured.size() == 1 && captured[0] == 8'h01, "captured host byte");
    chk(dlp.rx_q.size() == 5, "all FIFO words sent");
    chk(fifo_reads == 5 && wr_en_cycles == 5, "one FIFO read and one bus enable per byte");
    chk(fq.size() == 0, "FIFO drained");
    // a longer transfer with a host byte in the middle
    load(40);
    repeat (60) @(posedge clk);
    dlp.host_send(8'h00);
    repeat (600) @(posedge clk);
    chk(rd_en_cycles == 2 && captured[1] == 8'h00, "mid-transfer host byte read");
    chk(rd_low_cycles == 6, "second RD# pulse of 3 clocks");
    chk(dlp.rx_q.size() == 45, "transfer resumed after the read");
    for (int i = 0; i < 45 && i < dlp.rx_q.size(); i++)
      chk(dlp.rx_q[i] == sent[i], $sformatf("byte %0d order/value", i));
    chk(dlp.errors == 0, "DLP interface protocol");
    chk(dlp.busy_waits > 0, "module busy time was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
