// tb_fifo: self-checking testbench of the 2048 x 8 FIFO.
// A queue model follows random pushes and pops; every popped word, and the empty and
// full flags on every clock, are compared with it. The FIFO is also filled to exactly
// 2048 words, overfilled (the extra write must be dropped) and drained.
module tb_fifo;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0;
  logic [7:0] din = 0, dout;
  logic empty, full;
  int checks = 0, failures = 0;
  byte unsigned q[$];
  logic pending = 0;
  byte unsigned pending_val;

  fifo #(.DEPTH(2048), .DW(8)) dut (.clk(clk), .rst(rst), .din(din), .wr_en(wr_en),
    .rd_en(rd_en), .dout(dout), .empty(empty), .full(full));

  always #10 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic w, input logic r, input byte unsigned v);
    @(negedge clk);
    checks += 2;
    if (empty != (q.size() == 0))   begin failures++; $display("empty=%0d size=%0d", empty, q.size()); end
    if (full  != (q.size() == 2048)) begin failures++; $display("full=%0d size=%0d", full, q.size()); end
    wr_en = w; rd_en = r; din = 8'(v);
    pending = 0;
    if (r && q.size() != 0) begin pending = 1; pending_val = q[0]; end
    @(posedge clk);
    if (r && q.size() != 0) void'(q.pop_front());
    if (w && q.size() < 2048 + (r ? 1 : 0) && !(q.size() == 2048)) q.push_back(v);
    #1;
    if (pending) begin
      checks++;
      if (dout != pending_val) begin failures++; $display("dout=%0d expected %0d", dout, pending_val); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 5000; i++) step($urandom_range(0, 1), $urandom_range(0, 1), 8'($urandom));
    for (int i = 0; i < 2100; i++) step(1, 0, 8'($urandom));   // fill and overfill
    checks++;
    if (!full) begin failures++; $display("not full after 2100 writes"); end
    for (int i = 0; i < 2100; i++) step(0, 1, 8'h00);          // drain and underflow
    checks++;
    if (!empty) begin failures++; $display("not empty after draining"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
