// tb_cntr: self-checking testbench of the 11-bit byte counter: clear while rst_l is
// low, count one per clock, wrap from 2047 to 0, clear again mid-count.
module tb_cntr;
  logic clk = 0, rst_l = 0;
  logic [10:0] n;
  int checks = 0, failures = 0;

  cntr #(.W(11)) dut (.clk(clk), .rst_l(rst_l), .n(n));

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    repeat (3) @(posedge clk); #1;
    checks++;
    if (n != 0) failures++;
    @(negedge clk) rst_l = 1;
    expected = 0;
    for (int i = 0; i < 5000; i++) begin
      if (i == 3000) rst_l = 0;
      if (i == 3005) rst_l = 1;
      @(posedge clk); #1;
      expected = rst_l ? (expected + 1) % 2048 : 0;
      checks++;
      if (int'(n) != expected) begin
        failures++;
        if (failures < 10) $display("n=%0d expected %0d", n, expected);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
