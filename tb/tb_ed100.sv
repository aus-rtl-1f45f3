// tb_ed100: self-checking testbench of the envelope detector.
// Raw bytes (random, the rectification table values held constant, and a simulated
// echo vector) are applied; each output is compared with the rectified input filtered
// by the 23-tap reference, three clocks later. Constant inputs also check the
// rectifier's end points (0x00 and 0xFF both give 127, 0x7F and 0x80 both give 0).
module tb_ed100;
  import fir_ref_pkg::*;
  logic clk = 0, rst_l = 1;
  logic [7:0] din = 8'h80, dout;
  int checks = 0, failures = 0;
  int r [0:8191];   // rectified inputs, by edge number

  ed100 dut (.clk(clk), .rst_l(rst_l), .din(din), .dout(dout));

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

  function automatic int expect_y(input int nn);
    longint s = 0;
    for (int i = 0; i < 23; i++) begin
      int j = nn - 2 - i;
      if (j >= 1) s += longint'(H[i]) * r[j];
    end
    return round_out(s);
  endfunction

  // constant inputs after settling: output = round(rect * 261 / 256)
  int table_x [8] = '{255, 10, 127, 64, 128, 195, 85, 0};
  int table_y [8] = '{127, 117, 0, 63, 0, 67, 42, 127};

  initial begin
    int k;
    for (int i = 0; i < 8192; i++) r[i] = 0;
    repeat (6) @(posedge clk);
    @(negedge clk) rst_l = 1;
    repeat (4) @(posedge clk);   // reset synchronizer
    k = 1;
    for (int t = 0; t < 8 * 40 + 1000 + 2048; t++) begin
      int v;
      if (t < 8 * 40)        v = table_x[t / 40];
      else if (t < 8 * 40 + 1000) v = $urandom_range(0, 255);
      else                   v = echo_raw(t - 8 * 40 - 1000);
      @(negedge clk);
      din  = 8'(v);
      r[k] = rectify(v);
      @(posedge clk);
      #1;
      checks++;
      if (int'(dout) != expect_y(k)) begin
        failures++;
        if (failures < 10) $display("edge %0d: dout=%0d expected %0d", k, dout, expect_y(k));
      end
      if (t < 8 * 40 && t % 40 == 39) begin
        checks++;
        if (int'(dout) != round_out(longint'(table_y[t / 40]) * 261)) begin
          failures++;
          $display("constant 0x%02h: dout=%0d, rectified value should be %0d",
                   table_x[t / 40], dout, table_y[t / 40]);
        end
      end
      k++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
