// tb_fir: self-checking testbench of the 23-tap FIR filter.
// Random, impulse and constant inputs are applied; every output is compared with the
// direct-form sum of the 23-tap impulse response followed by round-half-up division by
// 256 and clamping, assuming three clocks from input to the product registers.
module tb_fir;
  import fir_ref_pkg::*;
  logic clk = 0, rst_l = 0;
  logic [7:0] d = 0, y;
  int checks = 0, failures = 0;
  int x [0:4095];
  int n = 0;  // number of edges since reset release

  fir dut (.clk(clk), .rst_l(rst_l), .d(d), .y(y));

  always #10 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_y(input int nn);
    longint s = 0;
    for (int i = 0; i < 23; i++) begin
      int j = nn - 2 - i;       // index of the input held in tap i
      if (j >= 1) s += longint'(H[i]) * x[j];
    end
    return round_out(s);
  endfunction

  initial begin
    for (int i = 0; i < 4096; i++) x[i] = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_l = 1;
    for (int k = 1; k < 4000; k++) begin
      int v;
      if (k < 1500)       v = $urandom_range(0, 127);   // rectified range
      else if (k < 1600)  v = (k == 1520) ? 127 : 0;     // impulse
      else if (k < 1700)  v = 100;                       // constant
      else if (k < 2500)  v = $urandom_range(0, 255);   // full byte range
      else if (k < 2600)  v = 255;                       // largest input
      else                v = (k % 8 < 4) ? 127 : 0;     // square wave
      x[k] = v;
      d = 8'(v);
      @(posedge clk);
      n = k;
      #1;
      checks++;
      if (int'(y) != expect_y(n)) begin
        failures++;
        if (failures < 10) $display("edge %0d: y=%0d expected %0d", n, y, expect_y(n));
      end
      if (k == 1699) begin  // settled constant input: DC gain 261/256
        checks++;
        if (y != 8'd102) begin failures++; $display("DC output %0d, expected 102", y); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
