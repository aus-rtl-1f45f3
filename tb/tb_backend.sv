// tb_backend: self-checking testbench of the simulated ultrasound backend.
// Checks that the output rests at mid-scale, that PL without a preceding PH does
// nothing, that a PH/PL pulse pair yields exactly 2048 samples starting on the first
// edge after PL falls, and that each sample matches the echo model.
module tb_backend;
  import fir_ref_pkg::*;
  logic clk = 0, rst_l = 1, ph = 0, pl = 0;
  logic [7:0] ad_data;
  int checks = 0, failures = 0;

  backend dut (.clk(clk), .rst_l(rst_l), .ph(ph), .pl(pl), .ad_data(ad_data));

  always #10 clk = ~clk;

  // a real falling reset edge at 1 ns, so the reset synchronizers clear at once
  initial #1 rst_l = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_rest(input int cycles);
    repeat (cycles) begin
      @(posedge clk); #1;
      checks++;
      if (ad_data != 8'h80) begin failures++; $display("not at rest: %02h", ad_data); end
    end
  endtask

  initial begin
    repeat (6) @(posedge clk);
    @(negedge clk) rst_l = 1;
    check_rest(10);
    // PL alone must not fire
    @(negedge clk) pl = 1;
    repeat (2) @(negedge clk);
    pl = 0;
    check_rest(20);
    for (int shot = 0; shot < 2; shot++) begin
      @(negedge clk) ph = 1;
      repeat (2) @(negedge clk);
      ph = 0; pl = 1;
      repeat (2) @(negedge clk);
      pl = 0;
      // pl has fallen; the first edge now starts the vector, the next shows sample 0
      @(posedge clk); #1;
      checks++;
      if (ad_data != 8'h80) begin failures++; $display("early sample"); end
      for (int j = 0; j < 2048; j++) begin
        @(posedge clk); #1;
        checks++;
        if (int'(ad_data) != echo_raw(j)) begin
          failures++;
          if (failures < 10) $display("sample %0d: %0d expected %0d", j, ad_data, echo_raw(j));
        end
      end
      check_rest(50);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
