// tb_dpm: self-checking testbench of the dual-clock dual-port memory.
// Port A (50 MHz) writes a random image and some overwrites; port B (65 MHz) reads
// random addresses and checks the registered read data; with enb low doutb must hold.
module tb_dpm;
  logic clka = 0, clkb = 0, wea = 0, enb = 0;
  logic [10:0] addra = 0, addrb = 0;
  logic [7:0] dina = 0, doutb;
  int checks = 0, failures = 0;
  byte unsigned model [2048];

  dpm #(.DEPTH(2048), .DW(8)) dut (.clka(clka), .wea(wea), .addra(addra), .dina(dina),
    .clkb(clkb), .enb(enb), .addrb(addrb), .doutb(doutb));

  always #10   clka = ~clka;
  always #7.69 clkb = ~clkb;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2048 + 300; a++) begin
      @(negedge clka);
      wea = 1;
      addra = (a < 2048) ? 11'(a) : 11'($urandom);
      dina = 8'($urandom);
      model[addra] = dina;
    end
    @(negedge clka) wea = 0;
    repeat (3) @(posedge clkb);
    for (int i = 0; i < 3000; i++) begin
      logic [7:0] held;
      @(negedge clkb);
      held = doutb;
      enb = (i % 5 != 0);
      addrb = 11'($urandom);
      @(posedge clkb); #1;
      checks++;
      if (enb ? (doutb != model[addrb]) : (doutb != held)) begin
        failures++;
        if (failures < 10) $display("addr %0d enb %0d: doutb=%0d", addrb, enb, doutb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
