// dpm: dual-port, dual-clock memory, 2048 x 8 bits by default.
//
// It carries the latest A-mode vector across the clock boundary: port A writes in the
// 50 MHz acquisition domain, port B reads in the 65 MHz video domain. Port A writes
// dina to addra on a rising clka edge when wea is high. Port B is a registered read:
// on a rising clkb edge with enb high, doutb takes the word at addrb; with enb low,
// doutb holds. There is no reset; the contents are whatever was last written.
//
// Size, width and the port assignment follow the source design, which used a vendor
// block-memory generator; the read-enable behaviour is this design's choice.
module dpm #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned DW    = 8,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clka,
  input  logic          wea,
  input  logic [AW-1:0] addra,
  input  logic [DW-1:0] dina,
  input  logic          clkb,
  input  logic          enb,
  input  logic [AW-1:0] addrb,
  output logic [DW-1:0] doutb
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clka) begin
    if (wea) mem[addra] <= dina;
  end

  always_ff @(posedge clkb) begin
    if (enb) doutb <= mem[addrb];
  end
endmodule
