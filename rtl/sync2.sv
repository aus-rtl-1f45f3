// sync2: two-flop ("back-to-back") synchronizer for a signal that is asynchronous to clk.
//
// The input passes through two flip-flops and the second one drives q, so q follows d
// two rising edges later. There is deliberately no reset: the chain flushes itself
// within two cycles. It is used for the switch, the buttons and the DLP status lines. Both the
// use of two flops and where they are placed follow the source design.
module sync2 (
  input  logic clk,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk) begin
    meta <= d;
    q    <= meta;
  end
endmodule
