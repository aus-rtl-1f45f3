// rst_sync: reset synchronizer for one clock domain.
//
// The external active-low reset clears both flip-flops at once, without waiting for a
// clock edge, so the domain enters reset even while its power-up state is random.
// When the reset is released, a 1 shifts through the two flops and the synchronized
// reset srst_l rises on the second rising edge of clk after the release. The release
// is therefore synchronous to clk and cannot cause metastability in the logic it
// resets.
//
// Ports: clk, rst_l (asynchronous, active low), srst_l (active low, synchronous release).
// The source design passes the reset through a plain two-flop synchronizer. Asserting
// the reset asynchronously is this design's own choice.
module rst_sync (
  input  logic clk,
  input  logic rst_l,
  output logic srst_l
);
  logic meta;

  always_ff @(posedge clk or negedge rst_l) begin
    if (!rst_l) begin
      meta   <= 1'b0;
      srst_l <= 1'b0;
    end else begin
      meta   <= 1'b1;
      srst_l <= meta;
    end
  end
endmodule
