// cntr: 11-bit byte counter of the system controller.
//
// While rst_l is low the count is cleared on each rising clk edge (synchronous reset);
// while it is high the count goes up by one per clock and wraps from 2047 to 0. The
// system controller holds it at zero between vectors and releases it for the write
// phase, so n is both the number of bytes written so far and the write address of the
// dual-port memory. Behaviour and width follow the source design.
module cntr #(
  parameter int unsigned W = 11
) (
  input  logic         clk,
  input  logic         rst_l,
  output logic [W-1:0] n
);
  always_ff @(posedge clk) begin
    if (!rst_l) n <= '0;
    else        n <= n + 1'b1;
  end
endmodule
