// ed100: envelope detector. Rectifies raw 8-bit A/D samples and low-pass filters them.
//
// Rectification folds the offset-binary sample X around mid-scale: the result Y has
// Y[7] = 0, and Y[6:0] = X[6:0] when X[7] is 1, or the bitwise inverse of X[6:0] when
// X[7] is 0. So 0x80 and 0x7F both map to 0, and 0xFF and 0x00 both map to 127. The
// rectifier is combinational and feeds the 23-tap FIR filter (module fir), whose
// output is the envelope.
//
// Interface: din is sampled every clk; rst_l is an asynchronous active-low reset that
// takes effect at once and is released through two flops before it reaches the filter.
// Timing is the filter's: three clock edges from din to the registers that drive dout.
//
// The rectification rule, the filter and the reset synchronizer follow the source
// design; the filter parameters are passed through unchanged.
module ed100 (
  input  logic       clk,
  input  logic       rst_l,
  input  logic [7:0] din,
  output logic [7:0] dout
);
  logic       srst_l;
  logic [7:0] rect;

  rst_sync u_rst_sync (.clk(clk), .rst_l(rst_l), .srst_l(srst_l));

  assign rect = din[7] ? {1'b0, din[6:0]} : {1'b0, ~din[6:0]};

  fir u_fir (.clk(clk), .rst_l(srst_l), .d(rect), .y(dout));
endmodule
