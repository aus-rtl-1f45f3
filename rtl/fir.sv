// fir: 23-tap symmetric low-pass FIR filter for rectified 8-bit A-mode samples.
//
// The filter is y = sum_{i=1..11} c(i)*(d(i)+d(24-i)) + c(12)*d(12), with d(1)..d(23)
// the last 23 input samples (d(1) newest). Because the taps are symmetric, the 23 taps
// need only 12 multipliers. Each "dual tap" adds its two samples into a 9-bit sum,
// registers that sum (pipeline stage), and multiplies it by an 8-bit two's-complement
// coefficient into a registered 17-bit product. The twelve products are added into a
// 21-bit sum, and a rounder maps the sum back to 8 bits: negative sums give 0, other
// sums are divided by 256 (coefficients are scaled so that they add up to about 256)
// with round-half-up on bit 7. The sum and the rounder are combinational after the
// product registers, as in the original design.
//
// Interface: d is sampled on every rising clk edge; rst_l is a synchronous, active-low
// reset that clears all registers. Timing: the y seen after edge k+3 is computed from the
// window whose newest sample (d(1)) was sampled at edge k+1, i.e. three edges of latency
// from d to the product registers feeding y.
//
// Coefficient values, tap count, multiplier count and the bit widths (9-bit pair sum,
// 17-bit product, 21-bit sum) follow the source design. Two choices are this design's
// own: the rounder tests the true sign of the 21-bit sum instead of its bit 15 (the
// two agree except for sums of 32768 or more, which bit 15 would turn into 0), and the
// output saturates at 255 instead of wrapping, which the default coefficients never
// reach. The multiplier is assumed to have one pipeline register.
module fir #(
  parameter int unsigned DW     = 8,    // sample width
  parameter int unsigned CW     = 8,    // coefficient width (two's complement)
  parameter int unsigned NMULT  = 12,   // multipliers = (taps+1)/2
  parameter int unsigned SHIFT  = 8,    // output = sum / 2**SHIFT
  parameter logic signed [CW-1:0] COEF [NMULT] = '{
    -8'sd1, -8'sd2, -8'sd1, 8'sd0, 8'sd3, 8'sd7, 8'sd12, 8'sd17, 8'sd23, 8'sd27, 8'sd30, 8'sd31 }
) (
  input  logic          clk,
  input  logic          rst_l,
  input  logic [DW-1:0] d,
  output logic [DW-1:0] y
);
  localparam int unsigned TAPS = 2*NMULT - 1;
  localparam int unsigned PW   = DW + CW + 1;           // product width (17)
  localparam int unsigned SW   = PW + $clog2(NMULT);    // sum width (21)

  logic [DW-1:0]          taps  [TAPS];   // taps[0] = d(1) ... taps[22] = d(23)
  logic [DW:0]            pair  [NMULT];
  logic [DW:0]            ts    [NMULT];  // registered pair sums
  logic signed [PW-1:0]   prod  [NMULT];  // registered products
  logic signed [SW-1:0]   sum;

  // data registers d(1)..d(23)
  always_ff @(posedge clk) begin
    if (!rst_l) begin
      for (int i = 0; i < TAPS; i++) taps[i] <= '0;
    end else begin
      taps[0] <= d;
      for (int i = 1; i < TAPS; i++) taps[i] <= taps[i-1];
    end
  end

  // dual taps: pair adders (the centre tap has no partner)
  always_comb begin
    for (int i = 0; i < NMULT-1; i++)
      pair[i] = {1'b0, taps[i]} + {1'b0, taps[TAPS-1-i]};
    pair[NMULT-1] = {1'b0, taps[NMULT-1]};
  end

  // pipeline register and multiplier register of each dual tap
  always_ff @(posedge clk) begin
    if (!rst_l) begin
      for (int i = 0; i < NMULT; i++) begin
        ts[i]   <= '0;
        prod[i] <= '0;
      end
    end else begin
      for (int i = 0; i < NMULT; i++) begin
        ts[i]   <= pair[i];
        prod[i] <= PW'($signed({1'b0, ts[i]}) * COEF[i]);
      end
    end
  end

  // final adder
  always_comb begin
    sum = '0;
    for (int i = 0; i < NMULT; i++) sum += SW'(prod[i]);
  end

  // rounder: clamp negatives, divide by 2**SHIFT, round half up, saturate
  logic [SW-1:0] quot;
  always_comb begin
    quot = SW'(sum >>> SHIFT) + SW'(sum[SHIFT-1]);
    if (sum < 0)
      y = '0;
    else if (quot > SW'((1 << DW) - 1))
      y = '1;
    else
      y = quot[DW-1:0];
  end
endmodule
