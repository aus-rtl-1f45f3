// backend: simulated ultrasound backend (pulser/receiver plus 8-bit A/D converter).
//
// The real backend fires the transducer and digitizes the returning echoes. This
// stand-in lives in the FPGA so that the rest of the system can run without one. A
// pulse on PH arms it; when the following PL pulse ends, it outputs one A-mode RF
// vector of VEC_LEN samples, one per clock, then returns to mid-scale (0x80, "no
// signal"). The vector is an offset-binary carrier with a period of 4 samples
// (12.5 MHz at 50 MHz sampling, close to the 10 MHz of ophthalmic probes): samples
// 0 and 1 of each period are 128+A, samples 2 and 3 are 127-A, where A is the echo
// envelope at that depth. The envelope is the largest of eight triangular echoes,
// placed like the reflections of an eye: initial spike, two corneal surfaces, two lens
// surfaces, retina, sclera and orbital tissue. After rectification A comes back exactly.
//
// Interface: ph and pl are active-high strobes from the system controller; rst_l is an
// asynchronous active-low reset, asserted at once and released on the second clock.
// ad_data is registered: sample 0 appears on the first clock edge after pl has fallen.
//
// What the backend must do (be pulsed by PH then PL, return one vector of bytes at the
// 50 MHz clock) and its two-flop reset synchronizer follow the source design (asserting
// the reset at once is this design's own). Everything about the waveform itself
// (carrier, echo positions, heights and widths) is this design's own.
module backend
  import uaus_pkg::*;
(
  input  logic       clk,
  input  logic       rst_l,
  input  logic       ph,
  input  logic       pl,
  output logic [7:0] ad_data
);
  localparam int unsigned NECHO = 8;
  localparam int unsigned SLOPE = 6;   // envelope drop per sample away from the peak
  // depth (sample index) and peak amplitude (0..127) of each echo
  localparam int ECHO_POS [NECHO] = '{ 16, 150, 172, 560, 880, 1480, 1530, 1620};
  localparam int ECHO_AMP [NECHO] = '{120, 100,  60,  70,  85,  120,  105,   45};

  logic              srst_l;
  logic              armed;
  logic              pl_q;
  logic              active;
  logic [VEC_AW-1:0] idx;
  logic [6:0]        amp;

  rst_sync u_rst_sync (.clk(clk), .rst_l(rst_l), .srst_l(srst_l));

  // echo envelope at depth idx
  always_comb begin
    int v;
    int best;
    best = 0;
    for (int e = 0; e < NECHO; e++) begin
      int gap;
      gap = (int'(idx) > ECHO_POS[e]) ? int'(idx) - ECHO_POS[e] : ECHO_POS[e] - int'(idx);
      v    = ECHO_AMP[e] - gap * int'(SLOPE);
      if (v > best) best = v;
    end
    amp = 7'(best);
  end

  always_ff @(posedge clk) begin
    if (!srst_l) begin
      armed   <= 1'b0;
      pl_q    <= 1'b0;
      active  <= 1'b0;
      idx     <= '0;
      ad_data <= 8'h80;
    end else begin
      pl_q <= pl;
      if (ph) armed <= 1'b1;
      if (armed && pl_q && !pl) begin
        armed  <= 1'b0;
        active <= 1'b1;
        idx    <= '0;
      end else if (active) begin
        idx <= idx + 1'b1;
        if (idx == VEC_AW'(VEC_LEN - 1)) active <= 1'b0;
      end
      if (active)
        ad_data <= idx[1] ? (8'd127 - {1'b0, amp}) : (8'd128 + {1'b0, amp});
      else
        ad_data <= 8'h80;
    end
  end
endmodule
