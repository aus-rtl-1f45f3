// sc100: system controller state machine. It acquires one A-mode vector per video
// frame and stores it in the FIFO (for USB) and the dual-port memory (for VGA).
//
// When the synchronized vertical sync (vc_vs) goes high, i.e. during vertical retrace,
// the controller pulses the backend: be_ph for two clocks, then be_pl for two clocks
// (40 ns each at 50 MHz). It then releases the byte counter (cntr_rst_l high) and
// enables writing while the counter runs: dpm_wea if vga_go_h is high, fifo_wr_en if
// usb_go_h is high, neither if both are low. When count reaches 2047 it returns the
// counter to reset and waits in IDLE until vc_vs falls, so it runs once per frame.
//
// Timing: be_ph, be_pl and cntr_rst_l are decoded from the state register (be_ph also
// from the synchronized vs in INIT). dpm_wea and fifo_wr_en pass through output flops
// and so lag the state by one clock; the write window therefore covers exactly 2048
// clocks, during which the byte counter presents addresses 1, 2, ..., 2047, 0. vc_vs
// comes from the 65 MHz domain and passes through two flops. rst_l is synchronous,
// active low and already synchronized.
//
// States, pulse widths, enables, counter handshake, synchronizer and output flops
// follow the source design.
module sc100
  import uaus_pkg::*;
(
  input  logic              clk,
  input  logic              rst_l,
  input  logic              vga_go_h,
  input  logic              usb_go_h,
  input  logic              vc_vs,
  input  logic [VEC_AW-1:0] count,
  output logic              cntr_rst_l,
  output logic              fifo_wr_en,
  output logic              dpm_wea,
  output logic              be_ph,
  output logic              be_pl
);
  typedef enum logic [2:0] {
    INIT, PULSE_H_0, PULSE_H_1, PULSE_L_0, PULSE_L_1, WRITE_EN, IDLE
  } sc_state_t;

  sc_state_t state, nxt_state;
  logic vs_meta, svs;
  logic writing;

  always_ff @(posedge clk) begin
    if (!rst_l) begin
      vs_meta    <= 1'b0;
      svs        <= 1'b0;
      dpm_wea    <= 1'b0;
      fifo_wr_en <= 1'b0;
    end else begin
      vs_meta    <= vc_vs;
      svs        <= vs_meta;
      dpm_wea    <= vga_go_h && writing;
      fifo_wr_en <= usb_go_h && writing;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_l) state <= INIT;
    else        state <= nxt_state;
  end

  always_comb begin
    nxt_state = state;
    unique case (state)
      INIT:      if (svs) nxt_state = PULSE_H_0;
      PULSE_H_0: nxt_state = PULSE_H_1;
      PULSE_H_1: nxt_state = PULSE_L_0;
      PULSE_L_0: nxt_state = PULSE_L_1;
      PULSE_L_1: nxt_state = WRITE_EN;
      WRITE_EN:  if (count == VEC_AW'(VEC_LEN - 1)) nxt_state = IDLE;
      IDLE:      if (!svs) nxt_state = INIT;
      default:   nxt_state = INIT;
    endcase
  end

  assign writing    = (state == PULSE_L_1) || (state == WRITE_EN);
  assign cntr_rst_l = writing;
  assign be_ph      = (state == INIT && svs) || (state == PULSE_H_0);
  assign be_pl      = (state == PULSE_H_1) || (state == PULSE_L_0);

  // the two backend strobes never overlap
  assert property (@(posedge clk) disable iff (!rst_l) !(be_ph && be_pl));
endmodule
