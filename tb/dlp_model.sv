// dlp_model: behavioural model of the FPGA-side FIFO interface of a DLP-2232M module
// (FT2232C in 245 FIFO mode), for testbenches only. Not synthesizable.
//
// Host -> FPGA: bytes queued with host_send() make rxf_l go low. While rd_l is low the
// front byte is driven on dout; when rd_l rises the byte is consumed. rxf_l is held
// high while rd_l is low and for RXF_GAP clocks after it rises.
// FPGA -> host: txe_l is low when the module can accept a byte. The byte on din is
// taken on the clock where wr has just fallen, and must have been driven (oe high) in
// the last clock of the wr pulse. txe_l is high while wr is high and for TXE_GAP
// clocks after it falls (the module "busy" time, which exercises back-pressure).
// Strobes shorter than MIN_STROBE clocks are counted as protocol errors. Nothing is
// checked or transferred while active is low (for instance during reset).
module dlp_model #(
  parameter int TXE_GAP    = 4,
  parameter int RXF_GAP    = 2,
  parameter int MIN_STROBE = 3
) (
  input  logic       clk,
  input  logic       active,   // checks and transfers only while high (after reset)
  input  logic       rd_l,
  input  logic       wr,
  input  logic [7:0] din,
  input  logic       oe,
  output logic [7:0] dout,
  output logic       rxf_l,
  output logic       txe_l
);
  byte unsigned host_q[$];     // bytes waiting to go to the FPGA
  byte unsigned rx_q[$];       // bytes received from the FPGA
  int           errors      = 0;
  int           reads       = 0;
  int           busy_waits  = 0; // clocks with txe_l held high by the busy time
  int           txe_busy    = 0;
  int           rxf_busy    = 0;
  int           rd_width    = 0;
  int           wr_width    = 0;
  logic         rd_l_q      = 1'b1;
  logic         wr_q        = 1'b0;
  logic         oe_q        = 1'b0;
  logic [7:0]   din_q       = '0;

  function automatic void host_send(input byte unsigned b);
    host_q.push_back(b);
  endfunction

  assign dout  = (host_q.size() != 0) ? 8'(host_q[0]) : 8'h00;
  assign rxf_l = (host_q.size() == 0) || !rd_l || (rxf_busy != 0);
  assign txe_l = wr || (txe_busy != 0);

  always @(posedge clk) if (active) begin
    // read strobe
    if (!rd_l) rd_width <= rd_width + 1;
    if (rd_l && !rd_l_q) begin
      if (rd_width < MIN_STROBE) begin
        errors <= errors + 1;
        $display("dlp_model: RD# pulse of %0d clocks", rd_width);
      end
      if (host_q.size() != 0) void'(host_q.pop_front());
      reads    <= reads + 1;
      rd_width <= 0;
      rxf_busy <= RXF_GAP;
    end else if (rxf_busy != 0) rxf_busy <= rxf_busy - 1;
    // write strobe
    if (wr) wr_width <= wr_width + 1;
    if (!wr && wr_q) begin
      if (wr_width < MIN_STROBE) begin
        errors <= errors + 1;
        $display("dlp_model: WR pulse of %0d clocks", wr_width);
      end
      if (!oe_q) begin
        errors <= errors + 1;
        $display("dlp_model: data not driven at the end of WR");
      end
      rx_q.push_back(din_q);
      wr_width <= 0;
      txe_busy <= TXE_GAP;
    end else if (txe_busy != 0) begin
      txe_busy   <= txe_busy - 1;
      busy_waits <= busy_waits + 1;
    end
    if (!rd_l && wr) begin
      errors <= errors + 1;
      $display("dlp_model: RD# and WR active together");
    end
    rd_l_q <= rd_l;
    wr_q   <= wr;
    oe_q   <= oe;
    din_q  <= din;
  end
endmodule
