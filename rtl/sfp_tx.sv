// sfp_tx: framing side of a node's SFP output port.
//
// A task packet is wider than the serial link's user word, so the packet is
// sent as NWORDS = ceil($bits(task_pkt_t) / LINK_W) consecutive LINK_W-bit
// words, least significant first, with link_sof marking the first word of
// each packet.  The link side is valid/ready (link_ready comes from the
// receiving node's sfp_rx, standing in for the flow control of the link
// layer).  in_ready is high only while no packet is being sent.  Timing: the
// first word is offered the cycle after a packet is accepted and one word
// leaves per cycle while link_ready is high, so a packet takes NWORDS cycles
// on the link.  The transceiver itself is outside this module; the word
// format is this design's choice.
module sfp_tx
  import vina_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  task_pkt_t         in_pkt,
  output logic              link_valid,
  input  logic              link_ready,
  output logic              link_sof,
  output logic [LINK_W-1:0] link_data
);
  localparam int PKT_W  = $bits(task_pkt_t);
  localparam int NWORDS = (PKT_W + LINK_W - 1) / LINK_W;
  localparam int WW     = $clog2(NWORDS + 1);

  logic [NWORDS*LINK_W-1:0] buffer;
  logic [WW-1:0]            widx;
  logic                     busy;

  assign in_ready   = !busy;
  assign link_valid = busy;
  assign link_sof   = busy && (widx == '0);
  assign link_data  = buffer[LINK_W-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      widx   <= '0;
      buffer <= '0;
    end else if (!busy) begin
      if (in_valid) begin
        buffer <= (NWORDS*LINK_W)'(in_pkt);
        widx   <= '0;
        busy   <= 1'b1;
      end
    end else if (link_ready) begin
      buffer <= buffer >> LINK_W;
      widx   <= widx + 1'b1;
      if (int'(widx) == NWORDS - 1) busy <= 1'b0;
    end
  end
endmodule
