// sfp_rx: framing side of a node's SFP input port.
//
// Collects the NWORDS link words of one task packet (see sfp_tx) and presents
// the packet on out_valid/out_ready.  A word with link_sof restarts the
// collection, so the receiver re-aligns to packet boundaries on its own.
// link_ready is low while a complete packet waits to be taken, which stalls
// the sender.  Timing: out_valid rises the cycle after the last word arrives.
// The word format is this design's choice.
module sfp_rx
  import vina_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              link_valid,
  output logic              link_ready,
  input  logic              link_sof,
  input  logic [LINK_W-1:0] link_data,
  output logic              out_valid,
  input  logic              out_ready,
  output task_pkt_t         out_pkt
);
  localparam int PKT_W  = $bits(task_pkt_t);
  localparam int NWORDS = (PKT_W + LINK_W - 1) / LINK_W;
  localparam int WW     = $clog2(NWORDS + 1);

  logic [NWORDS-1:0][LINK_W-1:0] words;
  logic [WW-1:0]                 widx;
  logic                          full;
  logic [NWORDS*LINK_W-1:0]      flat;

  assign link_ready = !full;
  assign out_valid  = full;
  assign flat       = words;
  assign out_pkt    = task_pkt_t'(flat[PKT_W-1:0]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full  <= 1'b0;
      widx  <= '0;
      words <= '0;
    end else if (full) begin
      if (out_ready) begin
        full <= 1'b0;
        widx <= '0;
      end
    end else if (link_valid) begin
      if (link_sof) begin
        words[0] <= link_data;
        widx     <= WW'(1);
        if (NWORDS == 1) full <= 1'b1;
      end else if (widx != '0) begin
        words[widx[$clog2(NWORDS)-1:0]] <= link_data;
        widx <= widx + 1'b1;
        if (int'(widx) == NWORDS - 1) full <= 1'b1;
      end
    end
  end
endmodule
