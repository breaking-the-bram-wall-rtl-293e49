// vina_ring_cluster: N_NODES identical nodes joined into a closed,
// unidirectional ring, the cross-board long-ring pipeline.
//
// The energy grids are split into N_NODES slabs, one per node, so each node
// stores only its own part.  An AG trial started on node i (POT update,
// coordinates, partial energy of slab i) travels the ring i -> i+1 -> ...,
// picking up the partial energy and gradient of each node's slab, and is
// finished (derivation and AG test) on node (i + N_NODES - 1) mod N_NODES,
// which also starts the next trial if one is needed.  With N_NODES stages
// in the ring, up to N_NODES tasks per PEC slot are in different stages at
// once.
//
// Node k's SFP output drives node (k+1) mod N_NODES's SFP input directly; the
// serial transceivers and fibre between boards are taken as an ideal,
// in-order word channel with flow control.  Every node keeps its own
// processing-system ports (AG task in, AG result out, grid load), brought out
// as arrays indexed by node, together with its event pulses.  The whole ring
// runs on one clock here.  The ring and its routing follow the described
// design; the direct link and the single clock are this design's choices.
module vina_ring_cluster
  import vina_pkg::*;
#(
  parameter int N_NODES    = 3,
  parameter int C_POTU     = 2,
  parameter int C_P2C      = 2,
  parameter int C_PEC      = 3,
  parameter int C_DER      = 2,
  parameter int GX         = 64,
  parameter int GY         = 64,
  parameter int GZ         = 64,
  parameter int NTYPES     = 4,
  parameter int TB_DEPTH   = 16,
  parameter int RX_DEPTH   = 16,
  parameter int MAX_TRIALS = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ps_valid  [N_NODES],
  output logic               ps_ready  [N_NODES],
  input  task_pkt_t          ps_pkt    [N_NODES],
  output logic               res_valid [N_NODES],
  input  logic               res_ready [N_NODES],
  output ag_result_t         res       [N_NODES],
  input  logic               ld_en     [N_NODES],
  input  logic [GADDR_W-1:0] ld_addr   [N_NODES],
  input  fix_t               ld_data   [N_NODES],
  output node_events_t       ev        [N_NODES]
);
  logic              l_valid [N_NODES];
  logic              l_ready [N_NODES];
  logic              l_sof   [N_NODES];
  logic [LINK_W-1:0] l_data  [N_NODES];

  // l_*[k] is the link leaving node k
  for (genvar k = 0; k < N_NODES; k++) begin : g_node
    localparam int PREV = (k + N_NODES - 1) % N_NODES;
    fpga_node #(
      .NODE_ID(k), .N_NODES(N_NODES),
      .C_POTU(C_POTU), .C_P2C(C_P2C), .C_PEC(C_PEC), .C_DER(C_DER),
      .GX(GX), .GY(GY), .GZ(GZ), .NTYPES(NTYPES),
      .TB_DEPTH(TB_DEPTH), .RX_DEPTH(RX_DEPTH), .MAX_TRIALS(MAX_TRIALS)
    ) u_node (
      .clk, .rst_n,
      .ps_valid(ps_valid[k]), .ps_ready(ps_ready[k]), .ps_pkt(ps_pkt[k]),
      .res_valid(res_valid[k]), .res_ready(res_ready[k]), .res(res[k]),
      .ld_en(ld_en[k]), .ld_addr(ld_addr[k]), .ld_data(ld_data[k]),
      .rx_valid(l_valid[PREV]), .rx_ready(l_ready[PREV]),
      .rx_sof(l_sof[PREV]), .rx_data(l_data[PREV]),
      .tx_valid(l_valid[k]), .tx_ready(l_ready[k]),
      .tx_sof(l_sof[k]), .tx_data(l_data[k]),
      .ev(ev[k])
    );
  end
endmodule
